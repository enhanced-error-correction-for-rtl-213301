// ecc_pkg: constants, the FUEC parity-check matrix and shared types of the
// hybrid MDMC + FUEC memory protection.
//
// The memory word carries 16 data bits X0..X15. Two codes protect it:
//  * MDMC (modified decimal matrix code): the word is cut into 4-bit symbols;
//    each symbol gets 3 Hamming check bits (horizontal bits) and the bit
//    columns of the symbol matrix get XOR check bits (vertical bits).
//  * FUEC (flexible unequal error control): 10 code bits C0..C9, each the XOR
//    of a fixed set of data bits. The 26-bit FUEC codeword is ordered
//    C0..C9, X0..X15 (code bits first), and "adjacent" means adjacent in that
//    order.
// The data-bit sets of C0..C9 below are the code's defining equations; the
// syndrome of a received word is S_i = C_i xor (the same data-bit XOR).
package ecc_pkg;

  localparam int unsigned DATA_W    = 16;  // data bits per memory word
  localparam int unsigned SYM_W     = 4;   // bits per MDMC symbol
  localparam int unsigned HAM_W     = 3;   // Hamming check bits per symbol
  localparam int unsigned FUEC_C    = 10;  // FUEC code bits C0..C9
  localparam int unsigned FUEC_N    = FUEC_C + DATA_W;  // 26-bit FUEC codeword
  localparam int unsigned MAX_BURST = 5;   // longest adjacent burst FUEC corrects

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [FUEC_C-1:0] fuec_code_t;
  typedef logic [FUEC_N-1:0] fuec_word_t;

  // Row i: which data bits X0..X15 enter code bit C_i (bit j set = X_j used).
  //   C0 = X0 X4 X5 X6 X7          C5 = X1 X6 X10 X13
  //   C1 = X1 X5 X9 X10 X14        C6 = X2 X7 X10 X11 X15
  //   C2 = X2 X6 X8 X11 X15        C7 = X3 X8 X12 X14
  //   C3 = X3 X7 X11 X12           C8 = X4 X9 X12 X13
  //   C4 = X5 X10 X13 X15          C9 = X4 X7 X10 X13 X15
  localparam data_t FUEC_ROW [FUEC_C] = '{
    16'h00F1, 16'h4622, 16'h8944, 16'h1888, 16'hA420,
    16'h2442, 16'h8C84, 16'h5108, 16'h3210, 16'hA490
  };

  // Syndrome contribution of a codeword error pattern (bit p of the pattern is
  // codeword position p: C0..C9 at 0..9, X0..X15 at 10..25). Used to build the
  // syndrome look-up table at elaboration time.
  function automatic fuec_code_t fuec_pattern_syndrome(fuec_word_t e);
    fuec_code_t s;
    for (int unsigned i = 0; i < FUEC_C; i++)
      s[i] = e[i] ^ (^(e[FUEC_N-1:FUEC_C] & FUEC_ROW[i]));
    return s;
  endfunction

  // Outcome of one protected read.
  typedef enum logic [1:0] {
    ST_CLEAN        = 2'd0,  // no code saw an error
    ST_BURST_FIXED  = 2'd1,  // FUEC corrected an adjacent burst
    ST_RANDOM_FIXED = 2'd2,  // MDMC corrected erroneous symbols
    ST_CHECK_ONLY   = 2'd3   // only check bits disagree; data passed unchanged
  } ecc_status_e;

endpackage
