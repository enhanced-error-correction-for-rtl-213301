// fuec_decoder: syndrome decoding of the FUEC code with a syndrome-to-error
// look-up table, following the generic decoder chain
// received word -> syndrome calculation -> look-up table -> XOR correction.
//
// Syndrome: S_i = C_i xor (XOR of the data bits of row i), S0..S9.
// Look-up table: the correctable error set is every run of L adjacent flipped
// bits, L = 1..MAX_BURST (single errors and 2- to 5-bit adjacent bursts),
// anywhere in the 26-bit codeword ordered C0..C9, X0..X15. The syndrome of each
// run is computed from the matrix at elaboration time; the received syndrome is
// compared with all of them in parallel. The published matrix gives a few runs
// the same syndrome (C0 and X0 alone; X1 alone and the 5-bit run X11..X15;
// C2 alone and the run X0..X4; X4 alone and the run C8..X0). Where syndromes
// coincide the shorter run, then the one starting at the lower position, wins:
// shorter bursts are the more likely upsets. That tie rule is this design's.
// Outputs: the corrected word, the decoded error pattern (e_hat), a flag for a
// non-zero syndrome and one for a syndrome the table does not hold
// (detected, uncorrectable). Purely combinational.
module fuec_decoder
  import ecc_pkg::*;
#(
  parameter int unsigned BURST = MAX_BURST  // longest adjacent run corrected
) (
  input  fuec_code_t c_r,       // received code bits
  input  data_t      x_r,       // received data bits
  output data_t      x_c,       // corrected data bits
  output fuec_code_t c_c,       // corrected code bits
  output fuec_code_t syndrome,  // S0..S9
  output fuec_word_t e_hat,     // decoded error pattern, codeword order
  output logic [$clog2(BURST+1)-1:0] burst_len, // length of decoded run, 0 if none
  output logic       err,       // syndrome non-zero
  output logic       corrected, // syndrome found in the table
  output logic       uncorrectable // syndrome non-zero and not in the table
);
  localparam int unsigned LW = $clog2(BURST+1);

  // hit[l][p]: syndrome equals that of an (l+1)-bit run starting at position p
  logic [FUEC_N-1:0] hit [BURST];

  for (genvar l = 0; l < BURST; l++) begin : g_len
    for (genvar p = 0; p < FUEC_N; p++) begin : g_pos
      if (p + l < FUEC_N) begin : g_fit
        localparam fuec_word_t PAT = fuec_word_t'(((64'd1 << (l + 1)) - 64'd1) << p);
        localparam fuec_code_t SYN = fuec_pattern_syndrome(PAT);
        assign hit[l][p] = (syndrome == SYN);
      end else begin : g_nofit
        assign hit[l][p] = 1'b0;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < FUEC_C; i++)
      syndrome[i] = c_r[i] ^ (^(x_r & FUEC_ROW[i]));
    err = (syndrome != '0);
    // priority: scan longest-to-shortest and high-to-low so the last match,
    // which wins, is the shortest run at the lowest position
    e_hat     = '0;
    burst_len = '0;
    for (int l = int'(BURST) - 1; l >= 0; l--)
      for (int p = int'(FUEC_N) - 1; p >= 0; p--)
        if (err && hit[l][p]) begin
          e_hat     = fuec_word_t'(((64'd1 << (l + 1)) - 64'd1) << p);
          burst_len = LW'(l + 1);
        end
    corrected     = err && (burst_len != '0);
    uncorrectable = err && (burst_len == '0);
    c_c = c_r ^ e_hat[FUEC_C-1:0];
    x_c = x_r ^ e_hat[FUEC_N-1:FUEC_C];
  end
endmodule
