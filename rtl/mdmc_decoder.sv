// mdmc_decoder: error detection and correction for the modified decimal
// matrix code.
//
// Three stages, all combinational:
//  1. Syndrome calculator. An internal mdmc_encoder re-encodes the received
//     data. For each symbol the horizontal syndrome is the 3-bit check value
//     recomputed minus the one stored, taken as an unsigned integer (modulo 8);
//     the vertical syndrome is recomputed XOR stored vertical bits.
//  2. Error locator. A symbol whose horizontal syndrome is non-zero is marked
//     erroneous (sym_err).
//  3. Error corrector. Every marked symbol is XORed with the vertical syndrome
//     of its matrix column, which names the flipped bit positions.
// The integer subtraction for the horizontal syndrome, the XOR vertical
// syndrome and the three stages follow the published decoder; the rule that a
// marked symbol takes its column's vertical syndrome is the standard
// decimal-matrix correction and this design's reading of it.
// Limits: two marked symbols in one column, or an error in a symbol's data
// that leaves its Hamming bits unchanged (e.g. bits 0, 1 and 2 of a symbol),
// are not corrected.
module mdmc_decoder #(
  parameter int unsigned DATA_W = 16,  // data bits
  parameter int unsigned K1     = 1,   // matrix rows of symbols
  parameter int unsigned K2     = 4    // matrix columns of symbols
) (
  input  logic [DATA_W-1:0]                data_r,  // received data
  input  logic [K1*K2*ecc_pkg::HAM_W-1:0]  h_r,     // stored horizontal bits
  input  logic [K2*ecc_pkg::SYM_W-1:0]     v_r,     // stored vertical bits
  output logic [DATA_W-1:0]                data_c,  // corrected data
  output logic [K1*K2*ecc_pkg::HAM_W-1:0]  h_syn,   // horizontal syndromes
  output logic [K2*ecc_pkg::SYM_W-1:0]     v_syn,   // vertical syndrome
  output logic [K1*K2-1:0]                 sym_err, // symbol marked erroneous
  output logic                             err      // any symbol marked
);
  localparam int unsigned SW = ecc_pkg::SYM_W;
  localparam int unsigned HW = ecc_pkg::HAM_W;
  localparam int unsigned K  = K1 * K2;

  logic [K*HW-1:0] h_new;
  logic [K2*SW-1:0] v_new;

  mdmc_encoder #(.DATA_W(DATA_W), .K1(K1), .K2(K2)) u_reenc (
    .data(data_r), .h(h_new), .v(v_new)
  );

  always_comb begin
    v_syn = v_new ^ v_r;
    for (int unsigned i = 0; i < K; i++) begin
      h_syn[i*HW +: HW] = h_new[i*HW +: HW] - h_r[i*HW +: HW];
      sym_err[i]        = (h_syn[i*HW +: HW] != '0);
    end
    err = |sym_err;
    data_c = data_r;
    for (int unsigned r = 0; r < K1; r++)
      for (int unsigned c = 0; c < K2; c++)
        if (sym_err[r*K2 + c])
          data_c[(r*K2 + c)*SW +: SW] = data_r[(r*K2 + c)*SW +: SW] ^ v_syn[c*SW +: SW];
  end
endmodule
