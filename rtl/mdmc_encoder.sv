// mdmc_encoder: check bits of the modified decimal matrix code (MDMC).
//
// The DATA_W-bit word is cut into K = K1*K2 symbols of 4 bits (symbol i is
// data[4i+3:4i]) and the symbols are laid out as a K1-row by K2-column matrix,
// symbol i at row i / K2, column i % K2.
//  * Horizontal check bits: a Hamming encoder on every symbol gives 3 bits,
//    h[3i+2:3i] for symbol i (K*3 bits, P0..P11 for the default word).
//  * Vertical check bits: bit b of matrix column c is the XOR of bit b of the
//    symbols of column c over all rows, v[4c+b] (K2*4 bits, V0..V15).
// The split into 4-bit symbols, the per-symbol Hamming encoders and the XOR
// column bits follow the code as published; the Hamming equations, the
// symbol-to-matrix placement and the default K1=1, K2=4 (the only layout of a
// 16-bit word that yields 12 horizontal and 16 vertical bits) are choices of
// this design. With one row (the default) each column holds a single symbol,
// so the vertical bits are plain copies of the data bits and the scheme acts
// as duplication checked by Hamming bits; with K1 > 1 they are true column
// parities. Purely combinational.
module mdmc_encoder #(
  parameter int unsigned DATA_W = 16,  // data bits
  parameter int unsigned K1     = 1,   // matrix rows of symbols
  parameter int unsigned K2     = 4    // matrix columns of symbols
) (
  input  logic [DATA_W-1:0]            data,  // word to protect
  output logic [K1*K2*ecc_pkg::HAM_W-1:0] h,  // horizontal check bits
  output logic [K2*ecc_pkg::SYM_W-1:0]    v   // vertical check bits
);
  localparam int unsigned SW = ecc_pkg::SYM_W;
  localparam int unsigned HW = ecc_pkg::HAM_W;
  localparam int unsigned K  = K1 * K2;

  if (DATA_W != K * SW) begin : g_bad_size
    $error("mdmc_encoder: DATA_W must equal K1*K2*4");
  end

  for (genvar i = 0; i < K; i++) begin : g_sym
    hamming_encoder u_ham (.d(data[i*SW +: SW]), .p(h[i*HW +: HW]));
  end

  always_comb begin
    v = '0;
    for (int unsigned r = 0; r < K1; r++)
      for (int unsigned c = 0; c < K2; c++)
        v[c*SW +: SW] ^= data[(r*K2 + c)*SW +: SW];
  end
endmodule
