// hamming_encoder: the three check bits of a Hamming (7,4) code for one 4-bit
// MDMC symbol. In the MDMC encoder one such unit sits on every symbol
// (D0-D3 -> P0-P2, ..., D12-D15 -> P9-P11); the decoder holds the same units
// to re-encode what it reads.
//
// Check equations (the classic layout with check bits at codeword positions
// 1, 2 and 4; the exact equations are this design's choice):
//   p[0] = d0 ^ d1 ^ d3,  p[1] = d0 ^ d2 ^ d3,  p[2] = d1 ^ d2 ^ d3
// Purely combinational, no clock.
module hamming_encoder (
  input  logic [3:0] d,  // symbol data bits
  output logic [2:0] p   // Hamming check bits
);
  always_comb begin
    p[0] = d[0] ^ d[1] ^ d[3];
    p[1] = d[0] ^ d[2] ^ d[3];
    p[2] = d[1] ^ d[2] ^ d[3];
  end
endmodule
