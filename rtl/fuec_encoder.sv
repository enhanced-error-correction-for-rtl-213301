// fuec_encoder: the 10 code bits C0..C9 of the flexible unequal error control
// (FUEC) code for a 16-bit data word X0..X15.
//
// Each code bit is the XOR of the data bits listed in ecc_pkg::FUEC_ROW, which
// holds the code's defining equations exactly as published (e.g.
// C0 = X0^X4^X5^X6^X7). The stored FUEC codeword is {C0..C9, X0..X15}.
// Purely combinational.
module fuec_encoder
  import ecc_pkg::*;
(
  input  data_t      x,  // data bits X0..X15
  output fuec_code_t c   // code bits C0..C9
);
  always_comb
    for (int unsigned i = 0; i < FUEC_C; i++)
      c[i] = ^(x & FUEC_ROW[i]);
endmodule
