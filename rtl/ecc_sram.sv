// ecc_sram: the memory array that holds each protected word, data and check
// bits side by side. One write port and one read port, both synchronous to
// clk. A write stores wdata at waddr on the rising edge where we is high. A
// read is registered: rdata shows the word at raddr on the cycle after re was
// high and holds its value while re is low. Like an SRAM macro, the array is
// not reset. Written as a plain array so synthesis can map it onto an SRAM.
// Depth and port structure are this design's choice; the scheme only states
// that the coded word is kept in SRAM.
module ecc_sram #(
  parameter int unsigned WIDTH = 54,   // bits per stored word
  parameter int unsigned DEPTH = 256   // words
) (
  input  logic                     clk,
  input  logic                     we,     // write enable
  input  logic [$clog2(DEPTH)-1:0] waddr,  // write address
  input  logic [WIDTH-1:0]         wdata,  // word to store
  input  logic                     re,     // read enable
  input  logic [$clog2(DEPTH)-1:0] raddr,  // read address
  output logic [WIDTH-1:0]         rdata   // word read, one cycle after re
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
