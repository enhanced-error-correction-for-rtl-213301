// hybrid_ecc_memory: an SRAM word store protected at the same time by a
// random-error code (MDMC) and a burst-error code (FUEC).
//
// Write path: the 16-bit word goes through the MDMC encoder (12 horizontal
// Hamming bits, 16 vertical XOR bits at the default layout) and the FUEC
// encoder (10 code bits); data and all check bits are written together as one
// 54-bit row:  [15:0] data X0..X15, [25:16] FUEC C0..C9,
//              [37:26] MDMC horizontal P0..P11, [53:38] MDMC vertical V0..V15.
// Read path: the row is read, the error vector err_inj (captured with rd_en)
// is XORed onto it to model upsets in the cells, and the FUEC decoder and
// MDMC decoder work on it in parallel; hybrid_select picks the result.
//
// Timing: a write takes effect at the rising edge with wr_en high. A read
// issued with rd_en at edge t returns rd_data, rd_status and the syndromes
// with rd_valid high after edge t+1 (one cycle of latency, decoding is
// combinational behind the array's output register). One read and one write
// may be issued per cycle; reading the address being written returns the old
// word. rst_n (active low, synchronous) clears only rd_valid.
//
// The two codes, their check bits and the SRAM storage follow the published
// scheme; the row layout, the error-injection input, the merge rule, the
// depth and the timing are this design's own.
module hybrid_ecc_memory
  import ecc_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,  // address bits (256 words)
  parameter int unsigned K1     = 1,  // MDMC matrix rows
  parameter int unsigned K2     = 4,  // MDMC matrix columns
  localparam int unsigned H_W    = K1 * K2 * HAM_W,
  localparam int unsigned V_W    = K2 * SYM_W,
  localparam int unsigned WORD_W = DATA_W + FUEC_C + H_W + V_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,            // write request
  input  logic [ADDR_W-1:0] wr_addr,
  input  data_t             wr_data,
  input  logic              rd_en,            // read request
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [WORD_W-1:0] err_inj,          // bits to flip in the row read
  output logic              rd_valid,         // read result valid
  output data_t             rd_data,          // corrected data
  output ecc_status_e       rd_status,        // how it was obtained
  output fuec_code_t        rd_fuec_syndrome, // FUEC S0..S9
  output logic              rd_fuec_uncorr,   // FUEC syndrome not in its table
  output logic [K1*K2-1:0]  rd_sym_err,       // MDMC symbols marked erroneous
  output logic              rd_burst_rejected // FUEC guess overruled
);
  localparam int unsigned C_LO = DATA_W;
  localparam int unsigned H_LO = C_LO + FUEC_C;
  localparam int unsigned V_LO = H_LO + H_W;

  // ---------------- write path
  fuec_code_t       w_c;
  logic [H_W-1:0]   w_h;
  logic [V_W-1:0]   w_v;
  logic [WORD_W-1:0] w_row;

  fuec_encoder u_fuec_enc (.x(wr_data), .c(w_c));
  mdmc_encoder #(.DATA_W(DATA_W), .K1(K1), .K2(K2)) u_mdmc_enc (
    .data(wr_data), .h(w_h), .v(w_v)
  );
  assign w_row = {w_v, w_h, w_c, wr_data};

  // ---------------- storage
  logic [WORD_W-1:0] r_row, err_q, rx;

  ecc_sram #(.WIDTH(WORD_W), .DEPTH(2**ADDR_W)) u_sram (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(w_row),
    .re(rd_en), .raddr(rd_addr), .rdata(r_row)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
    if (rd_en)  err_q <= err_inj;
  end

  assign rx = r_row ^ err_q;  // received word r = b xor e

  // ---------------- read path
  data_t          f_x;
  fuec_code_t     f_c_unused;
  fuec_word_t     f_e_unused;
  logic [$clog2(MAX_BURST+1)-1:0] f_len_unused;
  logic           f_err, f_fix;
  data_t          m_data;
  logic [H_W-1:0] m_hsyn_unused;
  logic [V_W-1:0] m_vsyn_unused;
  logic           m_err;

  fuec_decoder u_fuec_dec (
    .c_r(rx[C_LO +: FUEC_C]), .x_r(rx[0 +: DATA_W]),
    .x_c(f_x), .c_c(f_c_unused), .syndrome(rd_fuec_syndrome), .e_hat(f_e_unused),
    .burst_len(f_len_unused), .err(f_err), .corrected(f_fix),
    .uncorrectable(rd_fuec_uncorr)
  );

  mdmc_decoder #(.DATA_W(DATA_W), .K1(K1), .K2(K2)) u_mdmc_dec (
    .data_r(rx[0 +: DATA_W]), .h_r(rx[H_LO +: H_W]), .v_r(rx[V_LO +: V_W]),
    .data_c(m_data), .h_syn(m_hsyn_unused), .v_syn(m_vsyn_unused),
    .sym_err(rd_sym_err), .err(m_err)
  );

  hybrid_select #(.DATA_W(DATA_W), .K1(K1), .K2(K2)) u_select (
    .data_r(rx[0 +: DATA_W]), .h_r(rx[H_LO +: H_W]),
    .fuec_err(f_err), .fuec_fixed(f_fix), .fuec_data(f_x),
    .mdmc_err(m_err), .mdmc_data(m_data),
    .data_out(rd_data), .status(rd_status), .burst_rejected(rd_burst_rejected)
  );

  // a read request always yields exactly one valid result on the next cycle
  a_rd_latency: assert property (@(posedge clk) disable iff (!rst_n)
                                 rd_en |=> rd_valid);
  a_no_spurious: assert property (@(posedge clk) disable iff (!rst_n)
                                  !rd_en |=> !rd_valid);
endmodule
