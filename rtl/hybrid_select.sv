// hybrid_select: merges the burst (FUEC) and random (MDMC) decoder results
// into one corrected word.
//
// Both decoders look at the same received word in parallel. Selection rule:
//  1. Neither code sees an error: the received data is passed on (ST_CLEAN).
//  2. FUEC decoded an adjacent burst and its corrected data re-encodes to the
//     stored MDMC horizontal check bits: the FUEC result is taken
//     (ST_BURST_FIXED). The cross-check rejects a burst guess that is really a
//     random error pattern aliasing onto a burst syndrome.
//  3. Otherwise, if MDMC marked erroneous symbols: the MDMC result is taken
//     (ST_RANDOM_FIXED).
//  4. Otherwise only check bits disagree: the received data is passed on
//     (ST_CHECK_ONLY).
// That the two codes run side by side, FUEC for bursts and MDMC for random
// errors, follows the published scheme; how their results are merged is not
// specified there, and this rule is this design's own. Combinational.
module hybrid_select #(
  parameter int unsigned DATA_W = 16,  // data bits
  parameter int unsigned K1     = 1,   // MDMC matrix rows
  parameter int unsigned K2     = 4    // MDMC matrix columns
) (
  input  logic [DATA_W-1:0]         data_r,      // received data
  input  logic [K1*K2*ecc_pkg::HAM_W-1:0]    h_r,         // stored MDMC horizontal bits
  input  logic                      fuec_err,    // FUEC syndrome non-zero
  input  logic                      fuec_fixed,  // FUEC syndrome in its table
  input  logic [DATA_W-1:0]         fuec_data,   // FUEC-corrected data
  input  logic                      mdmc_err,    // MDMC marked a symbol
  input  logic [DATA_W-1:0]         mdmc_data,   // MDMC-corrected data
  output logic [DATA_W-1:0]         data_out,    // merged result
  output ecc_pkg::ecc_status_e               status,      // which path produced it
  output logic                      burst_rejected // FUEC guess failed the cross-check
);
  logic [K1*K2*ecc_pkg::HAM_W-1:0] h_fuec;
  logic [K2*ecc_pkg::SYM_W-1:0]    v_unused;

  mdmc_encoder #(.DATA_W(DATA_W), .K1(K1), .K2(K2)) u_check (
    .data(fuec_data), .h(h_fuec), .v(v_unused)
  );

  always_comb begin
    burst_rejected = fuec_fixed && (h_fuec != h_r);
    if (!fuec_err && !mdmc_err) begin
      data_out = data_r;
      status   = ecc_pkg::ST_CLEAN;
    end else if (fuec_fixed && !burst_rejected) begin
      data_out = fuec_data;
      status   = ecc_pkg::ST_BURST_FIXED;
    end else if (mdmc_err) begin
      data_out = mdmc_data;
      status   = ecc_pkg::ST_RANDOM_FIXED;
    end else begin
      data_out = data_r;
      status   = ecc_pkg::ST_CHECK_ONLY;
    end
  end
endmodule
