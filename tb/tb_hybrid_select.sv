// tb_hybrid_select: drives the merge unit with random decoder results and
// compares data and status with the selection rule:
//   no error seen                           -> received data, ST_CLEAN
//   FUEC burst whose data matches stored P  -> FUEC data,     ST_BURST_FIXED
//   else MDMC marked a symbol               -> MDMC data,     ST_RANDOM_FIXED
//   else                                    -> received data, ST_CHECK_ONLY
// Half of the FUEC candidates are made to match the stored horizontal bits.
module tb_hybrid_select;
  import ecc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  int rejected = 0;

  logic [15:0] data_r, fuec_data, mdmc_data, data_out;
  logic [11:0] h_r;
  logic        fuec_err, fuec_fixed, mdmc_err, burst_rejected;
  ecc_status_e status;

  hybrid_select dut (.data_r, .h_r, .fuec_err, .fuec_fixed, .fuec_data,
                     .mdmc_err, .mdmc_data, .data_out, .status, .burst_rejected);

  function automatic logic [2:0] ref_ham(logic [3:0] d);
    int pos [4] = '{3, 5, 6, 7};
    logic [2:0] p = '0;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 3; k++)
        if (d[i] && pos[i][k]) p[k] ^= 1'b1;
    return p;
  endfunction

  function automatic logic [11:0] ref_h(logic [15:0] x);
    logic [11:0] h;
    for (int s = 0; s < 4; s++) h[s*3 +: 3] = ref_ham(x[s*4 +: 4]);
    return h;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [15:0] exp_d;
      ecc_status_e exp_s;
      logic        exp_rej;
      data_r     = 16'($urandom);
      fuec_data  = 16'($urandom);
      mdmc_data  = 16'($urandom);
      fuec_err   = 1'($urandom);
      fuec_fixed = fuec_err & 1'($urandom);
      mdmc_err   = 1'($urandom);
      h_r        = $urandom_range(1) ? ref_h(fuec_data) : 12'($urandom);
      #1;
      exp_rej = fuec_fixed && (ref_h(fuec_data) != h_r);
      if (!fuec_err && !mdmc_err)        begin exp_d = data_r;    exp_s = ST_CLEAN;        end
      else if (fuec_fixed && !exp_rej)   begin exp_d = fuec_data; exp_s = ST_BURST_FIXED;  end
      else if (mdmc_err)                 begin exp_d = mdmc_data; exp_s = ST_RANDOM_FIXED; end
      else                               begin exp_d = data_r;    exp_s = ST_CHECK_ONLY;   end
      check("data", 32'(data_out), 32'(exp_d));
      check("status", 32'(status), 32'(exp_s));
      check("rejected", 32'(burst_rejected), 32'(exp_rej));
      seen[exp_s]++;
      if (exp_rej) rejected++;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL status %0d never produced", s); end
    end
    checks++;
    if (rejected == 0) begin failures++; $display("FAIL no burst rejected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
