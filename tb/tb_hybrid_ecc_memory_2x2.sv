// tb_hybrid_ecc_memory_2x2: the end-to-end test of tb_hybrid_ecc_memory run on
// the memory built with a 2x2 MDMC symbol matrix (8 vertical bits, 46-bit
// rows) instead of the default 1x4 layout. Same phases: clean fill and
// read-back, single upsets in all 46 row bits, every adjacent run of 1..8 data
// bits, every non-zero data error pattern by weight, check-bit-only upsets and
// read-during-write. Runs up to 4 adjacent bits and all single errors must be
// corrected; rates of the rest are printed for comparison with the 1x4 layout.
module tb_hybrid_ecc_memory_2x2;
  import ecc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 1'b0;
  logic        wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0]  wr_addr = '0, rd_addr = '0;
  data_t       wr_data = '0;
  logic [45:0] err_inj = '0;
  logic        rd_valid, rd_fuec_uncorr, rd_burst_rejected;
  data_t       rd_data;
  ecc_status_e rd_status;
  fuec_code_t  rd_fuec_syndrome;
  logic [3:0]  rd_sym_err;

  hybrid_ecc_memory #(.K1(2), .K2(2)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr,
                         .err_inj, .rd_valid, .rd_data, .rd_status, .rd_fuec_syndrome,
                         .rd_fuec_uncorr, .rd_sym_err, .rd_burst_rejected);

  data_t model [256];
  int n_status [4] = '{0, 0, 0, 0};
  int n_rejected = 0, n_uncorr = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(logic [7:0] a, data_t d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = a; wr_data = d;
    model[a] = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  // one read with an error vector; returns corrected data, checks latency
  task automatic read(logic [7:0] a, logic [45:0] e, output data_t d);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = a; err_inj = e;
    check("rd_valid low before result", 32'(rd_valid), 0);
    @(negedge clk);
    rd_en = 1'b0; err_inj = '0;
    check("rd_valid one cycle after rd_en", 32'(rd_valid), 1);
    d = rd_data;
    n_status[rd_status]++;
    if (rd_burst_rejected) n_rejected++;
    if (rd_fuec_uncorr) n_uncorr++;
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d;
    int ok_adj [9], n_adj [9], ok_rnd [17], n_rnd [17];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. fill and clean read-back
    for (int a = 0; a < 256; a++) write(8'(a), data_t'($urandom));
    for (int a = 0; a < 256; a++) begin
      read(8'(a), '0, d);
      check("clean data", 32'(d), 32'(model[a]));
      check("clean status", 32'(rd_status), 32'(ST_CLEAN));
    end

    // 2. single upsets anywhere in the stored row
    for (int b = 0; b < 46; b++) begin
      automatic logic [7:0] a = 8'($urandom);
      read(a, 46'(1) << b, d);
      check("single upset corrected", 32'(d), 32'(model[a]));
    end

    // 3. adjacent errors in the data bits
    for (int l = 1; l <= 8; l++) begin
      ok_adj[l] = 0; n_adj[l] = 0;
      for (int p = 0; p + l <= 16; p++) begin
        automatic logic [7:0] a = 8'($urandom);
        automatic logic [45:0] e = 46'(((1 << l) - 1) << p);
        read(a, e, d);
        n_adj[l]++;
        if (d == model[a]) ok_adj[l]++;
        if (l <= 4) check("adjacent run corrected", 32'(d), 32'(model[a]));
      end
      $display("adjacent %0d-bit errors: %0d of %0d corrected (%0d.%02d%%)", l, ok_adj[l],
               n_adj[l], ok_adj[l] * 100 / n_adj[l], (ok_adj[l] * 10000 / n_adj[l]) % 100);
    end

    // 4. random errors: every non-zero pattern over the data bits
    for (int w = 0; w <= 16; w++) begin ok_rnd[w] = 0; n_rnd[w] = 0; end
    for (int e = 1; e < 65536; e++) begin
      automatic int w = $countones(16'(e));
      automatic logic [7:0] a = 8'($urandom);
      read(a, 46'(e), d);
      n_rnd[w]++;
      if (d == model[a]) ok_rnd[w]++;
      if (w <= 1) check("random error corrected", 32'(d), 32'(model[a]));
    end
    for (int w = 1; w <= 8; w++)
      $display("random %0d-bit errors: %0d of %0d corrected (%0d.%02d%%)", w, ok_rnd[w],
               n_rnd[w], ok_rnd[w] * 100 / n_rnd[w], (ok_rnd[w] * 10000 / n_rnd[w]) % 100);

    // 5. upsets confined to FUEC code bits
    for (int i = 0; i < 10; i++)
      for (int j = i + 1; j < 10; j++) begin
        automatic logic [7:0] a = 8'($urandom);
        read(a, (46'(1) << (16 + i)) | (46'(1) << (16 + j)), d);
        check("check-bit upset leaves data", 32'(d), 32'(model[a]));
      end

    // 6. read and write of one address in the same cycle
    begin
      automatic data_t old = model[8'd77];
      automatic data_t nw  = ~old;
      @(negedge clk);
      rd_en = 1'b1; rd_addr = 8'd77; wr_en = 1'b1; wr_addr = 8'd77; wr_data = nw;
      @(negedge clk);
      rd_en = 1'b0; wr_en = 1'b0;
      check("read-during-write returns old word", 32'(rd_data), 32'(old));
      model[8'd77] = nw;
      read(8'd77, '0, d);
      check("new word stored", 32'(d), 32'(nw));
    end

    // every mechanism must have happened
    $display("outcomes: clean=%0d burst_fixed=%0d random_fixed=%0d check_only=%0d rejected_bursts=%0d fuec_uncorrectable=%0d",
             n_status[ST_CLEAN], n_status[ST_BURST_FIXED], n_status[ST_RANDOM_FIXED],
             n_status[ST_CHECK_ONLY], n_rejected, n_uncorr);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_status[s] == 0) begin failures++; $display("FAIL outcome %0d never seen", s); end
    end
    checks += 2;
    if (n_rejected == 0) begin failures++; $display("FAIL no burst guess rejected"); end
    if (n_uncorr == 0)   begin failures++; $display("FAIL no uncorrectable syndrome"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
