// tb_ecc_sram: writes random words to every address of a 54 x 256 array and
// reads them back in random order, checking the one-cycle read latency, that
// rdata holds while re is low, and that a read of an address being written in
// the same cycle returns the old word.
module tb_ecc_sram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we = 1'b0, re = 1'b0;
  logic [7:0]  waddr = '0, raddr = '0;
  logic [53:0] wdata = '0, rdata;
  logic [53:0] model [256];
  logic [53:0] exp;

  ecc_sram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  task automatic check(string what, logic [53:0] got, logic [53:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(a); wdata = {22'($urandom), 32'($urandom)};
      model[a] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      automatic logic [7:0] a = 8'($urandom);
      @(negedge clk);
      re = 1'b1; raddr = a;
      // sometimes write the same address in the same cycle
      if (n % 7 == 0) begin
        we = 1'b1; waddr = a; wdata = {22'($urandom), 32'($urandom)};
      end
      @(negedge clk);
      check("read after one cycle", rdata, model[a]);
      exp = model[a];
      if (we) begin model[a] = wdata; we = 1'b0; end
      re = 1'b0;
      raddr = ~a;
      @(negedge clk);
      check("hold while re low", rdata, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
