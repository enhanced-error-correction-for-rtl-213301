// tb_mdmc_encoder: checks the MDMC horizontal and vertical check bits for the
// default 1x4 symbol layout and for a 2x2 layout, on random data words.
// Reference: Hamming bits derived from codeword positions (data at positions
// 3,5,6,7; check bit k = XOR of the data positions whose index has bit k
// set), vertical bits as column XORs written directly for each layout.
module tb_mdmc_encoder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] data;
  logic [11:0] h_a, h_b;
  logic [15:0] v_a;
  logic [7:0]  v_b;

  mdmc_encoder                         dut_a (.data, .h(h_a), .v(v_a));
  mdmc_encoder #(.K1(2), .K2(2)) dut_b (.data, .h(h_b), .v(v_b));

  function automatic logic [2:0] ref_ham(logic [3:0] d);
    int pos [4] = '{3, 5, 6, 7};
    logic [2:0] p = '0;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 3; k++)
        if (d[i] && pos[i][k]) p[k] ^= 1'b1;
    return p;
  endfunction

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s data=%h got %h expected %h", what, data, got, exp);
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
    for (int n = 0; n < 5000; n++) begin
      logic [11:0] eh;
      data = (n < 16) ? 16'(1 << n) : 16'($urandom);
      #1;
      for (int s = 0; s < 4; s++) eh[s*3 +: 3] = ref_ham(data[s*4 +: 4]);
      check("h 1x4", 16'(h_a), 16'(eh));
      check("h 2x2", 16'(h_b), 16'(eh));
      check("v 1x4", v_a, data);
      check("v 2x2", 16'(v_b), 16'({data[7:4] ^ data[15:12], data[3:0] ^ data[11:8]}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
