// tb_fuec_encoder: exhaustive check of the 10 FUEC code bits over all 65536
// data words against the code equations written out term by term.
module tb_fuec_encoder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] x;
  logic [9:0]  c, exp_c;

  fuec_encoder dut (.x, .c);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      x = 16'(i);
      #1;
      exp_c[0] = x[0] ^ x[4] ^ x[5] ^ x[6] ^ x[7];
      exp_c[1] = x[1] ^ x[5] ^ x[9] ^ x[10] ^ x[14];
      exp_c[2] = x[2] ^ x[6] ^ x[8] ^ x[11] ^ x[15];
      exp_c[3] = x[3] ^ x[7] ^ x[11] ^ x[12];
      exp_c[4] = x[5] ^ x[10] ^ x[13] ^ x[15];
      exp_c[5] = x[1] ^ x[6] ^ x[10] ^ x[13];
      exp_c[6] = x[2] ^ x[7] ^ x[10] ^ x[11] ^ x[15];
      exp_c[7] = x[3] ^ x[8] ^ x[12] ^ x[14];
      exp_c[8] = x[4] ^ x[9] ^ x[12] ^ x[13];
      exp_c[9] = x[4] ^ x[7] ^ x[10] ^ x[13] ^ x[15];
      checks++;
      if (c !== exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h c=%b expected %b", x, c, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
