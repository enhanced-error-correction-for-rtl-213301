// tb_hamming_encoder: exhaustive check of the (7,4) Hamming check bits.
// For each of the 16 symbols the 7-bit codeword is assembled in the classic
// position order (1:p0 2:p1 3:d0 4:p2 5:d1 6:d2 7:d3) and must have a zero
// position-syndrome; all codewords must also lie at distance >= 3 from each
// other (single-error correcting).
module tb_hamming_encoder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] d;
  logic [2:0] p;
  logic [7:1] cw [16];

  hamming_encoder dut (.d, .p);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [2:0] s;
      d = 4'(i);
      #1;
      cw[i] = {d[3], d[2], d[1], p[2], d[0], p[1], p[0]};
      s = '0;
      for (int pos = 1; pos <= 7; pos++)
        if (cw[i][pos]) s ^= 3'(pos);
      checks++;
      if (s != 0) begin
        failures++;
        $display("FAIL d=%h p=%b position syndrome %0d", d, p, s);
      end
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
        checks++;
        if ($countones(cw[i] ^ cw[j]) < 3) begin
          failures++;
          $display("FAIL distance %0d..%0d below 3", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
