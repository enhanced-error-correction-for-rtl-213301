// tb_fuec_decoder: checks the FUEC syndrome look-up decoder.
// The testbench builds its own table from the code equations written out term
// by term: for each run of L = 1..5 adjacent flipped bits in the codeword
// C0..C9, X0..X15 it computes the syndrome, and for a syndrome shared by
// several runs it keeps the shortest, then the lowest-starting one.
//  * clean codewords: syndrome zero, nothing corrected;
//  * every run of 1..5 bits at every position, on random data: syndrome,
//    decoded pattern, burst length and corrected word must match the table;
//    runs whose syndrome is not shared must be corrected exactly;
//  * random multi-bit patterns: the corrected/uncorrectable flags must agree
//    with table membership.
module tb_fuec_decoder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  c_r, c_c, syn;
  logic [15:0] x_r, x_c;
  logic [25:0] e_hat;
  logic [2:0]  blen;
  logic        err, fixed, uncorr;

  fuec_decoder dut (.c_r, .x_r, .x_c, .c_c, .syndrome(syn), .e_hat,
                    .burst_len(blen), .err, .corrected(fixed),
                    .uncorrectable(uncorr));

  function automatic logic [9:0] ref_enc(logic [15:0] x);
    logic [9:0] c;
    c[0] = x[0] ^ x[4] ^ x[5] ^ x[6] ^ x[7];
    c[1] = x[1] ^ x[5] ^ x[9] ^ x[10] ^ x[14];
    c[2] = x[2] ^ x[6] ^ x[8] ^ x[11] ^ x[15];
    c[3] = x[3] ^ x[7] ^ x[11] ^ x[12];
    c[4] = x[5] ^ x[10] ^ x[13] ^ x[15];
    c[5] = x[1] ^ x[6] ^ x[10] ^ x[13];
    c[6] = x[2] ^ x[7] ^ x[10] ^ x[11] ^ x[15];
    c[7] = x[3] ^ x[8] ^ x[12] ^ x[14];
    c[8] = x[4] ^ x[9] ^ x[12] ^ x[13];
    c[9] = x[4] ^ x[7] ^ x[10] ^ x[13] ^ x[15];
    return c;
  endfunction

  function automatic logic [9:0] ref_syn(logic [25:0] w);
    return w[9:0] ^ ref_enc(w[25:10]);
  endfunction

  // table: syndrome -> chosen run (pattern and length)
  logic [25:0] tab_pat [1024];
  int          tab_len [1024];

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
    int shared [1024];
    int collided = 0;
    for (int s = 0; s < 1024; s++) begin tab_len[s] = 0; tab_pat[s] = '0; shared[s] = 0; end
    for (int l = 1; l <= 5; l++)
      for (int p = 0; p + l <= 26; p++) begin
        automatic logic [25:0] pat = 26'(((1 << l) - 1) << p);
        automatic int s = int'(ref_syn(pat));
        shared[s]++;
        if (tab_len[s] == 0) begin tab_len[s] = l; tab_pat[s] = pat; end
      end
    for (int s = 0; s < 1024; s++) if (shared[s] > 1) collided++;
    $display("syndromes shared by several runs: %0d", collided);

    for (int n = 0; n < 40; n++) begin
      automatic logic [15:0] x = 16'($urandom);
      automatic logic [25:0] cw = {x, ref_enc(x)};
      {x_r, c_r} = cw; #1;
      check("clean syndrome", 32'(syn), 0);
      check("clean flags", {err, fixed, uncorr}, 0);
      check("clean data", 32'(x_c), 32'(x));
      for (int l = 1; l <= 5; l++)
        for (int p = 0; p + l <= 26; p++) begin
          automatic logic [25:0] pat = 26'(((1 << l) - 1) << p);
          automatic int s = int'(ref_syn(pat));
          {x_r, c_r} = cw ^ pat; #1;
          check("syndrome", 32'(syn), 32'(s));
          check("e_hat", 32'(e_hat), 32'(tab_pat[s]));
          check("burst_len", 32'(blen), 32'(tab_len[s]));
          check("flags", {err, fixed, uncorr}, 3'b110);
          check("corrected word", 32'({x_c, c_c}), 32'(cw ^ pat ^ tab_pat[s]));
          if (shared[s] == 1) check("exact correction", 32'({x_c, c_c}), 32'(cw));
        end
      for (int k = 0; k < 50; k++) begin
        automatic logic [25:0] pat = 26'($urandom);
        automatic int s = int'(ref_syn(pat));
        {x_r, c_r} = cw ^ pat; #1;
        check("random flags", {err, fixed, uncorr},
              (s == 0) ? 3'b000 : (tab_len[s] != 0) ? 3'b110 : 3'b101);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
