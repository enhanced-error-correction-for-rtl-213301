// tb_mdmc_decoder: checks detection, location and correction of the MDMC
// decoder for the default 1x4 layout and a 2x2 layout.
//  * clean words: no symbol marked, data unchanged;
//  * every single data-bit error: the right symbol marked, the horizontal
//    syndrome equals (recomputed - stored) mod 8, the word corrected;
//  * 1x4: any error pattern confined to data bits whose flipped bits change
//    every hit symbol's Hamming bits is fully corrected;
//  * 2x2: one erroneous symbol per column is corrected;
//  * errors only in the horizontal bits, or only in the vertical bits,
//    never alter the data.
module tb_mdmc_decoder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] d_a, dc_a, d_b, dc_b;
  logic [11:0] h_a, hs_a, h_b, hs_b;
  logic [15:0] v_a, vs_a;
  logic [7:0]  v_b, vs_b;
  logic [3:0]  se_a, se_b;
  logic        err_a, err_b;

  mdmc_decoder dut_a (.data_r(d_a), .h_r(h_a), .v_r(v_a), .data_c(dc_a),
                      .h_syn(hs_a), .v_syn(vs_a), .sym_err(se_a), .err(err_a));
  mdmc_decoder #(.K1(2), .K2(2)) dut_b (.data_r(d_b), .h_r(h_b), .v_r(v_b),
                      .data_c(dc_b), .h_syn(hs_b), .v_syn(vs_b), .sym_err(se_b),
                      .err(err_b));

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

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
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
    logic [15:0] x, e;
    logic [11:0] eh;
    for (int n = 0; n < 300; n++) begin
      x = 16'($urandom);
      // stored check bits of the clean word
      h_a = ref_h(x);  v_a = x;
      h_b = ref_h(x);  v_b = {x[7:4] ^ x[15:12], x[3:0] ^ x[11:8]};
      // clean
      d_a = x; d_b = x; #1;
      check("clean 1x4 data", dc_a, x);  check("clean 1x4 err", 16'(err_a), 0);
      check("clean 2x2 data", dc_b, x);  check("clean 2x2 err", 16'(err_b), 0);
      // single data-bit errors
      for (int b = 0; b < 16; b++) begin
        e = 16'(1) << b;
        d_a = x ^ e; d_b = x ^ e; #1;
        eh = ref_h(x ^ e);
        check("single 1x4 data", dc_a, x);
        check("single 2x2 data", dc_b, x);
        check("single sym_err", 16'(se_a), 16'(1 << (b / 4)));
        check("single h_syn", 16'(hs_a[(b/4)*3 +: 3]),
              16'(3'(eh[(b/4)*3 +: 3] - h_a[(b/4)*3 +: 3])));
        check("single v_syn", vs_a, e);
      end
      // 1x4: random multi-bit data errors that every hit symbol's Hamming sees
      for (int k = 0; k < 20; k++) begin
        automatic bit seen = 1'b1;
        e = 16'($urandom);
        for (int s = 0; s < 4; s++)
          if (e[s*4 +: 4] != 0 && ref_ham(e[s*4 +: 4]) == 0) seen = 1'b0;
        d_a = x ^ e; #1;
        if (seen) check("multi 1x4 data", dc_a, x);
      end
      // 2x2: one erroneous symbol in each column
      begin
        automatic int r0 = $urandom_range(1), r1 = $urandom_range(1);
        automatic logic [3:0] e0 = 4'($urandom_range(15, 1)), e1 = 4'($urandom_range(15, 1));
        e = '0;
        e[(r0*2 + 0)*4 +: 4] = e0;
        e[(r1*2 + 1)*4 +: 4] = e1;
        d_b = x ^ e; #1;
        if (ref_ham(e0) != 0 && ref_ham(e1) != 0) check("column 2x2 data", dc_b, x);
      end
      // check-bit errors alone leave the data untouched
      // (horizontal bits alone, then vertical bits alone)
      d_a = x; d_b = x;
      h_a = ref_h(x) ^ 12'($urandom); h_b = ref_h(x) ^ 12'($urandom);
      #1;
      check("h-only 1x4 data", dc_a, x);
      check("h-only 2x2 data", dc_b, x);
      h_a = ref_h(x); h_b = ref_h(x);
      v_a = x ^ 16'($urandom); v_b = v_b ^ 8'($urandom);
      #1;
      check("v-only 1x4 data", dc_a, x);
      check("v-only 2x2 data", dc_b, x);
      check("v-only 1x4 err", 16'(err_a), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
