// Testbench for mult_core. Normal mode: all 65536 operand pairs, the product must
// appear two core clocks later (the two BILBO registers). Scan mode: a
// pattern shifted through the 43-bit chain G1 -> G2 comes out 43 clocks
// later. BFT and BST codes: the registers' next states are compared with a
// testbench model of the TPG / MISR equations and the multiplier slices
// (with the segmentation cuts active). Hold: nothing changes.
module tb_mult_core;
  logic core_clk = 0, rst_n = 1, b1_bilbo = 0, b2_bilbo = 0, hold_bilbo = 0, bist_inst_enable = 0;
  logic c1_gen = 0, c3_obs, scan_in = 0, scan_out;
  logic [7:0] a = 0, b = 0;
  logic [15:0] p;
  int checks = 0, failures = 0;
  logic [17:0] g1;
  logic [24:0] g2;

  mult_core dut (.*);

  always #5 core_clk = ~core_clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  assign g1 = dut.u_g1.q;
  assign g2 = dut.u_g2.q;

  // model of the blocks with the cuts open: the cut carries take the patterns
  function automatic logic [24:0] c1_word(logic [7:0] x, logic [7:0] y, logic cut_en, logic pat);
    logic [11:0] lo, hi; logic [6:0] l6; logic c;
    l6 = 7'(x * y[1:0]) % 64 + 7'((x * y[3:2]) % 16) * 4;
    c  = cut_en ? pat : l6[6];
    lo = 12'((x * y[1:0]) / 64 + (x * y[3:2]) / 16 + c) * 64 + 12'(l6[5:0]);
    hi = 12'(x * y[7:4]);
    return {l6[6], hi, lo};
  endfunction
  function automatic logic [17:0] c2_word(logic [24:0] g, logic cut_en);
    logic [4:0] sl, sh; logic c;
    sl = 5'(g[7:4]) + 5'(g[15:12]);
    c  = cut_en ? g[24] : sl[4];
    sh = 5'(g[11:8]) + 5'(g[19:16]) + 5'(c);
    return {sl[4], g[23:20], sh, sl[3:0], g[3:0]};
  endfunction
  function automatic logic [15:0] c3_word(logic [17:0] g, logic cut_en);
    logic c;
    c = cut_en ? g[17] : g[12];
    return {g[16:13] + 4'(c), g[11:0]};
  endfunction
  function automatic logic [17:0] lfsr18(logic [17:0] x);  // x^18 + x^11 + 1
    return {x[16:0], x[17] ^ x[10]};
  endfunction
  function automatic logic [24:0] lfsr25(logic [24:0] x);  // x^25 + x^22 + 1
    return {x[23:0], x[24] ^ x[21]};
  endfunction

  initial begin
    logic [15:0] expq [$];
    logic [42:0] pat;
    logic [17:0] e1; logic [24:0] e2;
    #1 rst_n = 0; #1 rst_n = 1;
    // normal mode
    for (int k = 0; k < 65536 + 6; k++) begin
      @(negedge core_clk);
      if (k >= 2) begin
        checks++;
        if (p !== expq[0]) begin failures++; $display("FAIL %0d: p %0d exp %0d", k, p, expq[0]); end
        void'(expq.pop_front());
      end
      {a, b} = 16'(k - 4);
      if (k < 4 || k >= 65536 + 4) begin a = 8'hFF; b = 8'hFF; end
      expq.push_back(16'(a * b));
    end
    // scan: shift a random 43-bit pattern through and out
    b1_bilbo = 1; b2_bilbo = 1;
    pat = {11'($urandom), 32'($urandom)};
    for (int i = 0; i < 86; i++) begin
      @(negedge core_clk);
      if (i >= 43) begin checks++; if (scan_out !== pat[i-43]) failures++; end
      scan_in = (i < 43) ? pat[i] : 1'b0;
    end
    // BFT: G1 (group 1) TPG, G2 MISR; cuts active
    bist_inst_enable = 1;
    for (int s = 0; s < 2; s++) begin
      b1_bilbo = (s == 0); b2_bilbo = (s == 1);
      for (int k = 0; k < 100; k++) begin
        @(negedge core_clk);
        a = 8'($urandom); b = 8'($urandom); c1_gen = 1'($urandom);
        #1;
        checks++;
        if (c3_obs !== g1[12] || p !== c3_word(g1, 1)) failures++;
        if (s == 0) begin e1 = lfsr18(g1); e2 = lfsr25(g2) ^ c1_word(a, b, 1, c1_gen); end
        else        begin e1 = lfsr18(g1) ^ c2_word(g2, 1); e2 = lfsr25(g2); end
        @(negedge core_clk);
        checks++;
        if (g1 !== e1 || g2 !== e2) begin failures++; $display("FAIL session %0d: g1 %h/%h g2 %h/%h", s, g1, e1, g2, e2); end
      end
    end
    // hold
    hold_bilbo = 1; e1 = g1; e2 = g2;
    repeat (5) @(negedge core_clk);
    checks++; if (g1 !== e1 || g2 !== e2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
