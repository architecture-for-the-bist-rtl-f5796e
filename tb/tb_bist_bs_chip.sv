// End-to-end testbench of bist_bs_chip at its default sizes, driven only
// through the chip pins and the test access port. The chip clock is tied to
// TCK, which a self test needs (see the top's header).
//
// 1. Normal operation in Test-Logic-Reset: products through the pins, two
//    clocks of latency.
// 2. IR capture value and BYPASS (one-bit delay TDI -> TDO).
// 3. SAMPLE/PRELOAD: captured pin and core values, then a preload.
// 4. EXTEST: the output pins show the preloaded values.
// 5. INTEST: operands preloaded into the input cells reach the core, run
//    in Run-Test/Idle, and the captured product is checked.
// 6. The two-session self test in the order the document prescribes
//    (PRELOAD seed, BFT, read G2, BIST-BSR read of the BSR signature, BST,
//    read G1). The signatures are compared with a model of the LFSRs, MISRs
//    and multiplier slices kept in this testbench; the output pins must keep
//    their safe values throughout.
// 7. BIST-BSR on its own: seed applied at Update-DR, K cycles in
//    Run-Test/Idle with the core pipeline running, signature read and
//    compared with the model.
// Each mechanism is counted and must occur at least once.
module tb_bist_bs_chip;
  localparam logic [6:0] I_SAMPLE = 7'b000_0000, I_EXTEST = 7'b001_0000, I_BIST_BSR = 7'b010_0000,
                         I_BFT = 7'b011_0001, I_BST = 7'b100_0001, I_INTEST = 7'b110_0000, I_BYPASS = 7'b111_0011;
  localparam int NB = 34;   // BSR length
  localparam int NG = 43;   // G1 (18) + G2 (25)

  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, sys_rst_n = 1;
  logic tdo, tdo_oe_n;
  logic [7:0] a_pin = 0, b_pin = 0;
  logic [15:0] p_pin;
  int checks = 0, failures = 0;
  int n_normal = 0, n_bypass = 0, n_sample = 0, n_preload = 0, n_extest = 0, n_intest = 0,
      n_bft = 0, n_bst = 0, n_bist_bsr = 0, n_bsr_session = 0, n_hold_pins = 0, n_tdo_hiz = 0;

  bist_bs_chip dut (.tck, .tms, .tdi, .trst_n, .tdo, .tdo_oe_n, .sys_clk(tck), .sys_rst_n,
                    .a_pin, .b_pin, .p_pin);

  always #5 tck = ~tck;
  initial begin #20000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One TCK cycle; called just after a falling edge. Returns TDO as seen
  // before the rising edge.
  logic last_oe_n;
  task automatic clk1(logic tms_v, logic tdi_v, output logic tdo_v);
    tms = tms_v; tdi = tdi_v;
    #1 tdo_v = tdo; last_oe_n = tdo_oe_n;
    if (tdo_oe_n) n_tdo_hiz++;
    @(negedge tck); #1;
  endtask
  task automatic clk(logic tms_v);
    logic dummy;
    clk1(tms_v, 1'b0, dummy);
  endtask

  // All scans start and end in Select-DR-Scan.
  task automatic scan_ir(logic [6:0] code, output logic [6:0] out);
    logic t;
    clk(1); clk(0); clk(0);                       // Select-IR, Capture-IR, Shift-IR
    for (int i = 0; i < 7; i++) begin
      clk1(i == 6, code[i], t); out[i] = t;
      check(last_oe_n == 0, "TDO enabled while shifting IR");
    end
    clk(1); clk(1);                               // Update-IR, Select-DR
  endtask

  // Shift n bits (in[0] first); out[i] is the i-th bit seen on TDO. With
  // idle > 0 the scan ends in Run-Test/Idle for idle cycles before going
  // back to Select-DR-Scan.
  task automatic scan_dr(int n, logic [63:0] in, output logic [63:0] out, input int idle = 0);
    logic t;
    out = '0;
    clk(0); clk(0);                               // Capture-DR, Shift-DR
    for (int i = 0; i < n; i++) begin clk1(i == n - 1, in[i], t); out[i] = t; end
    clk(1);                                       // Update-DR
    if (idle > 0) begin
      repeat (idle) clk(0);                        // Run-Test/Idle
      clk(1);                                     // Select-DR
    end else clk(1);
  endtask

  // ---- model pieces --------------------------------------------------
  function automatic logic [24:0] c1_word(logic [7:0] x, logic [7:0] y, logic pat);
    logic [11:0] lo, hi; logic [6:0] l6;
    l6 = 7'(x * y[1:0]) % 64 + 7'((x * y[3:2]) % 16) * 4;
    lo = 12'((x * y[1:0]) / 64 + (x * y[3:2]) / 16 + pat) * 64 + 12'(l6[5:0]);
    hi = 12'(x * y[7:4]);
    return {l6[6], hi, lo};
  endfunction
  function automatic logic [17:0] c2_word(logic [24:0] g);
    logic [4:0] sl, sh;
    sl = 5'(g[7:4]) + 5'(g[15:12]);
    sh = 5'(g[11:8]) + 5'(g[19:16]) + 5'(g[24]);
    return {sl[4], g[23:20], sh, sl[3:0], g[3:0]};
  endfunction
  function automatic logic [16:0] c3_out(logic [17:0] g);   // {obs, p}
    return {g[12], g[16:13] + 4'(g[17]), g[11:0]};
  endfunction

  // BSR chain position k: 0..7 a, 8..15 b, 16 generator, 17..32 p, 33 observation.
  // A vector v shifted in with v[NB-1] first ends with v[k] at position k.
  function automatic logic [63:0] rev(logic [63:0] v, int n);
    logic [63:0] r = '0;
    for (int i = 0; i < n; i++) r[i] = v[n-1-i];
    return r;
  endfunction

  initial begin
    logic [6:0] irout;
    logic [63:0] o, v;
    logic [15:0] expq [$];
    logic [16:0] seed_in, cin_m;
    logic [15:0] safe_p;
    logic [33:0] cap_m;
    logic [17:0] g1_m, s1;
    logic [24:0] g2_m, s2;
    int K;

    #1 trst_n = 0; sys_rst_n = 0;
    #2 trst_n = 1; sys_rst_n = 1;
    @(negedge tck); #1;

    // ---- 1. normal operation ------------------------------------------
    for (int k = 0; k < 40; k++) begin
      if (k >= 2) begin check(p_pin == expq[0], $sformatf("normal product %0d", k)); void'(expq.pop_front()); n_normal++; end
      a_pin = 8'($urandom); b_pin = 8'($urandom);
      expq.push_back(16'(a_pin * b_pin));
      clk(1);
    end
    clk(0); clk(1);                                 // RTI, Select-DR

    // ---- 2. IR capture value and BYPASS ------------------------------
    scan_ir(I_BYPASS, irout);
    check(irout == 7'b000_0001, "IR capture value");
    v = {32'($urandom), 32'($urandom)};
    scan_dr(20, v, o);
    check(o[0] == 1'b0 && o[19:1] == v[18:0], "bypass one-bit delay");
    n_bypass++;

    // ---- 3. SAMPLE/PRELOAD --------------------------------------------
    a_pin = 8'd201; b_pin = 8'd77;
    scan_ir(I_SAMPLE, irout);
    v = rev(64'({1'b0, 16'hA55A, 1'b0, 8'd13, 8'd11}), NB);   // preload: a=11, b=13, p=A55A
    scan_dr(NB, v, o);
    o = rev(o, NB);                                 // o[k] = captured value of position k
    check(o[7:0] == 8'd201 && o[15:8] == 8'd77, "sampled input pins");
    check(o[32:17] == 16'(201 * 77), "sampled core outputs");
    check(p_pin == 16'(201 * 77), "SAMPLE leaves the pins alone");
    n_sample++; n_preload++;

    // ---- 4. EXTEST ------------------------------------------------------
    scan_ir(I_EXTEST, irout);
    check(p_pin == 16'hA55A, "EXTEST drives the preloaded output values");
    n_extest++;

    // ---- 5. INTEST ------------------------------------------------------
    scan_ir(I_INTEST, irout);
    v = rev(64'({1'b0, 16'h0000, 1'b0, 8'd250, 8'd99}), NB);
    scan_dr(NB, v, o, 3);                           // operands to the core, 3 clocks in RTI
    scan_dr(NB, v, o);
    o = rev(o, NB);
    check(o[32:17] == 16'(99 * 250), "INTEST captured product");
    n_intest++;

    // ---- 6. self test, first session ------------------------------------
    // back to Test-Logic-Reset, then PRELOAD the seed
    repeat (5) clk(1);
    clk(0); clk(1);
    scan_ir(I_SAMPLE, irout);
    seed_in = 17'h0_1D2B; safe_p = 16'h3C3C;
    v = rev(64'({1'b0, safe_p, seed_in}), NB);
    scan_dr(NB, v, o);
    cap_m = {1'b0, safe_p, seed_in};
    cin_m = seed_in;

    scan_ir(I_BFT, irout);
    check(p_pin == safe_p, "safe output values under BFT");
    s1 = 18'h2_5A5A; s2 = 25'h0F0_F0F1;
    scan_dr(NG, rev(64'({s2, s1}), NG), o);          // seeds into G1 and G2
    K = 60;
    // shift the seeds again, checking that they come back out, then run
    scan_dr(NG, rev(64'({s2, s1}), NG), o, K);
    check(rev(o, NG) == 64'({s2, s1}), "BILBO chain returns its seeds");
    n_bft++;
    // model of the K steps of the first session
    g1_m = s1; g2_m = s2;
    for (int j = 0; j < K; j++) begin
      logic [16:0] co; logic fb;
      logic [33:0] nc;
      co = c3_out(g1_m);
      fb = cap_m[33] ^ cap_m[26] ^ cap_m[1] ^ cap_m[0];
      nc = {cap_m[32:0], fb};
      nc[33:17] = nc[33:17] ^ co;
      cap_m = nc;
      g2_m = {g2_m[23:0], g2_m[24] ^ g2_m[21]} ^ c1_word(cin_m[7:0], cin_m[15:8], cin_m[16]);
      g1_m = {g1_m[16:0], g1_m[17] ^ g1_m[10]};
      cin_m = {cin_m[15:0], cin_m[16] ^ cin_m[13]};
    end
    check(p_pin == safe_p, "safe output values after the first session");
    scan_dr(NG, '0, o);                              // read G2 (and G1)
    o = rev(o, NG);
    check(o[42:18] == g2_m, $sformatf("G2 signature %h exp %h", o[42:18], g2_m));
    check(o[17:0] == g1_m, "G1 TPG state after the first session");

    scan_ir(I_BIST_BSR, irout);
    v = rev(64'({1'b0, safe_p, seed_in}), NB);
    scan_dr(NB, v, o);
    o = rev(o, NB);
    check(o[33:0] == cap_m, $sformatf("BSR signature %h exp %h", o[33:0], cap_m));
    check(p_pin == safe_p, "safe output values after BIST-BSR read");
    n_bist_bsr++;

    // ---- second session -----------------------------------------------
    scan_ir(I_BST, irout);
    s1 = 18'h3_0F0F; s2 = 25'h155_AAA5;
    scan_dr(NG, rev(64'({s2, s1}), NG), o, K);
    g1_m = s1; g2_m = s2;
    for (int j = 0; j < K; j++) begin
      g1_m = {g1_m[16:0], g1_m[17] ^ g1_m[10]} ^ c2_word(g2_m);
      g2_m = {g2_m[23:0], g2_m[24] ^ g2_m[21]};
    end
    scan_dr(NG, '0, o);
    o = rev(o, NG);
    check(o[17:0] == g1_m, $sformatf("G1 signature %h exp %h", o[17:0], g1_m));
    check(o[42:18] == g2_m, "G2 TPG state after the second session");
    check(p_pin == safe_p, "safe output values after the second session");
    n_bst++;

    // ---- BIST-BSR on its own: seed at Update-DR, run, read ---------------
    // The BILBOs are normal pipeline registers under BIST-BSR, so the BSR TPG
    // drives C1 -> G2 -> C2 -> G1 -> C3 -> BSR MISR.
    begin
      logic [16:0] cin_old, seed2, co;
      logic [33:0] nc;
      logic fb;
      cin_old = seed_in;                             // UPD after the BIST-BSR read ...
      for (int j = 0; j < K; j++) cin_old = {cin_old[15:0], cin_old[16] ^ cin_old[13]};  // ... then K steps in BST
      scan_ir(I_BIST_BSR, irout);
      seed2 = 17'h1_6E09;
      v = rev(64'({1'b1, safe_p, seed2}), NB);
      scan_dr(NB, v, o, K);
      cap_m = {1'b1, safe_p, seed2};
      cin_m = seed2;
      g2_m = c1_word(seed2[7:0], seed2[15:8], seed2[16]);             // edge entering Run-Test/Idle
      g1_m = c2_word(c1_word(cin_old[7:0], cin_old[15:8], cin_old[16]));
      for (int j = 0; j < K; j++) begin
        co = c3_out(g1_m);
        fb = cap_m[33] ^ cap_m[26] ^ cap_m[1] ^ cap_m[0];
        nc = {cap_m[32:0], fb};
        nc[33:17] = nc[33:17] ^ co;
        cap_m = nc;
        g1_m = c2_word(g2_m);
        g2_m = c1_word(cin_m[7:0], cin_m[15:8], cin_m[16]);
        cin_m = {cin_m[15:0], cin_m[16] ^ cin_m[13]};
      end
      check(p_pin == safe_p, "safe output values during BIST-BSR");
      scan_dr(NB, v, o);
      o = rev(o, NB);
      check(o[33:0] == cap_m, $sformatf("BIST-BSR session signature %h exp %h", o[33:0], cap_m));
      n_bsr_session++;
    end

    // halt: back to Test-Logic-Reset, pins transparent again
    repeat (5) clk(1);
    a_pin = 8'd3; b_pin = 8'd5; clk(1); clk(1); clk(1);
    check(p_pin == 16'd15, "normal operation after the test");

    // every mechanism must have happened
    check(n_normal > 0, "normal");     check(n_bypass > 0, "bypass");
    check(n_sample > 0, "sample");     check(n_preload > 0, "preload");
    check(n_extest > 0, "extest");     check(n_intest > 0, "intest");
    check(n_bft > 0, "BFT session");   check(n_bst > 0, "BST session");
    check(n_bist_bsr > 0, "BIST-BSR");  check(n_bsr_session > 0, "BIST-BSR session"); check(n_tdo_hiz > 0, "TDO disabled outside shifting");
    $display("mechanisms: normal=%0d bypass=%0d sample=%0d preload=%0d extest=%0d intest=%0d bft=%0d bist_bsr=%0d bst=%0d bsr_session=%0d",
             n_normal, n_bypass, n_sample, n_preload, n_extest, n_intest, n_bft, n_bist_bsr, n_bst, n_bsr_session);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
