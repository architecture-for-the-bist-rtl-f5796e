// Testbench for boundary_scan_register at N_IN = 4, N_OUT = 4
// (TPG x^4 + x^3 + 1, MISR x^8 + x^6 + x^5 + x^4 + 1). A bit-level reference
// model of the cells runs beside it: random control sequences (changed after
// each falling edge, as the TAP controller does) are followed by a directed
// self test: preload a seed, raise BIST_mode and check that the input-cell
// UPD flip-flops step through all 15 nonzero LFSR states (one step per
// falling edge, starting half a cycle after BIST_mode), that the CAP chain
// compacts the core outputs, and that the output pins keep their preloaded
// values throughout.
module tb_boundary_scan_register;
  localparam int NI = 4, NO = 4, N = NI + NO;
  localparam logic [NI-1:0] TT = 4'b0100;
  localparam logic [N-1:0]  MT = 8'b0011_1000;
  logic tck = 0, reset_n = 1, tdi = 0;
  logic bsr_capshf = 0, bsr_shf = 0, bsr_update = 0, mode_test = 0, bist_mode = 0;
  logic [NI-1:0] pin = 0, cin;
  logic [NO-1:0] cout = 0, pout;
  logic so;
  // model
  logic [N-1:0] m_cap = 0;
  logic [NI-1:0] m_ui = 0, m_cin;
  logic [NO-1:0] m_uo = 0;
  logic m_bmi = 0;
  int checks = 0, failures = 0, bist_steps = 0;

  boundary_scan_register #(.N_IN(NI), .N_OUT(NO), .TPG_TAPS(TT), .MISR_TAPS(MT)) dut (.*);

  always #5 tck = ~tck;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always_comb m_cin = mode_test ? m_ui : pin;

  always @(posedge tck) if (reset_n) begin
    logic [N-1:0] s;
    s[0] = bist_mode ? (m_cap[N-1] ^ (^(m_cap[N-2:0] & MT[N-2:0]))) : tdi;
    for (int i = 1; i < N; i++) s[i] = m_cap[i-1];
    m_bmi <= bist_mode;
    if (bsr_capshf)
      for (int i = 0; i < N; i++)
        if (i < NI) m_cap[i] <= bsr_shf ? s[i] : pin[i];
        else        m_cap[i] <= bist_mode ? (s[i] ^ cout[i-NI]) : (bsr_shf ? s[i] : cout[i-NI]);
  end

  always @(negedge tck) if (reset_n) begin
    if (bsr_update || m_bmi)
      for (int i = 0; i < NI; i++)
        m_ui[i] <= !m_bmi ? m_cap[i] : (i == 0 ? (m_cin[NI-1] ^ (^(m_cin[NI-2:0] & TT[NI-2:0]))) : m_cin[i-1]);
    if (bsr_update) m_uo <= m_cap[N-1:NI];
    if (m_bmi) bist_steps++;
  end

  task automatic compare(string where);
    checks++;
    if (cin !== m_cin || pout !== (mode_test ? m_uo : cout) || so !== m_cap[N-1]) begin
      failures++;
      $display("FAIL %s cin %h/%h pout %h/%h so %0d/%0d", where, cin, m_cin, pout, mode_test ? m_uo : cout, so, m_cap[N-1]);
    end
  endtask

  initial begin
    logic [NI-1:0] seen [$];
    #1 reset_n = 0;
    #11 reset_n = 1;
    repeat (500) begin
      @(negedge tck); #1;
      {tdi, bsr_capshf, bsr_shf, bsr_update, mode_test} = 5'($urandom);
      bist_mode = ($urandom % 4) == 0;
      pin = NI'($urandom); cout = NO'($urandom);
      #1 compare("random/low");
      @(posedge tck); #1 compare("random/high");
    end
    // directed self test: preload seed 0001 in the input UPDs, 1010 in the outputs
    @(negedge tck); #1 {bist_mode, bsr_update} = 0; mode_test = 1; bsr_capshf = 1; bsr_shf = 1;
    for (int i = 0; i < N; i++) begin
      tdi = (8'b0101_1000 >> (N-1-i)) & 1; @(negedge tck); #1;
    end
    bsr_capshf = 0; bsr_update = 1; @(negedge tck); #1 bsr_update = 0;
    checks++; if (cin !== 4'b1000 || pout !== 4'b0101) begin failures++; $display("FAIL preload cin %b pout %b", cin, pout); end
    bist_mode = 1; bsr_capshf = 1; bsr_shf = 1; bist_steps = 0;
    for (int k = 0; k < 15; k++) begin
      @(negedge tck); #1;
      cout = NO'($urandom);
      compare("bist");
      seen.push_back(cin);
    end
    bist_mode = 0; bsr_capshf = 0;
    @(negedge tck); #1 compare("after");
    begin
      logic [15:0] hit = 0;
      foreach (seen[i]) hit[seen[i]] = 1;
      checks++; if (hit != 16'hFFFE) begin failures++; $display("FAIL TPG states %h", hit); end
    end
    checks++; if (pout !== 4'b0101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
