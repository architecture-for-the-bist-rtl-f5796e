// Testbench for tap_fsm: a random TMS sequence is compared, cycle by cycle,
// with a transition table written out in the testbench (next state for
// TMS = 0 and TMS = 1 of each of the 16 states). Also checks that five TMS=1
// cycles reach Test-Logic-Reset from anywhere and that TRST* resets
// asynchronously. Every state must be visited.
module tb_tap_fsm;
  import bist_pkg::*;
  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_t state, next_state;
  int checks = 0, failures = 0;
  logic [3:0] nxt0 [16], nxt1 [16];
  logic [3:0] m;
  bit visited [16];

  tap_fsm dut (.*);

  always #5 tck = ~tck;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    //          state      tms=0   tms=1
    nxt0[4'hF] = 4'hC; nxt1[4'hF] = 4'hF;   // TLR
    nxt0[4'hC] = 4'hC; nxt1[4'hC] = 4'h7;   // RTI
    nxt0[4'h7] = 4'h6; nxt1[4'h7] = 4'h4;   // Select-DR
    nxt0[4'h6] = 4'h2; nxt1[4'h6] = 4'h1;   // Capture-DR
    nxt0[4'h2] = 4'h2; nxt1[4'h2] = 4'h1;   // Shift-DR
    nxt0[4'h1] = 4'h3; nxt1[4'h1] = 4'h5;   // Exit1-DR
    nxt0[4'h3] = 4'h3; nxt1[4'h3] = 4'h0;   // Pause-DR
    nxt0[4'h0] = 4'h2; nxt1[4'h0] = 4'h5;   // Exit2-DR
    nxt0[4'h5] = 4'hC; nxt1[4'h5] = 4'h7;   // Update-DR
    nxt0[4'h4] = 4'hE; nxt1[4'h4] = 4'hF;   // Select-IR
    nxt0[4'hE] = 4'hA; nxt1[4'hE] = 4'h9;   // Capture-IR
    nxt0[4'hA] = 4'hA; nxt1[4'hA] = 4'h9;   // Shift-IR
    nxt0[4'h9] = 4'hB; nxt1[4'h9] = 4'hD;   // Exit1-IR
    nxt0[4'hB] = 4'hB; nxt1[4'hB] = 4'h8;   // Pause-IR
    nxt0[4'h8] = 4'hA; nxt1[4'h8] = 4'hD;   // Exit2-IR
    nxt0[4'hD] = 4'hC; nxt1[4'hD] = 4'h7;   // Update-IR
    #1 trst_n = 0;
    #11; checks++; if (state !== TLR) failures++;
    trst_n = 1; m = 4'hF;
    repeat (3000) begin
      tms = ($urandom % 3) == 0;   // bias towards 0 to reach deep states
      @(posedge tck); #1;
      m = tms ? nxt1[m] : nxt0[m];
      visited[m] = 1;
      checks++;
      if (state !== tap_state_t'(m)) begin failures++; $display("FAIL state %h exp %h", state, m); m = state; end
    end
    for (int s = 0; s < 16; s++) begin checks++; if (!visited[s]) begin failures++; $display("FAIL state %h never visited", s); end end
    // five TMS=1 clocks reach TLR from a deep state
    tms = 0; repeat (3) @(posedge tck);
    tms = 1; repeat (5) @(posedge tck); #1;
    checks++; if (state !== TLR) failures++;
    // asynchronous TRST*
    tms = 0; repeat (4) @(posedge tck); #2;
    trst_n = 0; #1;
    checks++; if (state !== TLR) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
