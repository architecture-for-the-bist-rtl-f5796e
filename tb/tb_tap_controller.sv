// Testbench for tap_controller: random TMS with each instruction operation
// field. Checks the latch timing the document gives: the decoded controls
// change on the falling edge of TCK (after a rising edge they still show the
// previous state), while IR_Update and BSR_Update change on the rising edge
// and are high exactly while the FSM is in Update-IR / Update-DR. The
// expected controls are computed here from the state for a few signals
// (RESET, Enable, Select, IR_Cap_Shf, BIST_mode, Run-Test-Idle).
module tb_tap_controller;
  import bist_pkg::*;
  logic tck = 0, trst_n = 1, tms = 1;
  op_t op;
  tap_state_t state, prev;
  tapc_ctrl_t ctrl;
  int checks = 0, failures = 0, upd_ir_seen = 0, upd_dr_seen = 0;

  tap_controller dut (.*);

  always #5 tck = ~tck;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [5:0] expect_of(tap_state_t s, op_t o);
    logic bist;
    bist = (o == OP_BIST_BSR) || (o == OP_BFT) || (o == OP_BST);
    return {s != TLR, !(s == SHIFT_DR || s == SHIFT_IR), s[3] || s == SELECT_IR,
            s == CAPTURE_IR || s == SHIFT_IR, bist && s == RUN_IDLE, s == RUN_IDLE};
  endfunction

  function automatic logic [5:0] got_of(tapc_ctrl_t c);
    return {c.reset_n, c.enable_n, c.select, c.ir_cap_shf, c.bist_mode, c.run_test_idle};
  endfunction

  initial begin
    op = OP_BIST_BSR;
    #1 trst_n = 0;
    #1; checks++; if (ctrl !== CTRL_RESET) failures++;
    #10 trst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      if (k % 500 == 0) op = op_t'(k / 500);
      tms = ($urandom % 3) == 0;
      @(posedge tck); #1;
      // before the falling edge: the controls of the previous state
      checks++;
      if (got_of(ctrl) !== expect_of(prev, op)) begin failures++; $display("FAIL rise: state %s prev %s", state.name(), prev.name()); end
      checks++;
      if (ctrl.ir_update !== (state == UPDATE_IR)) failures++;
      checks++;
      if (ctrl.bsr_update !== (state == UPDATE_DR && (op inside {OP_SAMPLE, OP_EXTEST, OP_INTEST, OP_BIST_BSR}))) failures++;
      if (ctrl.ir_update) upd_ir_seen++;
      if (ctrl.bsr_update) upd_dr_seen++;
      @(negedge tck); #1;
      checks++;
      if (got_of(ctrl) !== expect_of(state, op)) begin failures++; $display("FAIL fall: state %s", state.name()); end
      prev = state;
    end
    checks++; if (upd_ir_seen == 0 || upd_dr_seen == 0) failures++;
    trst_n = 0; #1;
    checks++; if (ctrl !== CTRL_RESET || state !== TLR) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial prev = TLR;
endmodule
