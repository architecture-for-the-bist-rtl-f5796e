// TAP controller decoder: maps the FSM state and the 3-bit operation field of
// the instruction register to the 19 control signals of the boundary-scan
// and BIST logic. Purely combinational; the controller latches its outputs.
//
// For BIST-BSR, BFT and BST the outputs are those of the document's truth
// table, with the don't-care Hold_BILBO of BIST-BSR (and of reset) taken as 0,
// which leaves the BILBO registers in normal mode. Summarised:
//  * common: RESET low only in Test-Logic-Reset; Enable low in Shift-DR and
//    Shift-IR; Select high in the IR column, Run-Test/Idle, Select-IR-Scan and
//    Test-Logic-Reset; IR_Cap in Capture-IR; IR_Cap_Shf in Capture-IR and
//    Shift-IR; IR_Update in Update-IR; Run-Test-Idle in Run-Test/Idle.
//  * BIST instructions: Mode_Test and BIST_Inst_enable high outside reset;
//    BIST_mode, BSR_CapShf and BSR_Shf high in Run-Test/Idle; BIST-BSR also
//    shifts the BSR in Shift-DR and updates it in Update-DR, but leaves it
//    idle in Capture-DR so the signature survives.
//  * BFT/BST: BILBO registers scan (B1=B2=1) in Shift-DR, hold in every other
//    state but Run-Test/Idle, where BFT gives B1=1,B2=0 and BST B1=0,B2=1.
// The public instructions (SAMPLE/PRELOAD, EXTEST, INTEST, BYPASS) are not
// tabulated in the document; they get the usual IEEE 1149.1 behaviour built
// from the same signals, which is this design's choice: the selected data
// register captures in Capture-DR and shifts in Shift-DR, the BSR updates in
// Update-DR, Mode_Test is high for EXTEST and INTEST, and INTEST raises
// Enable_Sync in Run-Test/Idle so that the core runs on TCK there. The unused
// operation code 101 behaves as BYPASS.
module tapc_decoder
  import bist_pkg::*;
(
  input  tap_state_t state,
  input  op_t        op,
  output tapc_ctrl_t ctrl
);
  logic in_tlr, in_rti, bist_op, bilbo_op, bsr_op;

  always_comb begin
    in_tlr   = (state == TLR);
    in_rti   = (state == RUN_IDLE);
    bilbo_op = (op == OP_BFT) || (op == OP_BST);
    bist_op  = bilbo_op || (op == OP_BIST_BSR);
    bsr_op   = (op == OP_SAMPLE) || (op == OP_EXTEST) || (op == OP_INTEST);

    ctrl = '0;
    ctrl.reset_n       = !in_tlr;
    ctrl.enable_n      = !((state == SHIFT_DR) || (state == SHIFT_IR));
    ctrl.select        = state[3] || (state == SELECT_IR);
    ctrl.ir_cap        = (state == CAPTURE_IR);
    ctrl.ir_cap_shf    = (state == CAPTURE_IR) || (state == SHIFT_IR);
    ctrl.ir_update     = (state == UPDATE_IR);
    ctrl.run_test_idle = in_rti;

    if (bist_op) begin
      ctrl.mode_test        = !in_tlr;
      ctrl.bist_inst_enable = !in_tlr;
      ctrl.bist_mode        = in_rti;
      ctrl.bsr_capshf       = in_rti;
      ctrl.bsr_shf          = in_rti;
      if (op == OP_BIST_BSR) begin
        ctrl.bsr_capshf = in_rti || (state == SHIFT_DR);
        ctrl.bsr_shf    = in_rti || (state == SHIFT_DR);
        ctrl.bsr_update = (state == UPDATE_DR);
      end else if (!in_tlr) begin
        ctrl.hold_bilbo = !(in_rti || (state == SHIFT_DR));
        ctrl.b1_bilbo   = in_rti ? (op == OP_BFT) : 1'b1;
        ctrl.b2_bilbo   = in_rti ? (op == OP_BST) : 1'b1;
      end
    end else if (bsr_op) begin
      ctrl.mode_test   = !in_tlr && (op != OP_SAMPLE);
      ctrl.bsr_capshf  = (state == CAPTURE_DR) || (state == SHIFT_DR);
      ctrl.bsr_shf     = (state == SHIFT_DR);
      ctrl.bsr_update  = (state == UPDATE_DR);
      ctrl.enable_sync = (op == OP_INTEST) && in_rti;
    end else begin
      ctrl.byp_capshf  = (state == CAPTURE_DR) || (state == SHIFT_DR);
      ctrl.byp_shf     = (state == SHIFT_DR);
    end
  end
endmodule
