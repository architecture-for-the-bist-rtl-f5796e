// TAP controller (TAPC): the state machine, the TAPC decoder and the latch
// register of its outputs, as in the document's TAPC block diagram.
// All decoder outputs are latched on the falling edge of TCK, so each control
// is valid from the middle of a state to the middle of the next one and is
// stable at the rising edge that ends the state. IR_Update and BSR_Update
// are the exception the document names: they are latched on the rising edge
// of TCK, because the IR shadow register and the BSR UPD flip-flops act on
// the falling edge. This design latches them from the decoder driven by the
// FSM's next state, so they are high exactly during Update-IR / Update-DR.
// TRST* (active low) resets the FSM and the latches asynchronously to the
// Test-Logic-Reset values. The latched RESET is itself used as an
// asynchronous clear by the BSR cells and the IR, which is why a linter
// reports these latches as flopped both synchronously and asynchronously.
// Assertions at the end state the rules the controls obey; because they are
// disabled while TRST* is low, a linter also reports TRST* itself as used
// both synchronously and asynchronously. Neither report is a design fault.
module tap_controller
  import bist_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  op_t        op,      // operation field of the instruction register
  output tap_state_t state,
  output tapc_ctrl_t ctrl
);
  tap_state_t next_state;
  tapc_ctrl_t dec_now, dec_next, neg_q;
  logic       ir_update_q, bsr_update_q;

  tap_fsm u_fsm (.tck, .trst_n, .tms, .state, .next_state);

  tapc_decoder u_dec_now  (.state(state),      .op, .ctrl(dec_now));
  tapc_decoder u_dec_next (.state(next_state), .op, .ctrl(dec_next));

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) neg_q <= CTRL_RESET;
    else         neg_q <= dec_now;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) begin
      ir_update_q  <= 1'b0;
      bsr_update_q <= 1'b0;
    end else begin
      ir_update_q  <= dec_next.ir_update;
      bsr_update_q <= dec_next.bsr_update;
    end

  always_comb begin
    ctrl            = neg_q;
    ctrl.ir_update  = ir_update_q;
    ctrl.bsr_update = bsr_update_q;
  end

  // Protocol rules of the controls, checked at every rising TCK edge.
  // The two update strobes are never high together.
  a_update_excl: assert property (@(posedge tck) disable iff (!trst_n)
    !(ctrl.ir_update && ctrl.bsr_update));
  // BIST runs only with pin permission, so the pins hold safe values.
  a_bist_pins: assert property (@(posedge tck) disable iff (!trst_n)
    ctrl.bist_mode |-> ctrl.mode_test);
  // TDO is driven only while a register is shifted.
  a_tdo_shift: assert property (@(posedge tck) disable iff (!trst_n)
    !ctrl.enable_n |-> (state == SHIFT_DR || state == SHIFT_IR));
  // Update strobes are high only in their Update state.
  a_update_state: assert property (@(posedge tck) disable iff (!trst_n)
    (ctrl.ir_update |-> state == UPDATE_IR) and (ctrl.bsr_update |-> state == UPDATE_DR));
endmodule
