// Sixteen-state TAP controller state machine. TMS, sampled on the rising
// edge of TCK, is its only control input; TRST* resets it asynchronously to
// Test-Logic-Reset. The transitions are those of the state diagram (the
// IEEE 1149.1 machine) and the state codes those of the decoder truth table.
// next_state is also brought out: the controller latches the two update
// strobes from it on the rising edge, so that they are valid during the
// Update state itself.
module tap_fsm
  import bist_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_t state,
  output tap_state_t next_state
);
  always_comb begin
    unique case (state)
      TLR:        next_state = tms ? TLR       : RUN_IDLE;
      RUN_IDLE:   next_state = tms ? SELECT_DR : RUN_IDLE;
      SELECT_DR:  next_state = tms ? SELECT_IR : CAPTURE_DR;
      CAPTURE_DR: next_state = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   next_state = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   next_state = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   next_state = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   next_state = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  next_state = tms ? SELECT_DR : RUN_IDLE;
      SELECT_IR:  next_state = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: next_state = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   next_state = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   next_state = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   next_state = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   next_state = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  next_state = tms ? SELECT_DR : RUN_IDLE;
      default:    next_state = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= TLR;
    else         state <= next_state;
endmodule
