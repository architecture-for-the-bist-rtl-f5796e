// BIST boundary-scan input cell for one chip input pin.
// The standard part: a capture/shift flip-flop (CAP, rising TCK, enabled by
// BSR_CapShf, loads Pin or shifts Sin under BSR_Shf), an update flip-flop
// (UPD, falling TCK, loads CAP under BSR_Update) and the Mode_Test multiplexer
// that feeds the core input Cin from Pin or from UPD.
// The BIST addition, as in the document: a multiplexer at the UPD input that,
// while BIST_mode_I is high, loads Cin_p (the Cin of the previous input cell),
// so that the UPD flip-flops of the input cells form the test pattern
// generator. The UPD load enable is BSR_Update OR BIST_mode_I; the document
// shows the added multiplexer but no separate enable, and in Run-Test/Idle
// BSR_Update is low, so this OR is this design's reading.
// Both flip-flops are cleared by the active-low RESET of the TAP controller.
module bsr_input_cell (
  input  logic tck,
  input  logic reset_n,
  input  logic pin,          // from the input pad
  input  logic sin,          // serial input (previous cell's Sout)
  input  logic cin_p,        // Cin of the previous input cell (TPG chain)
  input  logic bsr_capshf,
  input  logic bsr_shf,
  input  logic bsr_update,
  input  logic mode_test,
  input  logic bist_mode_i,
  output logic cin,          // to the core logic input
  output logic sout          // serial output (CAP flip-flop)
);
  logic cap, upd;

  always_ff @(posedge tck or negedge reset_n)
    if (!reset_n)        cap <= 1'b0;
    else if (bsr_capshf) cap <= bsr_shf ? sin : pin;

  always_ff @(negedge tck or negedge reset_n)
    if (!reset_n)                       upd <= 1'b0;
    else if (bsr_update || bist_mode_i) upd <= bist_mode_i ? cin_p : cap;

  assign cin  = mode_test ? upd : pin;
  assign sout = cap;
endmodule
