// BIST boundary-scan output cell for one primary output pin.
// The standard part: CAP flip-flop (rising TCK, enabled by BSR_CapShf, loads
// the core output Cout or shifts Sin under BSR_Shf), UPD flip-flop (falling
// TCK, loads CAP under BSR_Update) and the Mode_Test multiplexer that drives
// the pin Pout from Cout or from UPD.
// The BIST addition, as in the document: an XOR of Cout and Sin and a
// multiplexer at the CAP input, so that while BIST_mode_O is high the CAP
// flip-flop takes Sin ^ Cout and the CAP flip-flops form a signature register
// (MISR). UPD keeps driving the pin during BIST (Mode_Test high), so the pins
// hold known safe values.
// Both flip-flops are cleared by the active-low RESET of the TAP controller.
module bsr_output_cell (
  input  logic tck,
  input  logic reset_n,
  input  logic cout,         // from the core logic output
  input  logic sin,          // serial input (previous cell's Sout)
  input  logic bsr_capshf,
  input  logic bsr_shf,
  input  logic bsr_update,
  input  logic mode_test,
  input  logic bist_mode_o,
  output logic pout,         // to the output pad
  output logic sout          // serial output (CAP flip-flop)
);
  logic cap, upd, d_std;

  always_comb d_std = bsr_shf ? sin : cout;

  always_ff @(posedge tck or negedge reset_n)
    if (!reset_n)        cap <= 1'b0;
    else if (bsr_capshf) cap <= bist_mode_o ? (sin ^ cout) : d_std;

  always_ff @(negedge tck or negedge reset_n)
    if (!reset_n)        upd <= 1'b0;
    else if (bsr_update) upd <= cap;

  assign pout = mode_test ? upd : cout;
  assign sout = cap;
endmodule
