// One BILBO flip-flop of the "cell1" kind: a D flip-flop whose input is
//   D = (Pin & C1) ^ ((Sin & C2) | (Sout & C3))
// with C1 = ~(B1 | HOLD), C2 = (B1 | B2) & ~HOLD and C3 = HOLD coming from
// the register's distributed decoder. The three decoded controls, the
// equation form and the reset pin follow the cell1 schematic. Modes:
//   normal (C1=1,C2=0) D = Pin     TPG  (C1=0,C2=1) D = Sin
//   MISR   (C1=1,C2=1) D = Pin^Sin scan (C1=0,C2=1) D = Sin
//   hold   (C3=1)      D = Sout
// Rising-edge clock, asynchronous active-low reset (reset value 0 is this
// design's choice).
module bilbo_cell1 (
  input  logic clk,
  input  logic rst_n,
  input  logic pin,   // parallel (system) data input
  input  logic sin,   // serial input from the previous cell or the feedback
  input  logic c1,
  input  logic c2,
  input  logic c3,
  output logic sout   // flip-flop output, also the parallel output
);
  logic d;

  always_comb d = (pin & c1) ^ ((sin & c2) | (sout & c3));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sout <= 1'b0;
    else        sout <= d;
endmodule
