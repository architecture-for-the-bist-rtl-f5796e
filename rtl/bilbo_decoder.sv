// Distributed decoder of a BILBO register built from cell1 flip-flops.
// It turns the mode controls B1, B2 and HOLD into the three cell controls
// printed beside the cell1 schematic:
//   C1 = ~(B1 | HOLD), C2 = (B1 | B2) & ~HOLD, C3 = HOLD.
// Mode codes: normal B1B2=00, TPG 10, MISR 01, scan 11, hold HOLD=1 (B1 and
// B2 then don't care). It also flags scan mode, which the register uses to
// take its serial input from the scan path instead of its own feedback.
// Purely combinational.
module bilbo_decoder (
  input  logic b1,
  input  logic b2,
  input  logic hold,
  output logic c1,
  output logic c2,
  output logic c3,
  output logic scan   // B1 = B2 = 1 and not holding
);
  always_comb begin
    c1   = ~(b1 | hold);
    c2   = (b1 | b2) & ~hold;
    c3   = hold;
    scan = b1 & b2 & ~hold;
  end
endmodule
