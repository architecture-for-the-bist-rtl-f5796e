// Bypass register: one flip-flop between TDI and TDO. On rising TCK edges
// while BYP_CapShf is high it loads 0 (capture) or TDI (BYP_Shf, shift).
module bypass_register (
  input  logic tck,
  input  logic tdi,
  input  logic byp_capshf,
  input  logic byp_shf,
  output logic so
);
  always_ff @(posedge tck)
    if (byp_capshf) so <= byp_shf ? tdi : 1'b0;
endmodule
