// TDO path: the data-register multiplexer (selected by the address field of
// the instruction), the TDO multiplexer (Select: 1 = instruction register,
// 0 = data register), the TDO flip-flop clocked on the falling edge of TCK,
// and the TDO buffer, whose active-low enable is the TAPC Enable signal.
// The two-state output is brought out as tdo plus its enable tdo_oe_n; the
// pad turns them into a tri-state pin. Address codes: 00 BSR, 01 BILBO
// chain, anything else the bypass register (this design has no device
// identification register).
module tdo_stage
  import bist_pkg::*;
(
  input  logic       tck,
  input  logic       select,
  input  logic       enable_n,
  input  logic [1:0] dr_sel,
  input  logic       ir_so,
  input  logic       bsr_so,
  input  logic       bilbo_so,
  input  logic       byp_so,
  output logic       tdo,
  output logic       tdo_oe_n
);
  logic dr_so;

  always_comb
    unique case (dr_sel)
      DR_BSR:   dr_so = bsr_so;
      DR_BILBO: dr_so = bilbo_so;
      default:  dr_so = byp_so;
    endcase

  always_ff @(negedge tck)
    tdo <= select ? ir_so : dr_so;

  assign tdo_oe_n = enable_n;
endmodule
