// Instruction register: a 7-bit shift stage and a 7-bit shadow (hold) stage.
// The shift stage works on rising TCK edges while IR_Cap_Shf is high: with
// IR_Cap it loads the fixed capture value 0000001, otherwise it shifts right,
// TDI entering bit 6 and bit 0 leaving on so (LSB first). The shadow stage
// loads the shift stage on the falling TCK edge while IR_Update is high and
// is reset to BYPASS while the TAPC RESET is low (Test-Logic-Reset).
// Op-code layout (document's instruction table): bits 6:4 operation field,
// bits 3:0 address field. The capture value and the reset instruction are
// this design's choices, following IEEE 1149.1 practice.
module instruction_register
  import bist_pkg::*;
(
  input  logic              tck,
  input  logic              reset_n,
  input  logic              tdi,
  input  logic              ir_cap,
  input  logic              ir_cap_shf,
  input  logic              ir_update,
  output logic              so,
  output logic [IR_LEN-1:0] ir,       // current instruction
  output op_t               op,       // its operation field
  output logic [1:0]        dr_sel    // address bits 1:0, data register select
);
  logic [IR_LEN-1:0] sr;

  always_ff @(posedge tck)
    if (ir_cap_shf) sr <= ir_cap ? IR_CAPTURE : {tdi, sr[IR_LEN-1:1]};

  always_ff @(negedge tck or negedge reset_n)
    if (!reset_n)       ir <= INS_BYPASS;
    else if (ir_update) ir <= sr;

  assign so     = sr[0];
  assign op     = op_t'(ir[6:4]);
  assign dr_sel = ir[1:0];
endmodule
