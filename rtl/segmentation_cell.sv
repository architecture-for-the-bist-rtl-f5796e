// Segmentation cell for pseudo-exhaustive testing: a 2:1 multiplexer placed
// on an internal net of a combinational block. While BIST_Inst_enable is
// high it cuts the net: the downstream gate receives a test pattern from a
// generator cell, and the original (normal) value is sent on to a signature
// register. Otherwise the normal value passes. Combinational.
module segmentation_cell (
  input  logic bist_inst_enable,
  input  logic normal_data,
  input  logic test_pattern,
  output logic to_next_gate,
  output logic to_misr
);
  assign to_next_gate = bist_inst_enable ? test_pattern : normal_data;
  assign to_misr      = normal_data;
endmodule
