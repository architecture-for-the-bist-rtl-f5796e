// Combinational block C3 of the core: forms the 16-bit product from the
// word {hi[11:8], sum9[8:0], lo[3:0]} as p = {hi[11:8] + sum9[8],
// sum9[7:0], lo[3:0]}. The carry sum9[8] passes through a segmentation cell.
module core_c3 (
  input  logic [16:0] x,
  input  logic        bist_inst_enable,
  input  logic        test_pattern,
  output logic [15:0] p,
  output logic        to_misr
);
  logic carry;

  segmentation_cell u_seg (
    .bist_inst_enable, .normal_data(x[12]), .test_pattern,
    .to_next_gate(carry), .to_misr
  );

  always_comb p = {x[16:13] + {3'b0, carry}, x[11:0]};
endmodule
