// Combinational block C2 of the core: adds the overlapping middle bits of
// the two partial products, sum9 = lo[11:4] + hi[7:0], as two 4-bit adders.
// The carry between them passes through a segmentation cell. Output word to
// the next register: {cut carry, hi[11:8], sum9[8:0], lo[3:0]}.
module core_c2 (
  input  logic [11:0] lo,
  input  logic [11:0] hi,
  input  logic        bist_inst_enable,
  input  logic        test_pattern,
  output logic [16:0] y,
  output logic        to_misr
);
  logic [4:0] s_lo, s_hi;
  logic       carry;

  always_comb s_lo = {1'b0, lo[7:4]} + {1'b0, hi[3:0]};

  segmentation_cell u_seg (
    .bist_inst_enable, .normal_data(s_lo[4]), .test_pattern,
    .to_next_gate(carry), .to_misr
  );

  always_comb begin
    s_hi = {1'b0, lo[11:8]} + {1'b0, hi[7:4]} + {4'b0, carry};
    y    = {hi[11:8], s_hi, s_lo[3:0], lo[3:0]};
  end
endmodule
