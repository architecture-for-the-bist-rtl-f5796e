// Combinational block C1 of the core: the two 4-bit-slice partial products
// of the 8x8 multiplier, lo = a * b[3:0] and hi = a * b[7:4] (12 bits each).
// lo is formed as (a * b[1:0]) + ((a * b[3:2]) << 2) in two parts; the carry
// out of bit 5 passes through a segmentation cell, which in BIST replaces it
// with a generator bit and sends its true value to a signature register.
// The split of the multiplier into C1, C2 and C3 is this design's choice.
module core_c1 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic        bist_inst_enable,
  input  logic        test_pattern,
  output logic [11:0] lo,
  output logic [11:0] hi,
  output logic        to_misr
);
  logic [9:0] pp01, pp23;
  logic [6:0] low6;
  logic [5:0] high6;
  logic       carry;

  always_comb begin
    pp01 = {2'b00, a} * {8'b0, b[1:0]};
    pp23 = {2'b00, a} * {8'b0, b[3:2]};
    low6 = {1'b0, pp01[5:0]} + {1'b0, pp23[3:0], 2'b00};
  end

  segmentation_cell u_seg (
    .bist_inst_enable, .normal_data(low6[6]), .test_pattern,
    .to_next_gate(carry), .to_misr
  );

  always_comb begin
    high6 = {2'b00, pp01[9:6]} + pp23[9:4] + {5'b0, carry};
    lo    = {high6, low6[5:0]};
    hi    = {4'b0, a} * {8'b0, b[7:4]};
  end
endmodule
