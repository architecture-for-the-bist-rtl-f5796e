// System (core) logic: an 8x8 unsigned multiplier arranged as the three
// combinational blocks and two BILBO registers of the document's BIST core
// structure:  inputs -> C1 -> G2 -> C2 -> G1 -> C3 -> outputs.
// In normal mode it is a two-stage pipeline: the product of the a, b present
// at one rising core_clk edge appears on p after the second edge.
//
// G1 (18 bits) is the first BILBO group and takes B1/B2 as given; G2
// (25 bits) is the second group and takes them swapped, so one code makes
// G1 a TPG and G2 a MISR (first session, BFT) and the other the reverse
// (second session, BST). In scan mode the two form one chain,
// scan_in -> G1 -> G2 -> scan_out.
//
// Each block holds one segmentation cell (pseudo-exhaustive cut, active
// while BIST_Inst_enable is high). The cut values go to the register that
// compacts the block's response: an extra bit of G2 (C1), of G1 (C2) and an
// extra BSR output cell (C3, port c3_obs). The replacement patterns come from
// the register that drives the block: an extra BSR input cell (C1, port
// c1_gen), the extra bit of G2 (C2) and of G1 (C3). How the multiplier is cut
// into C1..C3 and where the cuts sit is this design's choice.
module mult_core #(
  parameter logic [17:0] G1_TAPS = 18'(1) << 10,  // x^18 + x^11 + 1
  parameter logic [24:0] G2_TAPS = 25'(1) << 21   // x^25 + x^22 + 1
) (
  input  logic        core_clk,
  input  logic        rst_n,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p,
  input  logic        b1_bilbo,
  input  logic        b2_bilbo,
  input  logic        hold_bilbo,
  input  logic        bist_inst_enable,
  input  logic        c1_gen,
  output logic        c3_obs,
  input  logic        scan_in,
  output logic        scan_out
);
  logic [11:0] lo, hi;
  logic        c1_obs, c2_obs;
  logic [24:0] g2_q;
  logic [16:0] c2_y;
  logic [17:0] g1_q;
  logic        g1_so;

  core_c1 u_c1 (.a, .b, .bist_inst_enable, .test_pattern(c1_gen),
                .lo, .hi, .to_misr(c1_obs));

  bilbo_register #(.W(25), .TAPS(G2_TAPS)) u_g2 (
    .clk(core_clk), .rst_n, .b1(b2_bilbo), .b2(b1_bilbo), .hold(hold_bilbo),
    .d({c1_obs, hi, lo}), .scan_in(g1_so), .q(g2_q), .scan_out
  );

  core_c2 u_c2 (.lo(g2_q[11:0]), .hi(g2_q[23:12]), .bist_inst_enable,
                .test_pattern(g2_q[24]), .y(c2_y), .to_misr(c2_obs));

  bilbo_register #(.W(18), .TAPS(G1_TAPS)) u_g1 (
    .clk(core_clk), .rst_n, .b1(b1_bilbo), .b2(b2_bilbo), .hold(hold_bilbo),
    .d({c2_obs, c2_y}), .scan_in, .q(g1_q), .scan_out(g1_so)
  );

  core_c3 u_c3 (.x(g1_q[16:0]), .bist_inst_enable, .test_pattern(g1_q[17]),
                .p, .to_misr(c3_obs));
endmodule
