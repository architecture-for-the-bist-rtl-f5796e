// BILBO register: W cell1 flip-flops x1..xW, one distributed decoder and the
// feedback network of an external-XOR linear feedback shift register.
// Serial order is x1 (first) to xW (last, scan_out). The serial input of x1 is
// scan_in in scan mode and otherwise the feedback
//   fb = xW ^ (c1 & x1) ^ ... ^ (c(W-1) & x(W-1)),
// with ci = TAPS[i-1]. With that feedback the TPG mode is the autonomous LFSR
// and the MISR mode the multi-input signature register of the document's two
// generator/compactor figures (x1 gets fb ^ r1, xi gets x(i-1) ^ ri).
// The feedback polynomial is not given by the document; the default
// x^25 + x^22 + 1 is a primitive trinomial chosen here (TAPS bit 21 = c22).
// Timing: everything changes on the rising edge of clk; async active-low
// reset to all zeros.
module bilbo_register #(
  parameter int          W    = 25,
  parameter logic [W-1:0] TAPS = W'(1) << 21
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         b1,
  input  logic         b2,
  input  logic         hold,
  input  logic [W-1:0] d,        // parallel inputs r1..rW (bit i-1 = ri)
  input  logic         scan_in,
  output logic [W-1:0] q,        // x1..xW (bit i-1 = xi)
  output logic         scan_out
);
  logic c1, c2, c3, scan;
  logic fb;
  logic [W-1:0] sin;

  bilbo_decoder u_dec (.b1, .b2, .hold, .c1, .c2, .c3, .scan);

  always_comb begin
    fb = q[W-1] ^ (^(q[W-2:0] & TAPS[W-2:0]));
    sin[0] = scan ? scan_in : fb;
    for (int i = 1; i < W; i++) sin[i] = q[i-1];
  end

  for (genvar i = 0; i < W; i++) begin : g_cell
    bilbo_cell1 u_cell (
      .clk, .rst_n, .pin(d[i]), .sin(sin[i]), .c1, .c2, .c3, .sout(q[i])
    );
  end

  assign scan_out = q[W-1];
endmodule
