// BIST boundary scan register (BSR): N_IN input cells followed by N_OUT output
// cells on one serial path, TDI -> input cell 0 ... input cell N_IN-1 ->
// output cell 0 ... output cell N_OUT-1 -> so.
//
// Standard use (SAMPLE/PRELOAD, EXTEST, INTEST, BIST-BSR shifting): capture on
// the rising TCK edge ending Capture-DR, shift on rising edges in Shift-DR,
// update on the falling edge in Update-DR.
//
// BIST (BIST_mode high, in Run-Test/Idle):
//  * BIST_mode feeds the output cells directly (BIST_mode_O) and, delayed to
//    the next rising TCK edge by one flip-flop, the input cells (BIST_mode_I),
//    as the document prescribes.
//  * The UPD flip-flops of the input cells shift on falling TCK edges through
//    Cin_p and form an external-XOR LFSR: input cell 0 receives
//    cin[N_IN-1] ^ XOR(cin[i] & TPG_TAPS[i]). The document chains Cin to the
//    next cell's Cin_p but does not give the feedback or its polynomial; the
//    default x^17 + x^14 + 1 is primitive and chosen here.
//  * The CAP flip-flops of all cells form one MISR on rising TCK edges: the
//    input cells shift, the output cells add Cout. The serial input of the
//    chain is the MISR feedback (last ^ XOR(chain[i] & MISR_TAPS[i])) instead
//    of TDI while BIST_mode is high. That feedback and its polynomial are this
//    design's choice (default x^34 + x^27 + x^2 + x + 1, primitive).
module boundary_scan_register #(
  parameter int                   N_IN      = 17,
  parameter int                   N_OUT     = 17,
  parameter logic [N_IN-1:0]      TPG_TAPS  = N_IN'(1) << 13,
  parameter logic [N_IN+N_OUT-1:0] MISR_TAPS = (N_IN+N_OUT)'((64'd1 << 26) | 64'd3)
) (
  input  logic             tck,
  input  logic             reset_n,     // TAP controller RESET (active low)
  input  logic             tdi,
  input  logic             bsr_capshf,
  input  logic             bsr_shf,
  input  logic             bsr_update,
  input  logic             mode_test,
  input  logic             bist_mode,   // latched on falling TCK by the TAPC
  input  logic [N_IN-1:0]  pin,         // input pads
  output logic [N_IN-1:0]  cin,         // to the core
  input  logic [N_OUT-1:0] cout,        // from the core
  output logic [N_OUT-1:0] pout,        // output pads
  output logic             so           // serial output to the TDO multiplexer
);
  localparam int N = N_IN + N_OUT;

  logic            bist_mode_i;
  logic [N-1:0]    chain;               // Sout of every cell, in scan order
  logic [N-1:0]    sin;
  logic [N_IN-1:0] cin_p;
  logic            misr_fb, tpg_fb;

  // BIST_mode delayed by half a TCK period for the input cells.
  always_ff @(posedge tck or negedge reset_n)
    if (!reset_n) bist_mode_i <= 1'b0;
    else          bist_mode_i <= bist_mode;

  always_comb begin
    misr_fb = chain[N-1] ^ (^(chain[N-2:0] & MISR_TAPS[N-2:0]));
    sin[0]  = bist_mode ? misr_fb : tdi;
    for (int i = 1; i < N; i++) sin[i] = chain[i-1];
    tpg_fb   = cin[N_IN-1] ^ (^(cin[N_IN-2:0] & TPG_TAPS[N_IN-2:0]));
    cin_p[0] = tpg_fb;
    for (int i = 1; i < N_IN; i++) cin_p[i] = cin[i-1];
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    bsr_input_cell u_cell (
      .tck, .reset_n, .pin(pin[i]), .sin(sin[i]), .cin_p(cin_p[i]),
      .bsr_capshf, .bsr_shf, .bsr_update, .mode_test, .bist_mode_i,
      .cin(cin[i]), .sout(chain[i])
    );
  end

  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    bsr_output_cell u_cell (
      .tck, .reset_n, .cout(cout[i]), .sin(sin[N_IN+i]),
      .bsr_capshf, .bsr_shf, .bsr_update, .mode_test, .bist_mode_o(bist_mode),
      .pout(pout[i]), .sout(chain[N_IN+i])
    );
  end

  assign so = chain[N-1];
endmodule
