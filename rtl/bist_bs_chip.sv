// Chip with a BIST boundary scan: an 8x8 multiplier core surrounded by the
// IEEE 1149.1 test logic, extended so that the boundary scan register and
// the core's BILBO registers test the chip themselves under TAP control.
//
// Test access port: TCK, TMS, TDI, TRST* (active low) and TDO with its
// active-low output enable. Chip pins: a_pin, b_pin (operands) and p_pin
// (product); sys_clk / sys_rst_n clock and reset the core.
//
// Parts: TAP controller (FSM, decoder, latch register), 7-bit instruction
// register, bypass register, BIST BSR (17 input and 17 output cells: 16 pin
// cells each way plus one internal generator cell and one internal
// observation cell for the segmentation cells), the multiplier core with
// BILBO registers G1 and G2, the Enable_Sync clock selection and the TDO
// output stage.
//
// Self test (see README): PRELOAD a seed into the BSR, BFT (first session:
// BSR input TPG -> C1 -> G2 MISR, G1 TPG -> C2/C3 -> BSR output MISR), read
// G2, BIST-BSR to read the BSR signature, BST (second session: G2 TPG -> C2
// -> G1 MISR), read G1. The core must be clocked by TCK during a self test:
// the BILBO controls are latched on falling TCK edges and the table keeps
// Enable_Sync low, so sys_clk has to be TCK (or a clock in step with it)
// while a BIST instruction is loaded.
module bist_bs_chip
  import bist_pkg::*;
(
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  output logic        tdo,
  output logic        tdo_oe_n,
  input  logic        sys_clk,
  input  logic        sys_rst_n,
  input  logic [7:0]  a_pin,
  input  logic [7:0]  b_pin,
  output logic [15:0] p_pin
);
  localparam int N_IN  = 17;
  localparam int N_OUT = 17;

  tap_state_t        state;
  tapc_ctrl_t        ctrl;
  op_t               op;
  logic [IR_LEN-1:0] ir;
  logic [1:0]        dr_sel;
  logic              ir_so, byp_so, bsr_so, bilbo_so;
  logic [N_IN-1:0]   cin;
  logic [N_OUT-1:0]  pout;
  logic [15:0]       core_p;
  logic              c3_obs;
  logic              core_clk;

  tap_controller u_tapc (.tck, .trst_n, .tms, .op, .state, .ctrl);

  instruction_register u_ir (
    .tck, .reset_n(ctrl.reset_n), .tdi, .ir_cap(ctrl.ir_cap),
    .ir_cap_shf(ctrl.ir_cap_shf), .ir_update(ctrl.ir_update),
    .so(ir_so), .ir, .op, .dr_sel
  );

  bypass_register u_byp (
    .tck, .tdi, .byp_capshf(ctrl.byp_capshf), .byp_shf(ctrl.byp_shf),
    .so(byp_so)
  );

  boundary_scan_register #(.N_IN(N_IN), .N_OUT(N_OUT)) u_bsr (
    .tck, .reset_n(ctrl.reset_n), .tdi,
    .bsr_capshf(ctrl.bsr_capshf), .bsr_shf(ctrl.bsr_shf),
    .bsr_update(ctrl.bsr_update), .mode_test(ctrl.mode_test),
    .bist_mode(ctrl.bist_mode),
    .pin({1'b0, b_pin, a_pin}), .cin,
    .cout({c3_obs, core_p}), .pout, .so(bsr_so)
  );

  clock_select u_clk (.sys_clk, .tck, .enable_sync(ctrl.enable_sync),
                      .core_clk);

  mult_core u_core (
    .core_clk, .rst_n(sys_rst_n), .a(cin[7:0]), .b(cin[15:8]), .p(core_p),
    .b1_bilbo(ctrl.b1_bilbo), .b2_bilbo(ctrl.b2_bilbo),
    .hold_bilbo(ctrl.hold_bilbo), .bist_inst_enable(ctrl.bist_inst_enable),
    .c1_gen(cin[16]), .c3_obs, .scan_in(tdi), .scan_out(bilbo_so)
  );

  tdo_stage u_tdo (
    .tck, .select(ctrl.select), .enable_n(ctrl.enable_n), .dr_sel,
    .ir_so, .bsr_so, .bilbo_so, .byp_so, .tdo, .tdo_oe_n
  );

  assign p_pin = pout[15:0];
endmodule
