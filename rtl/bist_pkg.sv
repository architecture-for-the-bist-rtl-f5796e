// Shared types and constants of the BIST boundary-scan design.
//
// tap_state_t uses the four-bit state assignment of the TAP state machine
// that the decoder truth table is written against (the usual IEEE 1149.1
// codes). The instruction register is 7 bits wide: a 3-bit operation field
// (bits 6:4), which drives the TAP controller decoder, and a 4-bit address
// field (bits 3:0), whose two low bits select the data register placed
// between TDI and TDO. tapc_ctrl_t bundles the 19 decoder outputs in the order
// of the truth table; RESET and Enable are active low.
package bist_pkg;

  typedef enum logic [3:0] {
    EXIT2_DR   = 4'h0,
    EXIT1_DR   = 4'h1,
    SHIFT_DR   = 4'h2,
    PAUSE_DR   = 4'h3,
    SELECT_IR  = 4'h4,
    UPDATE_DR  = 4'h5,
    CAPTURE_DR = 4'h6,
    SELECT_DR  = 4'h7,
    EXIT2_IR   = 4'h8,
    EXIT1_IR   = 4'h9,
    SHIFT_IR   = 4'hA,
    PAUSE_IR   = 4'hB,
    RUN_IDLE   = 4'hC,
    UPDATE_IR  = 4'hD,
    CAPTURE_IR = 4'hE,
    TLR        = 4'hF
  } tap_state_t;

  // Operation field of the instruction register.
  typedef enum logic [2:0] {
    OP_SAMPLE   = 3'b000,  // SAMPLE/PRELOAD
    OP_EXTEST   = 3'b001,
    OP_BIST_BSR = 3'b010,
    OP_BFT      = 3'b011,  // BIST-BILBO, first test session
    OP_BST      = 3'b100,  // BIST-BILBO, second test session
    OP_UNUSED   = 3'b101,  // no instruction; behaves as BYPASS
    OP_INTEST   = 3'b110,
    OP_BYPASS   = 3'b111
  } op_t;

  localparam int IR_LEN = 7;

  // Full op-codes, with the don't-care address bits set to zero.
  localparam logic [IR_LEN-1:0] INS_SAMPLE   = 7'b000_0000;
  localparam logic [IR_LEN-1:0] INS_EXTEST   = 7'b001_0000;
  localparam logic [IR_LEN-1:0] INS_BIST_BSR = 7'b010_0000;
  localparam logic [IR_LEN-1:0] INS_BFT      = 7'b011_0001;
  localparam logic [IR_LEN-1:0] INS_BST      = 7'b100_0001;
  localparam logic [IR_LEN-1:0] INS_INTEST   = 7'b110_0000;
  localparam logic [IR_LEN-1:0] INS_BYPASS   = 7'b111_0011;

  // Value loaded into the IR shift stage in Capture-IR (two LSBs "01").
  localparam logic [IR_LEN-1:0] IR_CAPTURE = 7'b000_0001;

  // Data register selected by address-field bits 1:0.
  localparam logic [1:0] DR_BSR    = 2'b00;
  localparam logic [1:0] DR_BILBO  = 2'b01;
  localparam logic [1:0] DR_BYPASS = 2'b11;

  // Decoder outputs, in truth-table order (first field = leftmost bit).
  typedef struct packed {
    logic reset_n;          // RESET, low in Test-Logic-Reset
    logic enable_n;         // Enable, TDO buffer enable, low while shifting
    logic select;           // Select, 1: IR to TDO, 0: data register to TDO
    logic enable_sync;      // Enable_Sync, 1: core clocked by TCK
    logic ir_cap;           // IR_Cap
    logic ir_cap_shf;       // IR_Cap_Shf
    logic ir_update;        // IR_Update
    logic bsr_capshf;       // BSR_CapShf
    logic bsr_shf;          // BSR_Shf
    logic bsr_update;       // BSR_Update
    logic byp_shf;          // BYP_Shf
    logic byp_capshf;       // BYP_CapShf
    logic mode_test;        // Mode_Test
    logic bist_mode;        // BIST_mode
    logic bist_inst_enable; // BIST_Inst_enable
    logic hold_bilbo;       // Hold_BILBO
    logic b1_bilbo;         // B1_BILBO
    logic b2_bilbo;         // B2_BILBO
    logic run_test_idle;    // Run-Test-Idle
  } tapc_ctrl_t;

  // Decoder outputs in Test-Logic-Reset (the value after TRST*).
  localparam tapc_ctrl_t CTRL_RESET = 19'b011_0000_0000_0000_0000;

endpackage
