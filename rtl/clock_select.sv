// Core clock selection controlled by Enable_Sync: the core registers run on
// the chip clock while Enable_Sync is low and on TCK while it is high. The
// document says only that Enable_Sync switches between the two clocks; the
// polarity follows its truth table, where Enable_Sync is low in
// Test-Logic-Reset (normal operation). The switch is a plain multiplexer:
// the chip clock must be stopped or synchronous with TCK when Enable_Sync
// changes, since nothing here suppresses glitches.
module clock_select (
  input  logic sys_clk,
  input  logic tck,
  input  logic enable_sync,
  output logic core_clk
);
  assign core_clk = enable_sync ? tck : sys_clk;
endmodule
