// Testbench for clock_select: with two clocks of different periods, the
// core clock must follow the chip clock while Enable_Sync is low and TCK
// while it is high; edges of the core clock are counted in each phase.
module tb_clock_select;
  logic sys_clk = 0, tck = 0, enable_sync = 0, core_clk;
  int checks = 0, failures = 0, edges = 0;

  clock_select dut (.*);

  always #30 sys_clk = ~sys_clk;
  always #70 tck = ~tck;
  always @(posedge core_clk) edges++;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    #5;
    repeat (100) begin
      #10; enable_sync = 1'($urandom); #0; checks++;
      if (core_clk !== (enable_sync ? tck : sys_clk)) failures++;
    end
    // 600 time units at period 60 -> 10 rising edges of the chip clock
    @(negedge sys_clk); @(negedge tck); #2;
    enable_sync = 0; edges = 0; #600;
    checks++; if (edges != 10) begin failures++; $display("FAIL sys edges %0d", edges); end
    @(negedge sys_clk); @(negedge tck); #2;
    enable_sync = 1; edges = 0; #700;
    checks++; if (edges != 5) begin failures++; $display("FAIL tck edges %0d", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
