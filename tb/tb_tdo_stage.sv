// Testbench for tdo_stage: random serial outputs and selections. TDO must
// show, after each falling TCK edge, the IR output when Select is high and
// otherwise the data register chosen by the address bits (00 BSR, 01 BILBO,
// 10/11 bypass), and hold between falling edges; the output enable follows
// Enable.
module tb_tdo_stage;
  logic tck = 0, select, enable_n, ir_so, bsr_so, bilbo_so, byp_so, tdo, tdo_oe_n;
  logic [1:0] dr_sel;
  logic exp;
  int checks = 0, failures = 0;

  tdo_stage dut (.*);

  always #5 tck = ~tck;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (300) begin
      @(posedge tck); #1;
      {select, enable_n, dr_sel, ir_so, bsr_so, bilbo_so, byp_so} = 8'($urandom);
      exp = select ? ir_so : (dr_sel == 2'b00 ? bsr_so : dr_sel == 2'b01 ? bilbo_so : byp_so);
      #1; checks++; if (tdo_oe_n !== enable_n) failures++;
      @(negedge tck); #1;
      {ir_so, bsr_so, bilbo_so, byp_so} = ~{ir_so, bsr_so, bilbo_so, byp_so};  // must not pass before the next falling edge
      #1; checks++;
      if (tdo !== exp) begin failures++; $display("FAIL tdo %0d exp %0d", tdo, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
