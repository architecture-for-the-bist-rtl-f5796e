// Testbench for bypass_register: captures 0 when BYP_CapShf is high and
// BYP_Shf low, shifts TDI with a one-TCK delay when both are high, and holds
// otherwise.
module tb_bypass_register;
  logic tck = 0, tdi = 0, byp_capshf = 0, byp_shf = 0, so;
  logic m = 0;
  int checks = 0, failures = 0;

  bypass_register dut (.*);

  always #5 tck = ~tck;
  always @(posedge tck) if (byp_capshf) m <= byp_shf ? tdi : 1'b0;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    byp_capshf = 1; byp_shf = 0; @(negedge tck);   // capture initialises
    checks++; if (so !== 0) failures++;
    repeat (200) begin
      {tdi, byp_capshf, byp_shf} = 3'($urandom);
      @(negedge tck);
      checks++;
      if (so !== m) begin failures++; $display("FAIL so=%0d exp %0d", so, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
