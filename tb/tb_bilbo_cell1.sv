// Testbench for bilbo_cell1: drives every mode code (B1, B2, HOLD) through
// the cell's decoder equations and every data combination, and compares the
// next state with the mode definitions (normal: Pin, TPG and scan: Sin,
// MISR: Pin ^ Sin, hold: old value).
module tb_bilbo_cell1;
  logic clk = 0, rst_n = 0, pin, sin, c1, c2, c3, sout;
  int checks = 0, failures = 0;

  bilbo_cell1 dut (.clk, .rst_n, .pin, .sin, .c1, .c2, .c3, .sout);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic exp, old;
    pin = 0; sin = 0; c1 = 0; c2 = 0; c3 = 0;
    @(negedge clk); rst_n = 1;
    for (int m = 0; m < 8; m++)
      for (int v = 0; v < 8; v++) begin
        logic b1, b2, hold;
        {b1, b2, hold} = 3'(m);
        c1 = ~(b1 | hold); c2 = (b1 | b2) & ~hold; c3 = hold;
        // preload the cell with v[2] in normal mode
        {c1, c2, c3} = 3'b100; pin = v[2]; @(negedge clk);
        c1 = ~(b1 | hold); c2 = (b1 | b2) & ~hold; c3 = hold;
        pin = v[0]; sin = v[1]; old = sout;
        if (hold)           exp = old;
        else if (!b1 && !b2) exp = pin;
        else if (!b1 && b2)  exp = pin ^ sin;
        else                 exp = sin;
        @(negedge clk);
        checks++;
        if (sout !== exp) begin
          failures++;
          $display("FAIL b1=%0d b2=%0d hold=%0d pin=%0d sin=%0d old=%0d got %0d exp %0d", b1, b2, hold, pin, sin, old, sout, exp);
        end
      end
    // asynchronous reset
    rst_n = 0; #1; checks++; if (sout !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
