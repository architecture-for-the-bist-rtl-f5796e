// Testbench for bilbo_decoder: for all eight (B1, B2, HOLD) codes checks
// that the decoded controls select the mode the code stands for:
// normal (1,0,0), TPG and scan (0,1,0), MISR (1,1,0), hold (0,0,1), and that
// the scan flag is set only for B1 = B2 = 1 without HOLD.
module tb_bilbo_decoder;
  logic b1, b2, hold, c1, c2, c3, scan;
  int checks = 0, failures = 0;

  bilbo_decoder dut (.b1, .b2, .hold, .c1, .c2, .c3, .scan);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [2:0] exp;
    for (int m = 0; m < 8; m++) begin
      {b1, b2, hold} = 3'(m);
      #1;
      if (hold)          exp = 3'b001;
      else if (!b1 && !b2) exp = 3'b100;
      else if (!b1 && b2)  exp = 3'b110;
      else               exp = 3'b010;
      checks++;
      if ({c1, c2, c3} !== exp) begin failures++; $display("FAIL code %b got %b exp %b", m[2:0], {c1,c2,c3}, exp); end
      checks++;
      if (scan !== (b1 && b2 && !hold)) begin failures++; $display("FAIL scan flag code %b", m[2:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
