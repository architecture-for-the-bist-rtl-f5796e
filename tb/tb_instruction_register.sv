// Testbench for instruction_register: capture of 0000001 in Capture-IR,
// LSB-first shifting (TDI enters bit 6, bit 0 leaves), the shadow update on
// the falling TCK edge only while IR_Update is high, the reset to BYPASS,
// and the operation / address field outputs for every instruction code.
module tb_instruction_register;
  import bist_pkg::*;
  logic tck = 0, reset_n = 1, tdi = 0, ir_cap = 0, ir_cap_shf = 0, ir_update = 0, so;
  logic [IR_LEN-1:0] ir;
  op_t op;
  logic [1:0] dr_sel;
  int checks = 0, failures = 0;
  logic [IR_LEN-1:0] codes [7] = '{INS_SAMPLE, INS_EXTEST, INS_BIST_BSR, INS_BFT, INS_BST, INS_INTEST, INS_BYPASS};

  instruction_register dut (.*);

  always #5 tck = ~tck;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    #1 reset_n = 0;
    #2; checks++; if (ir !== 7'b1110011) failures++;
    reset_n = 1;
    foreach (codes[k]) begin
      logic [IR_LEN-1:0] outbits;
      // capture
      @(negedge tck); ir_cap = 1; ir_cap_shf = 1;
      @(negedge tck); ir_cap = 0;
      // shift in the code, LSB first, and collect what comes out
      for (int i = 0; i < IR_LEN; i++) begin
        tdi = codes[k][i]; outbits[i] = so;
        @(negedge tck);
      end
      ir_cap_shf = 0;
      checks++; if (outbits !== IR_CAPTURE) begin failures++; $display("FAIL captured %b", outbits); end
      checks++; if (k > 0 && ir !== codes[k-1]) failures++;  // not yet updated
      @(posedge tck); #1 ir_update = 1;
      @(negedge tck); #1 ir_update = 0;
      checks++;
      if (ir !== codes[k] || op !== op_t'(codes[k][6:4]) || dr_sel !== codes[k][1:0]) begin
        failures++; $display("FAIL ir %b exp %b", ir, codes[k]);
      end
    end
    reset_n = 0; #1;
    checks++; if (ir !== INS_BYPASS || op !== OP_BYPASS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
