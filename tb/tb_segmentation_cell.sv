// Testbench for segmentation_cell: all input combinations; the next gate
// sees the test pattern only while BIST_Inst_enable is high, and the normal
// value always reaches the signature register.
module tb_segmentation_cell;
  logic bist_inst_enable, normal_data, test_pattern, to_next_gate, to_misr;
  int checks = 0, failures = 0;

  segmentation_cell dut (.*);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {bist_inst_enable, normal_data, test_pattern} = 3'(i);
      #1;
      checks++;
      if (to_next_gate !== (bist_inst_enable ? test_pattern : normal_data)) failures++;
      checks++;
      if (to_misr !== normal_data) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
