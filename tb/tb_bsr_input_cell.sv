// Testbench for bsr_input_cell: checks capture of Pin and shift of Sin into
// CAP on rising TCK (only while BSR_CapShf is high), the UPD load from CAP on
// falling TCK under BSR_Update, the BIST path (UPD loads Cin_p while
// BIST_mode_I is high), the Mode_Test multiplexer on Cin and the reset.
module tb_bsr_input_cell;
  logic tck = 0, reset_n = 1, pin = 0, sin = 0, cin_p = 0;
  logic bsr_capshf = 0, bsr_shf = 0, bsr_update = 0, mode_test = 0, bist_mode_i = 0;
  logic cin, sout;
  logic m_cap = 0, m_upd = 0;
  int checks = 0, failures = 0;

  bsr_input_cell dut (.*);

  always #5 tck = ~tck;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // reference model
  always @(posedge tck) if (reset_n && bsr_capshf) m_cap <= bsr_shf ? sin : pin;
  always @(negedge tck) if (reset_n && (bsr_update || bist_mode_i)) m_upd <= bist_mode_i ? cin_p : m_cap;

  initial begin
    #1 reset_n = 0;
    #11 reset_n = 1;
    repeat (400) begin
      @(posedge tck); #1;
      {pin, sin, cin_p, bsr_capshf, bsr_shf, bsr_update, mode_test, bist_mode_i} = 8'($urandom);
      #1;
      checks++;
      if (cin !== (mode_test ? m_upd : pin) || sout !== m_cap) begin
        failures++; $display("FAIL cin=%0d sout=%0d model cap=%0d upd=%0d", cin, sout, m_cap, m_upd);
      end
      @(negedge tck); #1;
      checks++;
      if (cin !== (mode_test ? m_upd : pin)) failures++;
    end
    reset_n = 0; mode_test = 1; #1;
    checks++; if (cin !== 0 || sout !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
