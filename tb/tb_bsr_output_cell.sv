// Testbench for bsr_output_cell: checks capture of Cout, shift of Sin and,
// with BIST_mode_O high, the signature step CAP <= Sin ^ Cout (rising TCK,
// under BSR_CapShf), the UPD load on falling TCK under BSR_Update, and the
// Mode_Test multiplexer on Pout.
module tb_bsr_output_cell;
  logic tck = 0, reset_n = 1, cout = 0, sin = 0;
  logic bsr_capshf = 0, bsr_shf = 0, bsr_update = 0, mode_test = 0, bist_mode_o = 0;
  logic pout, sout;
  logic m_cap = 0, m_upd = 0;
  int checks = 0, failures = 0, misr_steps = 0;

  bsr_output_cell dut (.*);

  always #5 tck = ~tck;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge tck)
    if (reset_n && bsr_capshf) begin
      m_cap <= bist_mode_o ? (sin ^ cout) : (bsr_shf ? sin : cout);
      if (bist_mode_o) misr_steps++;
    end
  always @(negedge tck) if (reset_n && bsr_update) m_upd <= m_cap;

  initial begin
    #1 reset_n = 0;
    #11 reset_n = 1;
    repeat (400) begin
      @(posedge tck); #1;
      {cout, sin, bsr_capshf, bsr_shf, bsr_update, mode_test, bist_mode_o} = 7'($urandom);
      #1;
      checks++;
      if (pout !== (mode_test ? m_upd : cout) || sout !== m_cap) begin
        failures++; $display("FAIL pout=%0d sout=%0d model cap=%0d upd=%0d", pout, sout, m_cap, m_upd);
      end
      @(negedge tck); #1;
      checks++;
      if (pout !== (mode_test ? m_upd : cout)) failures++;
    end
    checks++; if (misr_steps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
