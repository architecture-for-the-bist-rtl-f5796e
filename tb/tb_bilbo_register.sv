// Testbench for bilbo_register (W = 8, feedback x^8 + x^6 + x^5 + x^4 + 1).
// A reference model in the testbench, written from the LFSR/MISR equations,
// follows every clock: normal parallel load, scan shift, TPG (autonomous
// LFSR; the period of 255 states is also checked), MISR with random
// responses, and hold. Scan-out is compared in scan mode.
module tb_bilbo_register;
  localparam int W = 8;
  localparam logic [W-1:0] TAPS = 8'b0011_1000;  // c4, c5, c6
  logic clk = 0, rst_n = 0, b1, b2, hold, scan_in, scan_out;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  bilbo_register #(.W(W), .TAPS(TAPS)) dut (.clk, .rst_n, .b1, .b2, .hold, .d, .scan_in, .q, .scan_out);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [W-1:0] step(logic [W-1:0] x, logic bb1, logic bb2, logic hh, logic [W-1:0] dd, logic si);
    logic fb;
    logic [W-1:0] n;
    fb = x[W-1] ^ (^(x[W-2:0] & TAPS[W-2:0]));
    if (hh) return x;
    if (!bb1 && !bb2) return dd;
    n = {x[W-2:0], (bb1 && bb2) ? si : fb};
    if (!bb1 && bb2) n = n ^ dd;
    return n;
  endfunction

  task automatic cyc(logic bb1, logic bb2, logic hh);
    b1 = bb1; b2 = bb2; hold = hh; d = W'($urandom); scan_in = 1'($urandom);
    #1;
    if (bb1 && bb2 && !hh) begin checks++; if (scan_out !== model[W-1]) failures++; end
    model = step(model, bb1, bb2, hh, d, scan_in);
    @(negedge clk);
    checks++;
    if (q !== model) begin failures++; $display("FAIL mode %0d%0d%0d got %h exp %h", bb1, bb2, hh, q, model); end
  endtask

  initial begin
    logic [W-1:0] start;
    int period;
    b1 = 0; b2 = 0; hold = 0; d = 0; scan_in = 0; model = 0;
    @(negedge clk); rst_n = 1;
    repeat (5) cyc(0, 0, 0);          // normal
    repeat (10) cyc(1, 1, 0);         // scan
    repeat (5) cyc(0, 0, 1);          // hold
    repeat (5) cyc(1, 1, 1);          // hold with B1 = B2 = 1
    repeat (20) cyc(0, 1, 0);         // MISR
    repeat (3) cyc(1, 0, 1);          // hold
    // TPG from a nonzero seed, measure the period
    if (model == 0) begin
      b1 = 0; b2 = 0; hold = 0; d = 8'h01; model = 8'h01; @(negedge clk);
    end
    start = model; period = 0;
    do begin cyc(1, 0, 0); period++; end while (model != start && period < 300);
    checks++;
    if (period != 255) begin failures++; $display("FAIL TPG period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
