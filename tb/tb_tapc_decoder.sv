// Testbench for tapc_decoder. For the three BIST instructions, every state is
// compared with the 19-bit rows of the decoder truth table (signal order
// RESET, Enable, Select, Enable_Sync, IR_Cap, IR_Cap_Shf, IR_Update,
// BSR_CapShf, BSR_Shf, BSR_Update, BYP_Shf, BYP_CapShf, Mode_Test, BIST_mode,
// BIST_Inst_enable, Hold_BILBO, B1_BILBO, B2_BILBO, Run-Test-Idle); X marks a
// don't-care. The public instructions are checked against the usual
// IEEE 1149.1 behaviour.
module tb_tapc_decoder;
  import bist_pkg::*;
  tap_state_t state;
  op_t op;
  tapc_ctrl_t ctrl;
  int checks = 0, failures = 0;
  string tbsr [16], tbft [16], tbst [16];

  tapc_decoder dut (.*);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic bit match(tapc_ctrl_t c, string s);
    for (int i = 0; i < 19; i++)
      if (s[i] != "X" && c[18-i] != (s[i] == "1")) return 0;
    return 1;
  endfunction

  initial begin
    // common prefixes per state (first 7 signals), then DR/BIST part
    for (int s = 0; s < 16; s++) begin
      case (s)
        4'h0, 4'h1, 4'h3, 4'h6, 4'h7: begin tbsr[s] = "110000000000101X000"; tbft[s] = "1100000000001011110"; end
        4'h2: begin tbsr[s] = "100000011000101X000"; tbft[s] = "1000000000001010110"; end
        4'h5: begin tbsr[s] = "110000000100101X000"; tbft[s] = "1100000000001011110"; end
        4'h4, 4'h8, 4'h9, 4'hB: begin tbsr[s] = "111000000000101X000"; tbft[s] = "1110000000001011110"; end
        4'hA: begin tbsr[s] = "101001000000101X000"; tbft[s] = "1010010000001011110"; end
        4'hC: begin tbsr[s] = "111000011000111X001"; tbft[s] = "1110000110001110101"; end
        4'hD: begin tbsr[s] = "111000100000101X000"; tbft[s] = "1110001000001011110"; end
        4'hE: begin tbsr[s] = "111011000000101X000"; tbft[s] = "1110110000001011110"; end
        default: begin tbsr[s] = "011000000000000X000"; tbft[s] = "011000000000000X000"; end
      endcase
      tbst[s] = (s == 4'hC) ? "1110000110001110011" : tbft[s];
    end
    for (int s = 0; s < 16; s++) begin
      state = tap_state_t'(s);
      op = OP_BIST_BSR; #1; checks++;
      if (!match(ctrl, tbsr[s])) begin failures++; $display("FAIL BIST-BSR state %h got %b exp %s", s, ctrl, tbsr[s]); end
      op = OP_BFT; #1; checks++;
      if (!match(ctrl, tbft[s])) begin failures++; $display("FAIL BFT state %h got %b exp %s", s, ctrl, tbft[s]); end
      op = OP_BST; #1; checks++;
      if (!match(ctrl, tbst[s])) begin failures++; $display("FAIL BST state %h got %b exp %s", s, ctrl, tbst[s]); end
      // public instructions
      for (int o = 0; o < 8; o++) begin
        bit is_bsr, dr_cap, dr_shift;
        if (o inside {2, 3, 4}) continue;
        op = op_t'(o); #1;
        is_bsr = o inside {0, 1, 6};
        dr_cap = (s == 4'h6); dr_shift = (s == 4'h2);
        checks++;
        if (ctrl.bsr_capshf !== (is_bsr && (dr_cap || dr_shift)) || ctrl.bsr_shf !== (is_bsr && dr_shift) ||
            ctrl.bsr_update !== (is_bsr && s == 4'h5) ||
            ctrl.byp_capshf !== (!is_bsr && (dr_cap || dr_shift)) || ctrl.byp_shf !== (!is_bsr && dr_shift) ||
            ctrl.mode_test !== ((o == 1 || o == 6) && s != 4'hF) ||
            ctrl.enable_sync !== (o == 6 && s == 4'hC) ||
            ctrl.bist_mode || ctrl.bist_inst_enable || ctrl.b1_bilbo || ctrl.b2_bilbo || ctrl.hold_bilbo ||
            ctrl[18:16] !== tbsr[s].substr(0, 2).atobin() ||
            ctrl[14:12] !== tbsr[s].substr(4, 6).atobin() ||
            ctrl.run_test_idle !== (s == 4'hC)) begin
          failures++; $display("FAIL op %0d state %h got %b", o, s, ctrl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
