// tb_tap_controller: checks the TAP state machine against the IEEE 1149.1
// state diagram, written here as a reference table indexed by state and TMS.
// Drives 2000 random TMS values, checks the strobes, the clock enable (state
// frozen while low), the asynchronous nTRST and the five-TMS-high reset from
// every state.
//
// The reference table is the standard IEEE 1149.1 state diagram.
module tb_tap_controller;
  import ea_mocd_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1, tck_en = 1'b1, tms = 1'b1;
  tap_state_e state;
  logic tlr, cdr, sdr, udr, cir, sir, uir;

  int checks = 0, failures = 0;

  tap_controller dut (
    .tck, .trst_n, .tck_en, .tms, .state,
    .test_logic_reset (tlr), .capture_dr (cdr), .shift_dr (sdr), .update_dr (udr),
    .capture_ir (cir), .shift_ir (sir), .update_ir (uir)
  );

  // reference: next state for TMS=0 and TMS=1, by state name
  function automatic string ref_next(input string s, input bit t);
    case (s)
      "TLR":  return t ? "TLR"  : "RTI";
      "RTI":  return t ? "SDR"  : "RTI";
      "SDR":  return t ? "SIR"  : "CDR";
      "CDR":  return t ? "E1D"  : "SHD";
      "SHD":  return t ? "E1D"  : "SHD";
      "E1D":  return t ? "UDR"  : "PDR";
      "PDR":  return t ? "E2D"  : "PDR";
      "E2D":  return t ? "UDR"  : "SHD";
      "UDR":  return t ? "SDR"  : "RTI";
      "SIR":  return t ? "TLR"  : "CIR";
      "CIR":  return t ? "E1I"  : "SHI";
      "SHI":  return t ? "E1I"  : "SHI";
      "E1I":  return t ? "UIR"  : "PIR";
      "PIR":  return t ? "E2I"  : "PIR";
      "E2I":  return t ? "UIR"  : "SHI";
      "UIR":  return t ? "SDR"  : "RTI";
      default: return "???";
    endcase
  endfunction

  function automatic string name_of(input tap_state_e s);
    case (s)
      TLR: return "TLR";  RTI: return "RTI";
      SEL_DR: return "SDR"; CAPTURE_DR: return "CDR"; SHIFT_DR: return "SHD";
      EXIT1_DR: return "E1D"; PAUSE_DR: return "PDR"; EXIT2_DR: return "E2D";
      UPDATE_DR: return "UDR";
      SEL_IR: return "SIR"; CAPTURE_IR: return "CIR"; SHIFT_IR: return "SHI";
      EXIT1_IR: return "E1I"; PAUSE_IR: return "PIR"; EXIT2_IR: return "E2I";
      UPDATE_IR: return "UIR";
      default: return "bad";
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string exp;
    int    visited [string];
    #1 trst_n = 1'b0;
    #9 trst_n = 1'b1;
    check(name_of(state) == "TLR", "reset state");
    exp = "TLR";
    for (int i = 0; i < 2000; i++) begin
      tms = 1'($urandom_range(0, 1));
      // bias towards staying in shift/pause states less often
      exp = ref_next(exp, tms);
      pulse();
      visited[exp] = 1;
      check(name_of(state) == exp, $sformatf("step %0d: %s expected %s", i, name_of(state), exp));
      check(sdr == (exp == "SHD") && cdr == (exp == "CDR") && udr == (exp == "UDR") &&
            sir == (exp == "SHI") && cir == (exp == "CIR") && uir == (exp == "UIR") &&
            tlr == (exp == "TLR"), $sformatf("strobes in %s", exp));
    end
    check(visited.num() == 16, $sformatf("all 16 states visited (%0d)", visited.num()));

    // frozen while tck_en is low
    begin
      tap_state_e s0;
      s0 = state;
      tck_en = 1'b0;
      repeat (4) begin tms = ~tms; pulse(); end
      check(state == s0, "state held with clock enable low");
      tck_en = 1'b1;
    end

    // five TMS-high clocks reach TLR from every state
    for (int s = 0; s < 16; s++) begin
      // walk to a state by random TMS until it equals s, then apply 5 ones
      int guard;
      guard = 0;
      while (int'(state) != s && guard < 200) begin
        tms = 1'($urandom_range(0, 1)); pulse(); guard++;
      end
      tms = 1'b1;
      repeat (5) pulse();
      check(state == TLR, $sformatf("5x TMS=1 from state %0d", s));
      tms = 1'b0; pulse();
    end

    // asynchronous reset
    tms = 1'b0; pulse(); tms = 1'b1; pulse();   // RTI -> SEL_DR
    #2 trst_n = 1'b0;
    #1 check(state == TLR, "asynchronous nTRST");
    trst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
