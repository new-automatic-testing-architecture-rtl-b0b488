// tb_tap_fsm: self-checking test of the TAP state machine.
// A random TMS walk is compared step by step with the transition table of
// IEEE 1149.1 written out in the testbench by state name; five TMS-high
// cycles must reach Test-Logic-Reset from every state, and TRST* must force
// it asynchronously.
module tb_tap_fsm;
  import tap_pkg::*;
  logic tck = 0, tms = 1, trst_n = 1, tlr;
  tap_state_t state;
  int checks = 0, failures = 0;
  tap_fsm dut (.*);

  function automatic string nxt(string s, bit m);
    case (s)
      "TLR":   return m ? "TLR"  : "RTI";
      "RTI":   return m ? "SDR"  : "RTI";
      "SDR":   return m ? "SIR"  : "CDR";
      "CDR":   return m ? "E1D"  : "SHD";
      "SHD":   return m ? "E1D"  : "SHD";
      "E1D":   return m ? "UDR"  : "PDR";
      "PDR":   return m ? "E2D"  : "PDR";
      "E2D":   return m ? "UDR"  : "SHD";
      "UDR":   return m ? "SDR"  : "RTI";
      "SIR":   return m ? "TLR"  : "CIR";
      "CIR":   return m ? "E1I"  : "SHI";
      "SHI":   return m ? "E1I"  : "SHI";
      "E1I":   return m ? "UIR"  : "PIR";
      "PIR":   return m ? "E2I"  : "PIR";
      "E2I":   return m ? "UIR"  : "SHI";
      "UIR":   return m ? "SDR"  : "RTI";
      default: return "???";
    endcase
  endfunction

  function automatic string name(tap_state_t s);
    case (s)
      TAP_TLR: return "TLR"; TAP_RTI: return "RTI"; TAP_SEL_DR: return "SDR";
      TAP_CAPTURE_DR: return "CDR"; TAP_SHIFT_DR: return "SHD"; TAP_EXIT1_DR: return "E1D";
      TAP_PAUSE_DR: return "PDR"; TAP_EXIT2_DR: return "E2D"; TAP_UPDATE_DR: return "UDR";
      TAP_SEL_IR: return "SIR"; TAP_CAPTURE_IR: return "CIR"; TAP_SHIFT_IR: return "SHI";
      TAP_EXIT1_IR: return "E1I"; TAP_PAUSE_IR: return "PIR"; TAP_EXIT2_IR: return "E2I";
      TAP_UPDATE_IR: return "UIR"; default: return "???";
    endcase
  endfunction

  task automatic tick; #5 tck = 1; #5 tck = 0; endtask
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string model;
    int visited [string];
    #1 trst_n = 0;
    #2 check(state == TAP_TLR && tlr, "async reset");
    trst_n = 1;
    model = "TLR";
    for (int n = 0; n < 3000; n++) begin
      tms = ($urandom % 3) == 0;
      tick;
      model = nxt(model, tms);
      visited[model] = 1;
      check(name(state) == model, $sformatf("step %0d got %s exp %s", n, name(state), model));
      check(tlr == (model == "TLR"), "tlr flag");
      if (n % 97 == 0) begin
        tms = 1; repeat (5) tick; model = "TLR";
        check(state == TAP_TLR, "five TMS-high cycles reach TLR");
      end
    end
    check(visited.num() == 16, $sformatf("visited %0d states", visited.num()));
    tms = 0; tick; tick; #2 trst_n = 0; #1 check(state == TAP_TLR, "TRST* async"); trst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
