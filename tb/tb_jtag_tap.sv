// tb_jtag_tap -- random TMS sequences; after every TCK rise the controller
// state is compared with a reference transition table written from the
// IEEE 1149.1 state diagram.  Also checks that five TMS=1 clocks reach
// Test-Logic-Reset from any state.
module tb_jtag_tap;
  import btim_pkg::*;
  logic clk = 0, rst_n = 0, tck = 0, tms = 1, tdi = 0;
  tap_state_t state;
  logic tck_rise, tck_fall, tdi_s;
  int checks = 0, failures = 0;
  string ref_st = "RESET";
  int visited [string];

  jtag_tap dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic string nxt(string s, bit m);
    case (s)
      "RESET": return m ? "RESET" : "IDLE";
      "IDLE":  return m ? "SELDR" : "IDLE";
      "SELDR": return m ? "SELIR" : "CAPDR";
      "CAPDR": return m ? "EX1DR" : "SHDR";
      "SHDR":  return m ? "EX1DR" : "SHDR";
      "EX1DR": return m ? "UPDR"  : "PADR";
      "PADR":  return m ? "EX2DR" : "PADR";
      "EX2DR": return m ? "UPDR"  : "SHDR";
      "UPDR":  return m ? "SELDR" : "IDLE";
      "SELIR": return m ? "RESET" : "CAPIR";
      "CAPIR": return m ? "EX1IR" : "SHIR";
      "SHIR":  return m ? "EX1IR" : "SHIR";
      "EX1IR": return m ? "UPIR"  : "PAIR";
      "PAIR":  return m ? "EX2IR" : "PAIR";
      "EX2IR": return m ? "UPIR"  : "SHIR";
      default: return m ? "SELDR" : "IDLE";   // UPIR
    endcase
  endfunction

  function automatic string name(tap_state_t s);
    case (s)
      TAP_TEST_RESET: return "RESET"; TAP_RUN_IDLE: return "IDLE";
      TAP_SEL_DR: return "SELDR"; TAP_CAPT_DR: return "CAPDR"; TAP_SHIFT_DR: return "SHDR";
      TAP_EXIT1_DR: return "EX1DR"; TAP_PAUSE_DR: return "PADR"; TAP_EXIT2_DR: return "EX2DR";
      TAP_UPDATE_DR: return "UPDR"; TAP_SEL_IR: return "SELIR"; TAP_CAPT_IR: return "CAPIR";
      TAP_SHIFT_IR: return "SHIR"; TAP_EXIT1_IR: return "EX1IR"; TAP_PAUSE_IR: return "PAIR";
      TAP_EXIT2_IR: return "EX2IR"; TAP_UPDATE_IR: return "UPIR";
      default: return "BAD";
    endcase
  endfunction

  task automatic tck_cycle(bit m);
    tms = m; repeat (4) @(negedge clk);
    tck = 1; repeat (4) @(negedge clk);
    tck = 0;
    ref_st = nxt(ref_st, m);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    check(name(state) == "RESET", "power-up state");
    for (int i = 0; i < 3000; i++) begin
      tck_cycle($urandom_range(0, 99) < 40);
      check(name(state) == ref_st, $sformatf("state %s expected %s", name(state), ref_st));
      visited[ref_st] = 1;
      if (i % 500 == 499) begin
        repeat (5) tck_cycle(1'b1);
        check(state == TAP_TEST_RESET, "five TMS=1 reset");
      end
    end
    check(visited.num() == 16, "all 16 states visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
