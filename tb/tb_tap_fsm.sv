// tb_tap_fsm: checks the TAP controller FSM against an independent table of
// the IEEE 1149.1 state graph, over 3000 random TMS values, plus the
// five-ones-to-reset property, the asynchronous reset and the decoded
// control outputs.
module tb_tap_fsm;
  import jtag_pkg::*;
  logic tck = 0, trst = 0, tms = 1;
  tap_state_t state;
  logic capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir, tlr;
  int checks = 0, failures = 0;

  tap_fsm dut (.*);

  // next state for TMS = 0 and TMS = 1, indexed by the numeric state value
  tap_state_t nx0 [16];
  tap_state_t nx1 [16];
  tap_state_t ref_st;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic step(input logic v);
    tms = v;
    #5 tck = 1;
    ref_st = v ? nx1[ref_st] : nx0[ref_st];
    #1;
    chk($sformatf("state %s vs %s", state.name(), ref_st.name()), state == ref_st);
    chk("decodes", capture_dr == (ref_st == CAPTURE_DR) && shift_dr == (ref_st == SHIFT_DR) &&
        update_dr == (ref_st == UPDATE_DR) && capture_ir == (ref_st == CAPTURE_IR) &&
        shift_ir == (ref_st == SHIFT_IR) && update_ir == (ref_st == UPDATE_IR) && tlr == (ref_st == TLR));
    #4 tck = 0;
  endtask

  initial begin
    nx0[TLR] = RTI;            nx1[TLR] = TLR;
    nx0[RTI] = RTI;            nx1[RTI] = SEL_DR;
    nx0[SEL_DR] = CAPTURE_DR;  nx1[SEL_DR] = SEL_IR;
    nx0[CAPTURE_DR] = SHIFT_DR; nx1[CAPTURE_DR] = EXIT1_DR;
    nx0[SHIFT_DR] = SHIFT_DR;  nx1[SHIFT_DR] = EXIT1_DR;
    nx0[EXIT1_DR] = PAUSE_DR;  nx1[EXIT1_DR] = UPDATE_DR;
    nx0[PAUSE_DR] = PAUSE_DR;  nx1[PAUSE_DR] = EXIT2_DR;
    nx0[EXIT2_DR] = SHIFT_DR;  nx1[EXIT2_DR] = UPDATE_DR;
    nx0[UPDATE_DR] = RTI;      nx1[UPDATE_DR] = SEL_DR;
    nx0[SEL_IR] = CAPTURE_IR;  nx1[SEL_IR] = TLR;
    nx0[CAPTURE_IR] = SHIFT_IR; nx1[CAPTURE_IR] = EXIT1_IR;
    nx0[SHIFT_IR] = SHIFT_IR;  nx1[SHIFT_IR] = EXIT1_IR;
    nx0[EXIT1_IR] = PAUSE_IR;  nx1[EXIT1_IR] = UPDATE_IR;
    nx0[PAUSE_IR] = PAUSE_IR;  nx1[PAUSE_IR] = EXIT2_IR;
    nx0[EXIT2_IR] = SHIFT_IR;  nx1[EXIT2_IR] = UPDATE_IR;
    nx0[UPDATE_IR] = RTI;      nx1[UPDATE_IR] = SEL_DR;
    #1 trst = 1;
    #2 trst = 0;
    ref_st = TLR;
    chk("async reset", state == TLR);
    for (int i = 0; i < 3000; i++) step(($urandom % 3) != 0 ? 1'b0 : 1'b1);
    // five TMS = 1 clocks reach Test-Logic-Reset from anywhere
    for (int s = 0; s < 40; s++) begin
      repeat (s % 7) step($urandom % 2);
      repeat (5) step(1'b1);
      chk("five ones reach TLR", state == TLR);
    end
    // asynchronous reset from the middle of a scan
    step(0); step(1); step(0); step(0);
    trst = 1; #1;
    chk("trst", state == TLR);
    trst = 0; ref_st = TLR;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
