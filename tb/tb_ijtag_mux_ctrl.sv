// tb_ijtag_mux_ctrl: checks that with C = 0 the scan path comes from si_path
// and with C = 1 from si_byp, that C is written by shift + update (falling
// edge) only when selected, that Capture-DR loads the current C value, and
// reset to 0.
module tb_ijtag_mux_ctrl;
  logic tck = 0, rst = 0, sel = 1, capture = 0, shift = 0, update = 0, si_path = 0, si_byp = 0;
  logic so, ctrl;
  int checks = 0, failures = 0;

  ijtag_mux_ctrl dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b vs %b (t=%0t)", what, got, exp, $time); end
  endtask

  task automatic pulse();
    #5 tck = 1; #5 tck = 0;
  endtask

  task automatic set_c(input logic v);
    // value enters through the currently selected input
    shift = 1;
    if (ctrl) si_byp = v; else si_path = v;
    pulse();
    shift = 0;
    update = 1; pulse(); update = 0;
  endtask

  initial begin
    #1 rst = 1; #1 rst = 0;
    chk("reset", ctrl, 1'b0);
    shift = 1;
    for (int i = 0; i < 30; i++) begin
      si_path = $urandom; si_byp = $urandom;
      pulse();
      chk("C=0 takes si_path", so, si_path);
    end
    shift = 0;
    set_c(1'b1);
    chk("C written", ctrl, 1'b1);
    capture = 1; pulse(); capture = 0;
    chk("capture loads C", so, 1'b1);
    shift = 1;
    for (int i = 0; i < 30; i++) begin
      si_path = $urandom; si_byp = $urandom;
      pulse();
      chk("C=1 takes si_byp", so, si_byp);
    end
    shift = 0;
    sel = 0;
    si_byp = 0; si_path = 0;
    shift = 1; pulse(); shift = 0; update = 1; pulse(); update = 0;
    chk("deselected: C kept", ctrl, 1'b1);
    sel = 1;
    set_c(1'b0);
    chk("C cleared", ctrl, 1'b0);
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
