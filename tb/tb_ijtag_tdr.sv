// tb_ijtag_tdr: drives the TDR controls directly. Checks reset to 0, capture
// of di, shifting (LSB out first, 16 cycles), that the update stage changes
// only on the falling edge in Update with the register selected, and that a
// deselected register ignores capture, shift and update.
module tb_ijtag_tdr;
  localparam int W = 16;
  logic tck = 0, rst = 0, sel = 0, capture = 0, shift = 0, update = 0, si = 0;
  logic so;
  logic [W-1:0] di = '0, do_o;
  int checks = 0, failures = 0;

  ijtag_tdr #(.W(W)) dut (.*);

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  task automatic pulse();
    #5 tck = 1; #5 tck = 0; #1;
  endtask

  // capture di, shift din in and return what came out
  task automatic csu(input logic [W-1:0] d_in, input logic [W-1:0] cap, output logic [W-1:0] d_out,
                     input logic do_update);
    di = cap;
    capture = 1; pulse(); capture = 0;
    shift = 1;
    for (int i = 0; i < W; i++) begin
      si = d_in[i];
      d_out[i] = so;
      pulse();
    end
    shift = 0;
    update = do_update;
    pulse();
    update = 0;
  endtask

  initial begin
    logic [W-1:0] o, prev, v;
    #1 rst = 1;
    #2 rst = 0;
    chk("reset", do_o, 0);
    sel = 1;
    prev = '0;
    for (int k = 0; k < 20; k++) begin
      v = W'($urandom);
      csu(v, ~prev, o, 1'b1);
      chk("captured data shifted out", o, W'(~prev));
      chk("update stage", do_o, v);
      prev = v;
    end
    // update must not happen on the rising edge
    sel = 1; di = '0;
    capture = 1; pulse(); capture = 0;
    shift = 1; for (int i = 0; i < W; i++) begin si = 1'b1; pulse(); end shift = 0;
    update = 1; #5 tck = 1; #1;
    chk("no update at rising edge", do_o, prev);
    #4 tck = 0; #1;
    chk("update at falling edge", do_o, {W{1'b1}});
    update = 0;
    prev = {W{1'b1}};
    // deselected: no capture, no shift, no update
    shift = 1; for (int i = 0; i < W; i++) begin si = i[0]; pulse(); end shift = 0;
    chk("no update without Update-DR", do_o, prev);
    sel = 0;
    csu(16'h1234, 16'h0F0F, o, 1'b1);
    chk("deselected keeps update stage", do_o, prev);
    sel = 1;
    update = 1; pulse(); update = 0;
    chk("shift stage kept while deselected", do_o, 16'hAAAA);
    rst = 1; #1 rst = 0;
    chk("reset again", do_o, 0);
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
