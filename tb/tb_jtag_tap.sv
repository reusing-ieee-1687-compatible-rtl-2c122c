// tb_jtag_tap: the chip TAP with an 8-bit model register standing in for the
// 1687 network. Checks the reset instruction (BYPASS, 1-bit register with
// capture 0), the IR capture value, network selection by instruction, that
// DR scans reach the network (capture, shift, one update per scan) and that
// Test-Logic-Reset returns the IR to BYPASS and asserts the network reset.
module tb_jtag_tap;
  import jtag_pkg::*;
  logic tck, tms, tdi, tdo, trst_n = 1;
  logic net_sel, net_capture, net_shift, net_update, net_rst, net_so;
  tap_state_t state;
  logic [7:0] sh, upd;
  int checks = 0, failures = 0, n_upd = 0, n_rst = 0;
  localparam logic [7:0] CAPV = 8'hC5;

  jtag_bfm #(.HALF(50)) u_bfm (.tck, .tms, .tdi, .tdo);
  jtag_tap dut (.*);

  always @(posedge tck) begin
    if (net_capture)    sh <= CAPV;
    else if (net_shift) sh <= {tdi, sh[7:1]};
  end
  always @(negedge tck) if (net_update) begin upd <= sh; n_upd++; end
  always @(posedge tck) if (net_rst) n_rst++;
  assign net_so = sh[0];

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    logic [63:0] o, d;
    #1 trst_n = 0;
    #10 trst_n = 1;
    u_bfm.reset_tap();
    chk("reset instruction is BYPASS", net_sel, 0);
    d = 64'($urandom);
    u_bfm.scan_dr(d, 10, o);
    chk("bypass path", o[9:0], {d[8:0], 1'b0});
    chk("no network update in bypass", n_upd, 0);
    u_bfm.scan_ir(64'b10, 2, o);
    chk("IR capture", o[1:0], 2'b01);
    chk("network selected", net_sel, 1);
    for (int k = 0; k < 5; k++) begin
      d = 64'($urandom);
      u_bfm.scan_dr(d, 8, o);
      chk("network capture out", o[7:0], CAPV);
      chk("network update", upd, d[7:0]);
      chk("one update per scan", n_upd, k + 1);
    end
    n_rst = 0;
    u_bfm.reset_tap();
    chk("network reset in TLR", n_rst > 0, 1);
    chk("TLR restores BYPASS", net_sel, 0);
    u_bfm.scan_ir(64'b10, 2, o);
    chk("selected again", net_sel, 1);
    trst_n = 0; #1;
    chk("TRST restores BYPASS", net_sel, 0);
    chk("TRST resets FSM", state, TLR);
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
