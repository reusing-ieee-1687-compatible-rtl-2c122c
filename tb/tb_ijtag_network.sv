// tb_ijtag_network: the example network with segment S attached locally and
// Inst 2/Inst 3 wired straight to their TDRs (the unshared reference), behind
// a TAP. Runs the full access sequence of ijtag_seq (instrument test
// procedure, C4 and C2 bypasses, BYPASS instruction) and checks that the
// segment scan input changes only while TCK is low.
module tb_ijtag_network;
  logic tck, tms, tdi, tdo, trst_n = 1, start = 0, done;
  logic net_sel, net_capture, net_shift, net_update, net_rst, net_so;
  jtag_pkg::tap_state_t state;
  logic s_si, s_so, s_sel, c1, c4, c2, c3;
  logic [15:0] do2, do3, di2, di3;
  int checks = 0, failures = 0, sc, sf, nsb, ntb, nib, n_late = 0;

  ijtag_seq #(.HALF(50), .REPS(2)) u_seq (.tck, .tms, .tdi, .tdo, .start, .done, .checks(sc),
    .failures(sf), .n_s_bypass(nsb), .n_tdr_bypass(ntb), .n_ir_bypass(nib));
  jtag_tap u_tap (.*);
  ijtag_network dut (.tck, .rst(net_rst), .sel(net_sel), .capture(net_capture), .shift(net_shift),
    .update(net_update), .tdi, .so(net_so), .s_si, .s_so, .s_sel, .c1, .c4);
  subnetwork_s u_s (.tck, .rst(net_rst), .sel(s_sel), .capture(net_capture), .shift(net_shift),
    .update(net_update), .si(s_si), .so(s_so), .do2, .di2, .do3, .di3, .c2, .c3);
  inverter_instrument u_i2 (.di(do2), .do_o(di2));
  inverter_instrument u_i3 (.di(do3), .do_o(di3));

  always @(s_si) if (tck && $time > 0) n_late++;

  initial begin
    #1 trst_n = 0;
    #10 trst_n = 1;
    start = 1;
    wait (done);
    checks = sc + 1; failures = sf;
    if (n_late != 0) begin failures++; $display("FAIL s_si changed while TCK high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
