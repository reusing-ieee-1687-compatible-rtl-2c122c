// tb_subnetwork_s: segment S alone behind a TAP, with Inst 2 and Inst 3
// attached. Checks the 34-bit chain (C3, TDR 3, C2, TDR 2 from the TDO end),
// read-back of the complement of each write, bypassing TDR 2 with C2 and
// TDR 3 with C3 (shorter chains), and that the segment output changes only
// while TCK is low (lock-up stage). Here the lock-up stage feeds the TAP's
// falling-edge TDO stage directly, which adds one bit to every scan: scans are
// one bit longer and the read data starts at bit 1.
module tb_subnetwork_s;
  logic tck, tms, tdi, tdo, trst_n = 1;
  logic net_sel, net_capture, net_shift, net_update, net_rst, net_so;
  jtag_pkg::tap_state_t state;
  logic [15:0] do2, do3, di2, di3;
  logic c2, c3;
  int checks = 0, failures = 0, n_late = 0;

  jtag_bfm #(.HALF(50)) u_bfm (.tck, .tms, .tdi, .tdo);
  jtag_tap u_tap (.*);
  subnetwork_s dut (.tck, .rst(net_rst), .sel(net_sel), .capture(net_capture), .shift(net_shift),
                    .update(net_update), .si(tdi), .so(net_so), .do2, .di2, .do3, .di3, .c2, .c3);
  inverter_instrument u_i2 (.di(do2), .do_o(di2));
  inverter_instrument u_i3 (.di(do3), .do_o(di3));

  always @(net_so) if (tck && $time > 0) n_late++;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  function automatic logic [15:0] inv(logic [15:0] x);
    return ~x;
  endfunction

  function automatic logic [63:0] p34(logic [15:0] t2, logic cc2, logic [15:0] t3, logic cc3);
    return 64'({t2, cc2, t3, cc3});
  endfunction

  initial begin
    logic [63:0] o;
    logic [15:0] a, b, pa, pb;
    #1 trst_n = 0;
    #10 trst_n = 1;
    u_bfm.reset_tap();
    u_bfm.scan_ir(64'b10, 2, o);
    pa = 0; pb = 0;
    for (int k = 0; k < 6; k++) begin
      a = 16'($urandom); b = 16'($urandom);
      u_bfm.scan_dr(p34(a, 1'b0, b, 1'b0) << 1, 35, o); o = o >> 1;
      chk("C3", o[0], 0);
      chk("TDR3 read", o[16:1], 64'(inv(pb)));
      chk("C2", o[17], 0);
      chk("TDR2 read", o[33:18], 64'(inv(pa)));
      pa = a; pb = b;
    end
    // C2 = 1: chain becomes C3, TDR3, C2 (18 bits)
    u_bfm.scan_dr(p34(pa, 1'b1, pb, 1'b0) << 1, 35, o); o = o >> 1;
    chk("C2 set", c2, 1);
    u_bfm.scan_dr(64'({1'b1, 16'h0000, 1'b0, 1'b0}), 19, o); o = o >> 1;
    chk("C2 read back", o[17], 1);
    chk("TDR3 via short chain", o[16:1], 64'(inv(pb)));
    chk("TDR2 kept", do2, pa);
    pb = 0;
    // C3 = 1: chain becomes C3, C2 (C2 = 0 again), TDR2
    u_bfm.scan_dr(64'({1'b0, 16'h1111, 1'b1, 1'b0}), 19, o); o = o >> 1;
    chk("TDR3 read after C2 clear", o[16:1], 64'(inv(pb)));
    chk("C3 set", c3, 1);
    u_bfm.scan_dr(64'({16'hBEEF, 1'b0, 1'b0, 1'b0}), 19, o); o = o >> 1;
    chk("C3 read back", o[0], 1);
    chk("TDR2 via short chain", o[17:2], 64'(inv(pa)));
    chk("TDR2 written", do2, 16'hBEEF);
    chk("TDR3 kept", do3, 16'h1111);
    chk("segment output only changes while TCK low", n_late, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
