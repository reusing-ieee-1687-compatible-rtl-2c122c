// ijtag_seq: retargeted-pattern player for the example 1687 network.
//
// Drives one chip's JTAG port (through jtag_bfm) with the access sequence the
// network was validated with, and checks every bit shifted out against values
// computed here from the network structure (Inst 1..3 invert their input):
//   1. TAP reset, IR load of the 1687-access instruction (IR capture checked).
//   2. REPS calls of the instrument test procedure on TDR 2 and TDR 3 at the
//      same time: write AAAAh, 5757h, 1234h, 0000h, each scan reading back the
//      complement of the previous write (FFFFh after reset). Every write is
//      directly followed (two TCK edges later) by the capture of the next scan.
//   3. Segment S switched off the path with C4 = 1 (18-bit scans), then on.
//   4. TDR 2 switched off the path with C2 = 1 (36-bit scan), then on.
//   5. BYPASS instruction (1-bit register checked), then back to the network.
// Scan vectors are packed bit 0 first; bit 0 is the register nearest TDO (C4).
// RUNLOOP > 0 idles that many TCK cycles in Run-Test/Idle after every DR
// scan, the way an iRunLoop between two iApply groups would.
// QUIET = 1 counts mismatches without printing them, for runs that are
// expected to fail.
module ijtag_seq #(
  parameter time HALF = 100,
  parameter int  REPS = 2,
  parameter bit  QUIET = 0,
  parameter int  RUNLOOP = 0
) (
  output logic tck,
  output logic tms,
  output logic tdi,
  input  logic tdo,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_s_bypass,
  output int   n_tdr_bypass,
  output int   n_ir_bypass
);

  jtag_bfm #(.HALF(HALF)) u_bfm (.tck, .tms, .tdi, .tdo);

  typedef logic [15:0] w16_t;

  function automatic logic [63:0] pack52(w16_t t1, logic c1, w16_t t2, logic c2,
                                         w16_t t3, logic c3, logic c4);
    logic [63:0] v = '0;
    v[0] = c4; v[1] = c3; v[17:2] = t3; v[18] = c2; v[34:19] = t2; v[35] = c1; v[51:36] = t1;
    return v;
  endfunction

  function automatic logic [63:0] pack18(w16_t t1, logic c1, logic c4);
    logic [63:0] v = '0;
    v[0] = c4; v[1] = c1; v[17:2] = t1;
    return v;
  endfunction

  function automatic logic [63:0] pack36(w16_t t1, logic c1, logic c2, w16_t t3, logic c3, logic c4);
    logic [63:0] v = '0;
    v[0] = c4; v[1] = c3; v[17:2] = t3; v[18] = c2; v[19] = c1; v[35:20] = t1;
    return v;
  endfunction

  function automatic w16_t inv(w16_t x);
    return ~x;
  endfunction

  task automatic dr_scan(input logic [63:0] din, input int len, output logic [63:0] dout);
    u_bfm.scan_dr(din, len, dout);
    if (RUNLOOP > 0) u_bfm.idle(RUNLOOP);
  endtask

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (!QUIET) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [63:0] o;
    w16_t p1, p2, p3, w1, w2, w3;
    w16_t pat [4] = '{16'hAAAA, 16'h5757, 16'h1234, 16'h0000};
    done = 1'b0; checks = 0; failures = 0;
    n_s_bypass = 0; n_tdr_bypass = 0; n_ir_bypass = 0;
    wait (start);
    u_bfm.reset_tap();
    u_bfm.scan_ir(64'b10, 2, o);
    chk("IR capture", o, 64'b01);
    u_bfm.idle(4);
    p1 = '0; p2 = '0; p3 = '0;
    // 2. instrument test procedure on TDR 2 and TDR 3
    for (int r = 0; r < REPS; r++) begin
      for (int s = 0; s < 4; s++) begin
        w1 = 16'($urandom);
        w2 = pat[s];
        w3 = pat[s];
        dr_scan(pack52(w1, 1'b0, w2, 1'b0, w3, 1'b0, 1'b0), 52, o);
        chk($sformatf("rep %0d step %0d TDR1", r, s), 64'(o[51:36]), 64'(inv(p1)));
        chk($sformatf("rep %0d step %0d TDR2", r, s), 64'(o[34:19]), 64'(inv(p2)));
        chk($sformatf("rep %0d step %0d TDR3", r, s), 64'(o[17:2]),  64'(inv(p3)));
        chk($sformatf("rep %0d step %0d C bits", r, s), 64'({o[35], o[18], o[1], o[0]}), 64'(0));
        p1 = w1; p2 = w2; p3 = w3;
      end
    end
    // 3. segment S off the path (C4 = 1), then back on
    w1 = 16'h0F0F;
    dr_scan(pack52(w1, 1'b0, 16'h0000, 1'b0, 16'h0000, 1'b0, 1'b1), 52, o);
    chk("before S bypass TDR2", 64'(o[34:19]), 64'(inv(p2)));
    p1 = w1; p2 = '0; p3 = '0;
    for (int k = 0; k < 3; k++) begin
      w1 = 16'($urandom);
      dr_scan(pack18(w1, 1'b0, (k == 2) ? 1'b0 : 1'b1), 18, o);
      chk("S bypassed: C4", 64'(o[0]), 64'(1));
      chk("S bypassed: TDR1", 64'(o[17:2]), 64'(inv(p1)));
      p1 = w1;
      n_s_bypass++;
    end
    u_bfm.idle(3);
    w1 = 16'h1357;
    dr_scan(pack52(w1, 1'b0, 16'hC3C3, 1'b0, 16'h3C3C, 1'b0, 1'b0), 52, o);
    chk("S back: C4", 64'(o[0]), 64'(0));
    chk("S back: TDR1", 64'(o[51:36]), 64'(inv(p1)));
    chk("S back: TDR2", 64'(o[34:19]), 64'(inv(p2)));
    chk("S back: TDR3", 64'(o[17:2]),  64'(inv(p3)));
    p1 = w1; p2 = 16'hC3C3; p3 = 16'h3C3C;
    // 4. TDR 2 off the path (C2 = 1), then back on
    dr_scan(pack52(p1, 1'b0, p2, 1'b1, 16'h00FF, 1'b0, 1'b0), 52, o);
    chk("before C2: TDR2", 64'(o[34:19]), 64'(inv(p2)));
    p3 = 16'h00FF;
    dr_scan(pack36(p1, 1'b0, 1'b0, 16'hFF00, 1'b0, 1'b0), 36, o);
    chk("TDR2 bypassed: C2", 64'(o[18]), 64'(1));
    chk("TDR2 bypassed: TDR3", 64'(o[17:2]), 64'(inv(p3)));
    chk("TDR2 bypassed: TDR1", 64'(o[35:20]), 64'(inv(p1)));
    n_tdr_bypass++;
    p3 = 16'hFF00;
    dr_scan(pack52(p1, 1'b0, p2, 1'b0, p3, 1'b0, 1'b0), 52, o);
    chk("TDR2 back: TDR2 kept", 64'(o[34:19]), 64'(inv(p2)));
    chk("TDR2 back: TDR3", 64'(o[17:2]), 64'(inv(p3)));
    // 5. BYPASS instruction
    u_bfm.scan_ir(64'b11, 2, o);
    chk("IR capture 2", o, 64'b01);
    begin
      logic [63:0] din;
      din = {$urandom, $urandom};
      dr_scan(din, 12, o);
      chk("bypass register", 64'(o[11:0]), 64'({din[10:0], 1'b0}));
      n_ir_bypass++;
    end
    u_bfm.scan_ir(64'b10, 2, o);
    dr_scan(pack52(16'h0, 1'b0, 16'h0, 1'b0, 16'h0, 1'b0, 1'b0), 52, o);
    chk("after bypass: TDR1", 64'(o[51:36]), 64'(inv(p1)));
    chk("after bypass: TDR2", 64'(o[34:19]), 64'(inv(p2)));
    chk("after bypass: TDR3", 64'(o[17:2]),  64'(inv(p3)));
    u_bfm.idle(2);
    done = 1'b1;
  end

endmodule
