// tb_bus_timing: measures the bus-crossing delays of both sharing solutions
// and checks the clock-ratio conditions built from them.
//
// The whole design (shared_instr_top, default parameters) runs the instrument
// test procedure on both chips with background traffic on both buses, the
// Parallel Transfer chip at TCK = clk/21 and the Serial Transfer chip at
// TCK = clk/80. Monitors timestamp each event of the delay model in system
// clock edges and keep the worst case of every delay:
//   write side  wt1  Update-DR falling TCK edge (parallel) or TCK edge
//                    (serial) -> TAP-side logic issues the bus write
//               wt2  write issued -> shared-side logic accepts it and
//                    registers the word onto its outputs
//               wt3  accepted -> word on the instrument (or local TAP) inputs
//               wt4  instrument inputs -> immediate response (parallel only)
//   poll side   pt1  poll issued -> shared-side logic accepts the read
//               pt2  read accepted -> instrument outputs sampled
//               pt3  sampled -> response offered on the read data channel
//               pt4  offered -> word stored by TAP-side logic
// wt3, wt4 and pt2 are zero by construction here: the shared-side register
// drives the instruments directly, the inverters are combinational, and the
// read samples on the edge that accepts it. The test checks that.
// From the worst cases it evaluates, with no iRunLoop cycles (T_L = 0) and a
// poll period T_P of 17 clk cycles:
//   (1)  T_P >= pt1+pt2+pt3+pt4            (a poll finishes within a period)
//   (7)  2K > sum(wt) + T_P + pt3 + pt4    (write then read of the same TDR)
//   (9)  5K > sum(wt)                      (write then write)
//   (11) 5K > T_P + pt3 + pt4              (read then read)
//   (12) K > 2 (wt1+wt2+wt3 + T_P + pt3 + pt4)   (serial scheme)
// and fails if the clock ratios the chips run at do not meet them. It also
// fails if no write or poll had to wait for the other bus manager, so the
// worst cases include bus contention. It prints the table of delays and the
// smallest K each condition allows.
// The pattern player moves TMS and TDI one time unit after the falling TCK
// edge, so on the serial chip a falling edge can be sampled as two changes
// and go out as two bus writes; the second then waits for the first, which
// shows up as a longer serial wt1 and is included in the bound.
module tb_bus_timing;
  import axil_pkg::*;
  import jtag_pkg::*;
  localparam time CLKH = 5;
  localparam int  KP   = 21;
  localparam int  KS   = 80;
  localparam int  TP   = 17;

  logic clk = 0, rst_n = 1, start = 0, traffic_en = 1;
  logic p_trst_n = 1, s_trst_n = 1;
  logic p_tck, p_tms, p_tdi, p_tdo, p_err, p_done;
  logic s_tck, s_tms, s_tdi, s_tdo, s_err, s_done;
  int   checks = 0, failures = 0;
  int   pc, pf, psb, ptb, pib, sc, sf, ssb, stb, sib;

  always #CLKH clk = ~clk;

  shared_instr_top dut (
    .clk, .rst_n, .traffic_en,
    .par_tck(p_tck), .par_trst_n(p_trst_n), .par_tms(p_tms), .par_tdi(p_tdi), .par_tdo(p_tdo),
    .par_tg_err(p_err),
    .ser_tck(s_tck), .ser_trst_n(s_trst_n), .ser_tms(s_tms), .ser_tdi(s_tdi), .ser_tdo(s_tdo),
    .ser_tg_err(s_err)
  );

  ijtag_seq #(.HALF(KP * CLKH), .REPS(20)) u_pseq (
    .tck(p_tck), .tms(p_tms), .tdi(p_tdi), .tdo(p_tdo), .start, .done(p_done),
    .checks(pc), .failures(pf), .n_s_bypass(psb), .n_tdr_bypass(ptb), .n_ir_bypass(pib)
  );

  ijtag_seq #(.HALF(KS * CLKH), .REPS(20)) u_sseq (
    .tck(s_tck), .tms(s_tms), .tdi(s_tdi), .tdo(s_tdo), .start, .done(s_done),
    .checks(sc), .failures(sf), .n_s_bypass(ssb), .n_tdr_bypass(stb), .n_ir_bypass(sib)
  );

  // One delay of the model: worst and best case and number of samples.
  typedef struct {
    int max;
    int min;
    int n;
  } dly_t;

  function automatic dly_t note(input dly_t d, input int v);
    dly_t r = d;
    if (r.n == 0 || v > r.max) r.max = v;
    if (r.n == 0 || v < r.min) r.min = v;
    r.n++;
    return r;
  endfunction

  // index 0: parallel chip, 1: serial chip
  dly_t wt1[2], wt2[2], pt1[2], pt3[2], pt4[2];
  int   cyc = 0;
  int   t_ev[2];          // edge count at the event that starts a write (WD_R / t_C)
  int   t_wrq[2], t_prq[2], t_prs[2], t_pds[2];
  logic rd_acc_q[2], pd_wait[2];
  logic [31:0] wword[2];
  logic        wchk[2];
  int   wt3_bad = 0, wt3_n = 0;

  initial begin
    for (int i = 0; i < 2; i++) begin
      wt1[i] = '{0, 0, 0}; wt2[i] = '{0, 0, 0};
      pt1[i] = '{0, 0, 0}; pt3[i] = '{0, 0, 0}; pt4[i] = '{0, 0, 0};
      t_ev[i] = 0; t_wrq[i] = 0; t_prq[i] = 0; t_prs[i] = 0; t_pds[i] = 0;
      rd_acc_q[i] = 0; pd_wait[i] = 0; wword[i] = 0; wchk[i] = 0;
    end
  end

  // WD_R: the update stages of TDR 2 / TDR 3 load on the falling TCK edge in
  // Update-DR.
  always @(negedge p_tck) if (dut.u_par.net_update) t_ev[0] = cyc;
  // t_C: every TCK edge of the serial chip is a change to transfer.
  always @(s_tck) t_ev[1] = cyc;

  // Monitor for one chip; the signals are read before the clock edge updates
  // them, so "seen at edge cyc" means "acted on at edge cyc".
  task automatic watch(input int i, input logic wr_issue,
                       input logic wr_acc, input logic [31:0] awaddr, input logic [31:0] wdata,
                       input logic rd_issue, input logic rd_acc, input logic [31:0] araddr,
                       input logic s_rvalid, input logic m_take, input logic [31:0] dout_now);
    if (wchk[i]) begin
      wt3_n++;
      if (dout_now != wword[i]) wt3_bad++;
      wchk[i] = 0;
    end
    if (wr_issue) begin
      wt1[i] = note(wt1[i], cyc - t_ev[i]);
      t_wrq[i] = cyc;
    end
    if (wr_acc && awaddr == ADDR_DATA) begin
      wt2[i] = note(wt2[i], cyc - t_wrq[i]);
      wword[i] = wdata;
      wchk[i] = 1;
    end
    if (rd_issue) t_prq[i] = cyc;
    if (rd_acc && araddr == ADDR_DATA) begin
      pt1[i] = note(pt1[i], cyc - t_prq[i]);
      t_prs[i] = cyc;
      pd_wait[i] = 1;
    end else if (pd_wait[i] && s_rvalid && t_pds[i] <= t_prs[i]) begin
      pt3[i] = note(pt3[i], cyc - t_prs[i]);
      t_pds[i] = cyc;
    end
    if (pd_wait[i] && m_take && t_pds[i] > t_prs[i]) begin
      pt4[i] = note(pt4[i], cyc - t_pds[i]);
      pd_wait[i] = 0;
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      watch(0, dut.u_par.u_tap_side.wr_issue,
            dut.u_par.u_shared_side.wr_acc, dut.u_par.s_req.awaddr, dut.u_par.s_req.wdata,
            dut.u_par.u_tap_side.rd_issue,
            dut.u_par.u_shared_side.rd_acc, dut.u_par.s_req.araddr,
            dut.u_par.s_rsp.rvalid && dut.u_par.s_req.rready,
            dut.u_par.u_tap_side.rd_busy && !dut.u_par.u_tap_side.ar_pend &&
              dut.u_par.m1_rsp.rvalid,
            dut.u_par.inst_in);
      watch(1, dut.u_ser.u_tap_side.wr_issue,
            dut.u_ser.u_shared_side.wr_acc, dut.u_ser.s_req.awaddr, dut.u_ser.s_req.wdata,
            dut.u_ser.u_tap_side.rd_issue,
            dut.u_ser.u_shared_side.rd_acc, dut.u_ser.s_req.araddr,
            dut.u_ser.s_rsp.rvalid && dut.u_ser.s_req.rready,
            dut.u_ser.u_tap_side.rd_busy && !dut.u_ser.u_tap_side.ar_pend &&
              dut.u_ser.m1_rsp.rvalid,
            32'({dut.u_ser.l_tck, dut.u_ser.l_tms, dut.u_ser.l_tdi}));
    end
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int kmin(input int rhs, input int coef);
    return rhs / coef + 1;   // smallest whole K with coef*K > rhs
  endfunction

  int sw_p, sp_p, rhs7, rhs9, rhs11, sw_s, sp_s, rhs12;

  initial begin
    #1 rst_n = 0; p_trst_n = 0; s_trst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1; p_trst_n = 1; s_trst_n = 1;
    repeat (5) @(posedge clk);
    start = 1;
    wait (p_done && s_done);
    repeat (100) @(posedge clk);
    checks += pc + sc; failures += pf + sf;
    check("traffic generator error", !(p_err || s_err));

    for (int i = 0; i < 2; i++) begin
      check($sformatf("chip %0d: every delay sampled", i),
            wt1[i].n > 0 && wt2[i].n > 0 && pt1[i].n > 0 && pt3[i].n > 0 && pt4[i].n > 0);
      check($sformatf("chip %0d: a write waited for the other manager", i),
            wt2[i].max > wt2[i].min);
      check($sformatf("chip %0d: a poll waited for the other manager", i),
            pt1[i].max > pt1[i].min);
      check($sformatf("chip %0d: wt1 covers the two-stage synchroniser", i), wt1[i].min >= 2);
    end
    check("wt3 = 0: accepted word is on the outputs at the next edge", wt3_n > 0 && wt3_bad == 0);

    // Parallel Transfer (wt3 = wt4 = pt2 = 0)
    sw_p  = wt1[0].max + wt2[0].max;
    sp_p  = pt1[0].max + pt3[0].max + pt4[0].max;
    rhs7  = sw_p + TP + pt3[0].max + pt4[0].max;
    rhs9  = sw_p;
    rhs11 = TP + pt3[0].max + pt4[0].max;
    check("(1) parallel: poll period covers a whole poll", TP >= sp_p);
    check("(7) parallel: write then read", 2 * KP > rhs7);
    check("(9) parallel: write then write", 5 * KP > rhs9);
    check("(11) parallel: read then read", 5 * KP > rhs11);

    // Serial Transfer (wt3 = pt2 = 0)
    sw_s  = wt1[1].max + wt2[1].max;
    sp_s  = pt1[1].max + pt3[1].max + pt4[1].max;
    rhs12 = 2 * (sw_s + TP + pt3[1].max + pt4[1].max);
    check("(1) serial: poll period covers a whole poll", TP >= sp_s);
    check("(12) serial: two samples per TCK period", KS > rhs12);

    $display("worst-case delays in clk cycles    wt1 wt2 wt3 wt4 | pt1 pt2 pt3 pt4");
    $display("  parallel                         %3d %3d %3d %3d | %3d %3d %3d %3d",
             wt1[0].max, wt2[0].max, 0, 0, pt1[0].max, 0, pt3[0].max, pt4[0].max);
    $display("  serial                           %3d %3d %3d   - | %3d %3d %3d %3d",
             wt1[1].max, wt2[1].max, 0, pt1[1].max, 0, pt3[1].max, pt4[1].max);
    $display("  best case wt2/pt1: parallel %0d/%0d serial %0d/%0d",
             wt2[0].min, pt1[0].min, wt2[1].min, pt1[1].min);
    $display("smallest K, parallel: (7) %0d  (9) %0d  (11) %0d   running at %0d",
             kmin(rhs7, 2), kmin(rhs9, 5), kmin(rhs11, 5), KP);
    $display("smallest K, serial:   (12) %0d   running at %0d", kmin(rhs12, 1), KS);
    $display("samples: par wt %0d pt %0d  ser wt %0d pt %0d",
             wt2[0].n, pt4[0].n, wt2[1].n, pt4[1].n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd400_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
