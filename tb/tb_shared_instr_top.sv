// tb_shared_instr_top: end-to-end test of both sharing solutions at their
// default sizes (16-bit TDRs, polling every 17 system clock cycles).
//
// Two JTAG pattern players run at the same time, one per chip: the
// Parallel Transfer chip at TCK = clk/21 and the Serial Transfer chip at
// TCK = clk/80, ratios just above the bounds the document derives
// from its own bus delays (this RTL's shorter delays allow less, see
// tb_bus_timing). Each runs the instrument test procedure 200 times on TDR 2
// and TDR 3 together (a call count of the order of hundreds, as a real test
// program would use), the segment and TDR bypass switches and the BYPASS
// instruction, with background bus traffic on both buses. It counts how often each
// mechanism happened (bus writes, polls, bus contention, L-TCK replay, local
// FSM parking, bypass modes) and fails for any that never did.
module tb_shared_instr_top;
  import jtag_pkg::*;
  localparam time CLKH = 5;

  logic clk = 0, rst_n = 1, start = 0, traffic_en = 1;
  logic p_trst_n = 1, s_trst_n = 1;
  logic p_tck, p_tms, p_tdi, p_tdo, p_err, p_done;
  logic s_tck, s_tms, s_tdi, s_tdo, s_err, s_done;
  int   checks = 0, failures = 0;
  int   pc, pf, psb, ptb, pib, sc, sf, ssb, stb, sib;
  int   p_wr = 0, p_rd = 0, p_wait = 0, p_cdc = 0;
  int   s_wr = 0, s_rd = 0, s_wait = 0, s_ltck = 0, s_park = 0;
  logic ltck_q = 0, pen_q = 0;

  always #CLKH clk = ~clk;

  shared_instr_top dut (
    .clk, .rst_n, .traffic_en,
    .par_tck(p_tck), .par_trst_n(p_trst_n), .par_tms(p_tms), .par_tdi(p_tdi), .par_tdo(p_tdo),
    .par_tg_err(p_err),
    .ser_tck(s_tck), .ser_trst_n(s_trst_n), .ser_tms(s_tms), .ser_tdi(s_tdi), .ser_tdo(s_tdo),
    .ser_tg_err(s_err)
  );

  ijtag_seq #(.HALF(21 * CLKH), .REPS(200)) u_pseq (
    .tck(p_tck), .tms(p_tms), .tdi(p_tdi), .tdo(p_tdo), .start, .done(p_done),
    .checks(pc), .failures(pf), .n_s_bypass(psb), .n_tdr_bypass(ptb), .n_ir_bypass(pib)
  );

  ijtag_seq #(.HALF(80 * CLKH), .REPS(200)) u_sseq (
    .tck(s_tck), .tms(s_tms), .tdi(s_tdi), .tdo(s_tdo), .start, .done(s_done),
    .checks(sc), .failures(sf), .n_s_bypass(ssb), .n_tdr_bypass(stb), .n_ir_bypass(sib)
  );

  always @(posedge clk) begin
    if (dut.u_par.wr_issue) p_wr++;
    if (dut.u_par.rd_issue) p_rd++;
    if (dut.u_par.m1_wait)  p_wait++;
    pen_q <= dut.u_par.s_en;
    if (dut.u_par.s_en && !pen_q) p_cdc++;
    if (dut.u_ser.wr_issue) s_wr++;
    if (dut.u_ser.rd_issue) s_rd++;
    if (dut.u_ser.m1_wait)  s_wait++;
    ltck_q <= dut.u_ser.l_tck;
    if (dut.u_ser.l_tck && !ltck_q) s_ltck++;
    if (dut.u_ser.l_state == RTI && dut.u_ser.state != RTI) s_park++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    #1 rst_n = 0; p_trst_n = 0; s_trst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1; p_trst_n = 1; s_trst_n = 1;
    repeat (5) @(posedge clk);
    start = 1;
    wait (p_done && s_done);
    repeat (100) @(posedge clk);
    checks += pc + sc; failures += pf + sf;
    checks++; if (p_err || s_err) begin failures++; $display("FAIL traffic generator error"); end
    need("par: Update-DR carried across the clock domains", p_cdc);
    need("par: bus write of TDR contents", p_wr);
    need("par: polling read", p_rd);
    need("par: TAP-side manager waited for manager 2", p_wait);
    need("par: segment S bypassed", psb);
    need("par: TDR 2 bypassed", ptb);
    need("par: BYPASS instruction", pib);
    need("ser: bus write of TCK/G-TMS/SI", s_wr);
    need("ser: L-TDO polling read", s_rd);
    need("ser: TAP-side manager waited for manager 2", s_wait);
    need("ser: L-TCK edge replayed", s_ltck);
    need("ser: local FSM parked in Run-Test/Idle", s_park);
    need("ser: segment S bypassed", ssb);
    need("ser: TDR 2 bypassed", stb);
    need("ser: BYPASS instruction", sib);
    $display("par: cdc=%0d writes=%0d polls=%0d wait_cycles=%0d", p_cdc, p_wr, p_rd, p_wait);
    $display("ser: writes=%0d polls=%0d ltck_edges=%0d park_cycles=%0d wait_cycles=%0d",
             s_wr, s_rd, s_ltck, s_park, s_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
