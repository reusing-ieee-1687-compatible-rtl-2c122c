// tb_clock_ratio: shows that the clock-ratio bounds of both sharing solutions
// are real, on both sides.
//
// Five chips at default parameters run the instrument test procedure, each
// from its own JTAG pattern player, sharing one system clock and reset:
//   par_ok    Parallel Transfer at K = 14, the smallest ratio the
//             write-then-read condition allows for this RTL's measured
//             delays (tb_bus_timing): must pass.
//   par_slow  Parallel Transfer at K = 6: a read that follows a write comes
//             back before the write's response has been polled, so the
//             procedure must see wrong data.
//   ser_ok    Serial Transfer at K = 61, the smallest ratio its condition
//             allows: must pass.
//   ser_slow  Serial Transfer at K = 30: the replayed TCK/TMS/SI and the
//             polled L-TDO fall behind the chip's own TCK, so the scans must
//             come back wrong.
//   par_loop  Parallel Transfer at K = 6 again, but with T_L = 3 idle TCK
//             cycles (an iRunLoop) after every scan: (2 + T_L) K = 30 beats
//             the same bound of 26 clk cycles, so it must pass. This is the
//             second knob of the analysis: wait cycles in the test
//             procedure instead of a faster system clock.
// The test counts a failure if a chip at its bound reports any mismatch, or
// a chip below it reports none; the mismatches of the two slow chips are
// counted, not printed. Background bus traffic is on for all four.
module tb_clock_ratio;
  localparam time CLKH    = 5;
  localparam int  K_PAR   = 14;
  localparam int  K_PAR_L = 6;
  localparam int  K_SER   = 61;
  localparam int  K_SER_L = 30;
  localparam int  T_L     = 3;
  localparam int  N       = 5;

  logic clk = 0, rst_n = 1, start = 0;
  logic trst_n = 1;
  logic [N-1:0] tck, tms, tdi, tdo, err, done;
  int   c[N], f[N], nsb[N], ntb[N], nib[N];
  int   checks = 0, failures = 0;

  always #CLKH clk = ~clk;

  par_transfer_chip u_par_ok (
    .tck(tck[0]), .trst_n, .tms(tms[0]), .tdi(tdi[0]), .tdo(tdo[0]),
    .clk, .rst_n, .traffic_en(1'b1), .tg_err(err[0])
  );
  par_transfer_chip u_par_slow (
    .tck(tck[1]), .trst_n, .tms(tms[1]), .tdi(tdi[1]), .tdo(tdo[1]),
    .clk, .rst_n, .traffic_en(1'b1), .tg_err(err[1])
  );
  par_transfer_chip u_par_loop (
    .tck(tck[4]), .trst_n, .tms(tms[4]), .tdi(tdi[4]), .tdo(tdo[4]),
    .clk, .rst_n, .traffic_en(1'b1), .tg_err(err[4])
  );
  ser_transfer_chip u_ser_ok (
    .tck(tck[2]), .trst_n, .tms(tms[2]), .tdi(tdi[2]), .tdo(tdo[2]),
    .clk, .rst_n, .traffic_en(1'b1), .tg_err(err[2])
  );
  ser_transfer_chip u_ser_slow (
    .tck(tck[3]), .trst_n, .tms(tms[3]), .tdi(tdi[3]), .tdo(tdo[3]),
    .clk, .rst_n, .traffic_en(1'b1), .tg_err(err[3])
  );

  ijtag_seq #(.HALF(K_PAR * CLKH), .REPS(20)) u_seq0 (
    .tck(tck[0]), .tms(tms[0]), .tdi(tdi[0]), .tdo(tdo[0]), .start, .done(done[0]),
    .checks(c[0]), .failures(f[0]), .n_s_bypass(nsb[0]), .n_tdr_bypass(ntb[0]), .n_ir_bypass(nib[0])
  );
  ijtag_seq #(.HALF(K_PAR_L * CLKH), .REPS(20), .QUIET(1)) u_seq1 (
    .tck(tck[1]), .tms(tms[1]), .tdi(tdi[1]), .tdo(tdo[1]), .start, .done(done[1]),
    .checks(c[1]), .failures(f[1]), .n_s_bypass(nsb[1]), .n_tdr_bypass(ntb[1]), .n_ir_bypass(nib[1])
  );
  ijtag_seq #(.HALF(K_SER * CLKH), .REPS(20)) u_seq2 (
    .tck(tck[2]), .tms(tms[2]), .tdi(tdi[2]), .tdo(tdo[2]), .start, .done(done[2]),
    .checks(c[2]), .failures(f[2]), .n_s_bypass(nsb[2]), .n_tdr_bypass(ntb[2]), .n_ir_bypass(nib[2])
  );
  ijtag_seq #(.HALF(K_SER_L * CLKH), .REPS(20), .QUIET(1)) u_seq3 (
    .tck(tck[3]), .tms(tms[3]), .tdi(tdi[3]), .tdo(tdo[3]), .start, .done(done[3]),
    .checks(c[3]), .failures(f[3]), .n_s_bypass(nsb[3]), .n_tdr_bypass(ntb[3]), .n_ir_bypass(nib[3])
  );

  ijtag_seq #(.HALF(K_PAR_L * CLKH), .REPS(20), .RUNLOOP(T_L)) u_seq4 (
    .tck(tck[4]), .tms(tms[4]), .tdi(tdi[4]), .tdo(tdo[4]), .start, .done(done[4]),
    .checks(c[4]), .failures(f[4]), .n_s_bypass(nsb[4]), .n_tdr_bypass(ntb[4]), .n_ir_bypass(nib[4])
  );

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 rst_n = 0; trst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1; trst_n = 1;
    repeat (5) @(posedge clk);
    start = 1;
    wait (&done);
    repeat (100) @(posedge clk);
    $display("mismatches of %0d/%0d/%0d/%0d checks: par K=%0d: %0d  par K=%0d: %0d  ser K=%0d: %0d  ser K=%0d: %0d",
             c[0], c[1], c[2], c[3], K_PAR, f[0], K_PAR_L, f[1], K_SER, f[2], K_SER_L, f[3]);
    check("parallel chip at its bound ran the procedure", c[0] > 0 && f[0] == 0);
    check("parallel chip below its bound went wrong", f[1] > 0);
    check("serial chip at its bound ran the procedure", c[2] > 0 && f[2] == 0);
    check("serial chip below its bound went wrong", f[3] > 0);
    $display("par K=%0d with T_L=%0d: %0d mismatches of %0d checks", K_PAR_L, T_L, f[4], c[4]);
    check("parallel chip below the bound, with wait cycles, ran the procedure",
          c[4] > 0 && f[4] == 0);
    check("no bus traffic error", err == '0);
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
