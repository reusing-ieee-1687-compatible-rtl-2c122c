// tb_par_transfer_chip: end-to-end test of the Parallel Transfer chip.
//
// A JTAG pattern player runs the instrument test procedure on the shared TDR 2
// and TDR 3 (each write read back in the very next scan), the segment and TDR
// bypass switches and the BYPASS instruction, with background bus traffic
// enabled. The system clock is K = 21 times faster than TCK, the ratio the
// document's timing analysis asks for. Besides the scan data it counts bus
// writes, polls and cycles in which the TAP-side manager waited for the
// other manager, and fails if any of these never happened.
module tb_par_transfer_chip;
  localparam int  K    = 21;
  localparam time CLKH = 5;

  logic clk = 0, rst_n = 1, trst_n = 1, start = 0, traffic_en = 1;
  logic tck, tms, tdi, tdo, tg_err, done;
  int   checks = 0, failures = 0, sc, sf, nsb, ntb, nib;
  int   n_wr = 0, n_rd = 0, n_wait = 0;

  always #CLKH clk = ~clk;

  par_transfer_chip dut (.tck, .trst_n, .tms, .tdi, .tdo, .clk, .rst_n, .traffic_en, .tg_err);

  ijtag_seq #(.HALF(K * CLKH), .REPS(2)) u_seq (
    .tck, .tms, .tdi, .tdo, .start, .done, .checks(sc), .failures(sf),
    .n_s_bypass(nsb), .n_tdr_bypass(ntb), .n_ir_bypass(nib)
  );

  always @(posedge clk) begin
    if (dut.wr_issue) n_wr++;
    if (dut.rd_issue) n_rd++;
    if (dut.m1_wait)  n_wait++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    #1 rst_n = 0; trst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1; trst_n = 1;
    repeat (5) @(posedge clk);
    start = 1;
    wait (done);
    repeat (50) @(posedge clk);
    checks += sc; failures += sf;
    checks++; if (tg_err) begin failures++; $display("FAIL traffic generator error"); end
    need("bus write of TDR contents", n_wr);
    need("polling read", n_rd);
    need("TAP-side manager waited for manager 2", n_wait);
    need("segment S bypassed", nsb);
    need("TDR 2 bypassed", ntb);
    need("BYPASS instruction", nib);
    $display("par: writes=%0d polls=%0d wait_cycles=%0d", n_wr, n_rd, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd4_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
