// tb_ser_transfer_chip: end-to-end test of the Serial Transfer chip.
//
// The same JTAG pattern player as for the Parallel Transfer chip drives the
// chip, whose sub-network S now sits behind the system bus with its own Local
// TAP Controller. The system clock is K = 80 times faster than TCK (the
// document's analysis asks for K > 78). Besides the scan data the testbench
// counts bus writes of {TCK, G-TMS, SI}, L-TDO polls, L-TCK rising edges
// replayed on the shared side, cycles the local FSM was parked in
// Run-Test/Idle while the chip FSM was elsewhere, and cycles in which the
// TAP-side manager waited for the other manager; it also checks that the two
// FSMs are in the same state whenever the segment is selected and the local
// FSM has caught up.
module tb_ser_transfer_chip;
  import jtag_pkg::*;
  localparam int  K    = 80;
  localparam time CLKH = 5;

  logic clk = 0, rst_n = 1, trst_n = 1, start = 0, traffic_en = 1;
  logic tck, tms, tdi, tdo, tg_err, done;
  int   checks = 0, failures = 0, sc, sf, nsb, ntb, nib;
  int   n_wr = 0, n_rd = 0, n_wait = 0, n_ltck = 0, n_park = 0, n_sync = 0, n_desync = 0;
  logic ltck_q = 0;

  always #CLKH clk = ~clk;

  ser_transfer_chip dut (.tck, .trst_n, .tms, .tdi, .tdo, .clk, .rst_n, .traffic_en, .tg_err);

  ijtag_seq #(.HALF(K * CLKH), .REPS(2)) u_seq (
    .tck, .tms, .tdi, .tdo, .start, .done, .checks(sc), .failures(sf),
    .n_s_bypass(nsb), .n_tdr_bypass(ntb), .n_ir_bypass(nib)
  );

  always @(posedge clk) begin
    if (dut.wr_issue) n_wr++;
    if (dut.rd_issue) n_rd++;
    if (dut.m1_wait)  n_wait++;
    ltck_q <= dut.l_tck;
    if (dut.l_tck && !ltck_q) n_ltck++;
    if (dut.l_state == RTI && dut.state != RTI) n_park++;
  end

  // Half a TCK period after each falling edge the local side must have caught
  // up: with S selected, both FSMs must then be in the same state, except in
  // the Update state in which S was just selected (local FSM still parked).
  always @(negedge tck) begin
    #((K / 2) * CLKH);
    if (dut.sel_s && dut.state != TLR && start) begin
      n_sync++;
      if (dut.l_state != dut.state &&
          !(dut.l_state == RTI && (dut.state == UPDATE_DR || dut.state == UPDATE_IR)))
        n_desync++;
    end
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
    repeat (100) @(posedge clk);
    checks += sc; failures += sf;
    checks++; if (tg_err) begin failures++; $display("FAIL traffic generator error"); end
    checks++; if (n_desync != 0) begin failures++; $display("FAIL local FSM out of step %0d times", n_desync); end
    need("FSM step comparison", n_sync);
    need("bus write of TCK/G-TMS/SI", n_wr);
    need("L-TDO polling read", n_rd);
    need("L-TCK edge replayed", n_ltck);
    need("local FSM parked in Run-Test/Idle", n_park);
    need("TAP-side manager waited for manager 2", n_wait);
    need("segment S bypassed", nsb);
    need("TDR 2 bypassed", ntb);
    need("BYPASS instruction", nib);
    $display("ser: writes=%0d polls=%0d ltck_edges=%0d park_cycles=%0d wait_cycles=%0d sync_checks=%0d",
             n_wr, n_rd, n_ltck, n_park, n_wait, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
