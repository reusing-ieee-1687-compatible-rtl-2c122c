// tb_tap_side_logic: TAP-side Logic against a model AXI4-Lite subordinate
// with random ready and response delays. Checks that every change of the
// sampled word is written (and only changes are), that quick successive
// changes end with the last value written, that polls are issued exactly
// every POLL_PERIOD = 17 cycles when the bus answers at once, that the polled
// value appears on rd_data, and that never more than one write and one read
// are outstanding.
module tb_tap_side_logic;
  import axil_pkg::*;
  localparam int P = 17;
  logic clk = 0, rst_n = 1;
  logic [31:0] smp = '0, rd_data;
  axil_req_t m_req;
  axil_rsp_t m_rsp;
  logic wr_issue, rd_issue;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  tap_side_logic #(.OUT_W(32), .IN_W(32), .POLL_PERIOD(P)) dut (.*);

  // model subordinate
  logic        slow = 0;
  logic        r_aw, r_ar, bpend = 0, rpend = 0, bwait = 0, rwait = 0;
  logic [31:0] last_w = '0, rd_val = 32'h0BAD_F00D, rdat = '0;
  int          n_wr = 0, n_ar = 0, last_ar = -1, cyc = 0, bad_period = 0;
  always_ff @(posedge clk) begin
    r_aw <= slow ? ($urandom % 4 == 0) : 1'b1;
    r_ar <= slow ? ($urandom % 4 == 0) : 1'b1;
  end
  always_comb begin
    m_rsp = '0;
    m_rsp.awready = r_aw && m_req.awvalid && m_req.wvalid && !bpend && !bwait;
    m_rsp.wready  = m_rsp.awready;
    m_rsp.bvalid  = bpend;
    m_rsp.arready = r_ar && m_req.arvalid && !rpend && !rwait;
    m_rsp.rvalid  = rpend;
    m_rsp.rdata   = rdat;
  end
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (m_rsp.awready) begin bwait <= 1; last_w <= m_req.wdata; n_wr <= n_wr + 1; end
    else if (bwait && (!slow || $urandom % 2 == 0)) begin bwait <= 0; bpend <= 1; end
    else if (bpend && m_req.bready) bpend <= 0;
    if (m_rsp.arready) begin
      rwait <= 1; rdat <= rd_val; n_ar <= n_ar + 1;
      if (!slow && last_ar >= 0 && cyc - last_ar != P) bad_period <= bad_period + 1;
      last_ar <= cyc;
    end else if (rwait && (!slow || $urandom % 2 == 0)) begin rwait <= 0; rpend <= 1; end
    else if (rpend && m_req.rready) rpend <= 0;
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h (t=%0t)", what, got, exp, $time); end
  endtask

  initial begin
    int w0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    chk("no write without a change", n_wr, 0);
    chk("poll period exact", bad_period, 0);
    checks++; if (n_ar < 4) begin failures++; $display("FAIL too few polls %0d", n_ar); end
    chk("polled value", rd_data, 32'h0BAD_F00D);
    for (int k = 0; k < 20; k++) begin
      w0 = n_wr;
      smp = $urandom;
      rd_val = $urandom;
      repeat (2 * P + 10) @(posedge clk);
      chk("one write per change", n_wr - w0, 1);
      chk("written value", last_w, smp);
      chk("polled value", rd_data, rd_val);
    end
    chk("poll period exact", bad_period, 0);
    // slow bus: bursts of changes, last value must win
    slow = 1;
    for (int k = 0; k < 20; k++) begin
      repeat (1 + $urandom % 5) begin smp = $urandom; @(posedge clk); end
      rd_val = $urandom;
      repeat (6 * P) @(posedge clk);
      chk("last value written", last_w, smp);
      chk("polled value (slow bus)", rd_data, rd_val);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  a_one_wr: assert property (@(posedge clk) disable iff (!rst_n) (bpend || bwait) |-> !m_req.awvalid);
  a_one_rd: assert property (@(posedge clk) disable iff (!rst_n) (rpend || rwait) |-> !m_req.arvalid);

  initial begin
    #200_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
