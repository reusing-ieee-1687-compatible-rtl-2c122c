// tb_axil_traffic_gen: the background bus manager against the Shared-side
// Logic. Checks that it only touches SCRATCH, alternates write and read-back
// of an incrementing word, keeps at least GAP idle cycles between a response
// and the next request, reports no error against a correct subordinate and
// reports one when the read-back is corrupted. With en low it stays idle.
module tb_axil_traffic_gen;
  import axil_pkg::*;
  localparam int GAP = 3;
  logic clk = 0, rst_n = 1, en = 0, err, corrupt = 0;
  axil_req_t m_req;
  axil_rsp_t m_rsp, s_rsp;
  logic [15:0] n_done;
  logic [31:0] dout;
  int checks = 0, failures = 0, n_w = 0, n_r = 0, bad_addr = 0, bad_order = 0, bad_gap = 0, idle = 0;
  logic [31:0] last_w = '0;
  logic expect_read = 0;

  always #5 clk = ~clk;
  axil_traffic_gen #(.GAP(GAP)) dut (.*);
  shared_side_logic u_sub (.clk, .rst_n, .s_req(m_req), .s_rsp, .dout, .din(32'h0));

  always_comb begin
    m_rsp = s_rsp;
    if (corrupt) m_rsp.rdata = s_rsp.rdata ^ 32'h1;
  end

  always @(posedge clk) if (rst_n) begin
    if (m_req.awvalid || m_req.wvalid || m_req.arvalid) begin
      if (idle < GAP && (n_w + n_r) > 0) bad_gap++;
      idle = 0;
    end else if (!m_req.bready && !m_req.rready) idle++;
    if (m_rsp.awready) begin
      n_w++;
      if (m_req.awaddr != ADDR_SCRATCH) bad_addr++;
      if (expect_read || m_req.wdata != last_w + 1) bad_order++;
      last_w = m_req.wdata;
      expect_read = 1;
    end
    if (m_rsp.arready) begin
      n_r++;
      if (m_req.araddr != ADDR_SCRATCH) bad_addr++;
      if (!expect_read) bad_order++;
      expect_read = 0;
    end
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    last_w = 32'h1000_0000;
    repeat (50) @(posedge clk);
    chk("idle while disabled", n_w + n_r, 0);
    en = 1;
    repeat (2000) @(posedge clk);
    checks++; if (n_w < 50 || n_r < 50) begin failures++; $display("FAIL too little traffic %0d/%0d", n_w, n_r); end
    chk("transactions counted", n_done, 16'(n_w + n_r));
    chk("SCRATCH only", bad_addr, 0);
    chk("write/read alternate, incrementing", bad_order, 0);
    chk("idle gap kept", bad_gap, 0);
    chk("no error", err, 0);
    corrupt = 1;
    repeat (100) @(posedge clk);
    chk("error on corrupted read-back", err, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
