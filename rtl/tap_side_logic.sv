// tap_side_logic: TAP-side Logic of both sharing solutions (Controller and
// AXI Manager 1).
//
// Writes: every clk cycle the controller compares its sampled TAP-side word
// smp with the last word it sent. On a difference, and with no write in
// flight, it latches smp and issues one AXI4-Lite write of it to the data
// register of the Shared-side Logic (AW and W raised together, B awaited).
// A change that happens while a write is in flight is sent by the next
// write; intermediate values are coalesced.
// Reads: a free-running counter fires every POLL_PERIOD clk cycles; if no read
// is in flight it issues one AXI4-Lite read of the data register. The R data
// (low IN_W bits) is held on rd_data until the next read returns.
//
// Interface: AXI4-Lite manager port as axil_req_t/axil_rsp_t. At most one
// write and one read are outstanding, and a write and a read may overlap.
// wr_issue/rd_issue pulse for one cycle when a request starts. The change
// detection, the polling and POLL_PERIOD = 17 follow the document; the AXI
// profile, the address map and the skip-when-busy polling rule are this
// design's own choices.
module tap_side_logic
  import axil_pkg::*;
#(
  parameter int unsigned OUT_W       = 32,
  parameter int unsigned IN_W        = 32,
  parameter int unsigned POLL_PERIOD = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [OUT_W-1:0] smp,
  output logic [IN_W-1:0]  rd_data,
  output axil_req_t        m_req,
  input  axil_rsp_t        m_rsp,
  output logic             wr_issue,
  output logic             rd_issue
);

  localparam int unsigned CW = $clog2(POLL_PERIOD + 1);

  logic [OUT_W-1:0] last_sent;
  logic             wr_busy, aw_pend, w_pend;
  logic             rd_busy, ar_pend;
  logic [CW-1:0]    poll_cnt;
  logic             poll_tick;

  // ---------------- write path ----------------
  assign wr_issue = !wr_busy && (smp != last_sent);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_sent <= '0;
      wr_busy   <= 1'b0;
      aw_pend   <= 1'b0;
      w_pend    <= 1'b0;
    end else if (wr_issue) begin
      last_sent <= smp;
      wr_busy   <= 1'b1;
      aw_pend   <= 1'b1;
      w_pend    <= 1'b1;
    end else begin
      if (aw_pend && m_rsp.awready) aw_pend <= 1'b0;
      if (w_pend && m_rsp.wready)   w_pend  <= 1'b0;
      if (wr_busy && m_rsp.bvalid && !aw_pend && !w_pend) wr_busy <= 1'b0;
    end
  end

  // ---------------- read (polling) path ----------------
  assign poll_tick = (poll_cnt == CW'(POLL_PERIOD - 1));
  assign rd_issue  = poll_tick && !rd_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poll_cnt <= '0;
      rd_busy  <= 1'b0;
      ar_pend  <= 1'b0;
      rd_data  <= '0;
    end else begin
      poll_cnt <= poll_tick ? '0 : poll_cnt + 1'b1;
      if (rd_issue) begin
        rd_busy <= 1'b1;
        ar_pend <= 1'b1;
      end else begin
        if (ar_pend && m_rsp.arready) ar_pend <= 1'b0;
        if (rd_busy && !ar_pend && m_rsp.rvalid) begin
          rd_busy <= 1'b0;
          rd_data <= m_rsp.rdata[IN_W-1:0];
        end
      end
    end
  end

  always_comb begin
    m_req         = '0;
    m_req.awvalid = aw_pend;
    m_req.awaddr  = ADDR_DATA;
    m_req.wvalid  = w_pend;
    m_req.wdata   = DATA_W'(last_sent);
    m_req.bready  = wr_busy && !aw_pend && !w_pend;
    m_req.arvalid = ar_pend;
    m_req.araddr  = ADDR_DATA;
    m_req.rready  = rd_busy && !ar_pend;
  end

endmodule
