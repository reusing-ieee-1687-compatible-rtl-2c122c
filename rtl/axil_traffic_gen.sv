// axil_traffic_gen: background traffic generator and consumer on the system
// bus (the second, lower-priority bus manager).
//
// While en is high it loops: write an incrementing word to the SCRATCH
// register of the Shared-side Logic, wait GAP idle cycles, read SCRATCH back,
// compare with the word written (err is set, and stays set, on a mismatch or
// an error response), wait GAP idle cycles and start again. n_done counts
// completed transactions. Its role (load the bus at lower priority than the
// TAP-side Logic so bus delays are realistic) follows the document; the
// pattern and GAP are this design's own choices.
module axil_traffic_gen
  import axil_pkg::*;
#(
  parameter int unsigned GAP = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  output axil_req_t m_req,
  input  axil_rsp_t m_rsp,
  output logic      err,
  output logic [15:0] n_done
);

  typedef enum logic [2:0] {IDLE, WR, WRESP, GAP1, RD, RRESP, GAP2} tg_state_t;

  tg_state_t         st;
  logic              aw_pend, w_pend;
  logic [DATA_W-1:0] word;
  logic [7:0]        gap_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      aw_pend <= 1'b0;
      w_pend  <= 1'b0;
      word    <= 32'h1000_0000;
      gap_cnt <= '0;
      err     <= 1'b0;
      n_done  <= '0;
    end else begin
      unique case (st)
        IDLE: if (en) begin
          st      <= WR;
          aw_pend <= 1'b1;
          w_pend  <= 1'b1;
          word    <= word + 1'b1;
        end
        WR: begin
          if (m_rsp.awready) aw_pend <= 1'b0;
          if (m_rsp.wready)  w_pend  <= 1'b0;
          if ((!aw_pend || m_rsp.awready) && (!w_pend || m_rsp.wready)) st <= WRESP;
        end
        WRESP: if (m_rsp.bvalid) begin
          if (m_rsp.bresp != RESP_OKAY) err <= 1'b1;
          n_done  <= n_done + 1'b1;
          gap_cnt <= '0;
          st      <= GAP1;
        end
        GAP1: if (gap_cnt >= 8'(GAP)) st <= RD; else gap_cnt <= gap_cnt + 1'b1;
        RD: if (m_rsp.arready) st <= RRESP;
        RRESP: if (m_rsp.rvalid) begin
          if (m_rsp.rdata != word || m_rsp.rresp != RESP_OKAY) err <= 1'b1;
          n_done  <= n_done + 1'b1;
          gap_cnt <= '0;
          st      <= GAP2;
        end
        GAP2: if (gap_cnt >= 8'(GAP)) st <= IDLE; else gap_cnt <= gap_cnt + 1'b1;
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    m_req         = '0;
    m_req.awvalid = (st == WR) && aw_pend;
    m_req.awaddr  = ADDR_SCRATCH;
    m_req.wvalid  = (st == WR) && w_pend;
    m_req.wdata   = word;
    m_req.bready  = (st == WRESP);
    m_req.arvalid = (st == RD);
    m_req.araddr  = ADDR_SCRATCH;
    m_req.rready  = (st == RRESP);
  end

endmodule
