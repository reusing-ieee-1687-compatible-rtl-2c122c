// axil_interconnect: two AXI4-Lite managers to one subordinate, with a shared
// address channel ("Shared Address, Multiple Data").
//
// One address channel serves both managers and both transaction types: each
// cycle that it is free, an arbiter picks one pending request in the fixed
// order M1 write, M1 read, M2 write, M2 read, and locks onto it until the
// subordinate accepts the address. Manager 1 (the TAP-side Logic) therefore
// has priority over Manager 2, but still waits when the address channel is
// already held by another transaction. The data channels are separate: after
// its address is accepted, a write keeps the W/B path and a read the R path
// until its response completes, so a write and a read may be in flight at the
// same time, never two of one type. W is routed from the manager whose write
// holds the address lock or the write path.
//
// Timing: a request is locked in the cycle after it appears and forwarded
// from then on. m1_wait is high in every cycle that Manager 1 has an address
// request pending while Manager 2 holds the address channel (contention). The shared address
// channel and the priority follow the document; the arbitration order and
// single-outstanding rule are this design's own choices.
// rst_n is an asynchronous reset and also the disable condition of the
// assertions, so lint reports it as used both synchronously and
// asynchronously; both uses are intended.
module axil_interconnect
  import axil_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m1_req,
  output axil_rsp_t m1_rsp,
  input  axil_req_t m2_req,
  output axil_rsp_t m2_rsp,
  output axil_req_t s_req,
  input  axil_rsp_t s_rsp,
  output logic      m1_wait
);

  typedef enum logic [1:0] {M1_WR, M1_RD, M2_WR, M2_RD} areq_t;

  logic  a_lock;
  areq_t a_sel;
  logic  wr_busy, wr_own;   // own: 0 = M1, 1 = M2
  logic  rd_busy, rd_own;
  logic  a_done;

  // requests eligible for the address channel
  logic  e_m1w, e_m1r, e_m2w, e_m2r;
  assign e_m1w = m1_req.awvalid && !wr_busy;
  assign e_m1r = m1_req.arvalid && !rd_busy;
  assign e_m2w = m2_req.awvalid && !wr_busy;
  assign e_m2r = m2_req.arvalid && !rd_busy;

  // address accepted this cycle
  always_comb begin
    a_done = 1'b0;
    if (a_lock) begin
      unique case (a_sel)
        M1_WR, M2_WR: a_done = s_req.awvalid && s_rsp.awready;
        M1_RD, M2_RD: a_done = s_req.arvalid && s_rsp.arready;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_lock  <= 1'b0;
      a_sel   <= M1_WR;
      wr_busy <= 1'b0;
      wr_own  <= 1'b0;
      rd_busy <= 1'b0;
      rd_own  <= 1'b0;
    end else begin
      if (!a_lock) begin
        a_lock <= e_m1w || e_m1r || e_m2w || e_m2r;
        if      (e_m1w) a_sel <= M1_WR;
        else if (e_m1r) a_sel <= M1_RD;
        else if (e_m2w) a_sel <= M2_WR;
        else if (e_m2r) a_sel <= M2_RD;
      end else if (a_done) begin
        a_lock <= 1'b0;
        if (a_sel == M1_WR || a_sel == M2_WR) begin
          wr_busy <= 1'b1;
          wr_own  <= (a_sel == M2_WR);
        end else begin
          rd_busy <= 1'b1;
          rd_own  <= (a_sel == M2_RD);
        end
      end
      if (wr_busy && s_rsp.bvalid && s_req.bready) wr_busy <= 1'b0;
      if (rd_busy && s_rsp.rvalid && s_req.rready) rd_busy <= 1'b0;
    end
  end

  // which manager owns the write data path right now
  logic w_act, w_own;
  always_comb begin
    w_act = 1'b0;
    w_own = 1'b0;
    if (a_lock && (a_sel == M1_WR || a_sel == M2_WR)) begin
      w_act = 1'b1;
      w_own = (a_sel == M2_WR);
    end else if (wr_busy) begin
      w_act = 1'b1;
      w_own = wr_own;
    end
  end

  always_comb begin
    s_req  = '0;
    m1_rsp = '0;
    m2_rsp = '0;
    // address channel
    if (a_lock) begin
      unique case (a_sel)
        M1_WR: begin
          s_req.awvalid  = m1_req.awvalid;
          s_req.awaddr   = m1_req.awaddr;
          m1_rsp.awready = s_rsp.awready;
        end
        M2_WR: begin
          s_req.awvalid  = m2_req.awvalid;
          s_req.awaddr   = m2_req.awaddr;
          m2_rsp.awready = s_rsp.awready;
        end
        M1_RD: begin
          s_req.arvalid  = m1_req.arvalid;
          s_req.araddr   = m1_req.araddr;
          m1_rsp.arready = s_rsp.arready;
        end
        M2_RD: begin
          s_req.arvalid  = m2_req.arvalid;
          s_req.araddr   = m2_req.araddr;
          m2_rsp.arready = s_rsp.arready;
        end
      endcase
    end
    // write data and response
    if (w_act) begin
      if (!w_own) begin
        s_req.wvalid  = m1_req.wvalid;
        s_req.wdata   = m1_req.wdata;
        s_req.bready  = m1_req.bready;
        m1_rsp.wready = s_rsp.wready;
        m1_rsp.bvalid = s_rsp.bvalid && wr_busy;
        m1_rsp.bresp  = s_rsp.bresp;
      end else begin
        s_req.wvalid  = m2_req.wvalid;
        s_req.wdata   = m2_req.wdata;
        s_req.bready  = m2_req.bready;
        m2_rsp.wready = s_rsp.wready;
        m2_rsp.bvalid = s_rsp.bvalid && wr_busy;
        m2_rsp.bresp  = s_rsp.bresp;
      end
    end
    // read data
    if (rd_busy) begin
      if (!rd_own) begin
        s_req.rready  = m1_req.rready;
        m1_rsp.rvalid = s_rsp.rvalid;
        m1_rsp.rdata  = s_rsp.rdata;
        m1_rsp.rresp  = s_rsp.rresp;
      end else begin
        s_req.rready  = m2_req.rready;
        m2_rsp.rvalid = s_rsp.rvalid;
        m2_rsp.rdata  = s_rsp.rdata;
        m2_rsp.rresp  = s_rsp.rresp;
      end
    end
  end

  assign m1_wait = (m1_req.awvalid || m1_req.arvalid) && a_lock &&
                   (a_sel == M2_WR || a_sel == M2_RD);

  // A write's data and response never reach a manager other than the owner.
  a_one_wr_owner: assert property (@(posedge clk) disable iff (!rst_n)
    !(m1_rsp.bvalid && m2_rsp.bvalid));
  a_one_rd_owner: assert property (@(posedge clk) disable iff (!rst_n)
    !(m1_rsp.rvalid && m2_rsp.rvalid));

endmodule
