// shared_side_logic: Shared-side Logic of both sharing solutions (AXI
// Subordinate and Controller).
//
// Register map (AXI4-Lite, 32-bit): offset 0x0 DATA, offset 0x4 SCRATCH.
// A write to DATA updates dout, which drives the shared instruments (Parallel
// Transfer) or L-TCK/L-TMS/L-TDI (Serial Transfer). A read of DATA samples din
// (instrument outputs, or L-TDO) in the cycle the read address is accepted and
// returns it. SCRATCH is a plain register that absorbs the background traffic
// of the second bus manager. Other offsets answer SLVERR.
//
// Timing: AW and W are accepted together in one cycle when both are valid and
// no B is pending; B follows one cycle later. AR is accepted when no R is
// pending; R follows one cycle later. dout resets to 0. The behaviour (write
// applies data, read samples the instrument ports) follows the document; the
// register map and handshake timing are this design's own choices.
// rst_n is an asynchronous reset and also the disable condition of the
// assertions, so lint reports it as used both synchronously and
// asynchronously; both uses are intended.
module shared_side_logic
  import axil_pkg::*;
#(
  parameter int unsigned OUT_W = 32,
  parameter int unsigned IN_W  = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        s_req,
  output axil_rsp_t        s_rsp,
  output logic [OUT_W-1:0] dout,
  input  logic [IN_W-1:0]  din
);

  logic              bvalid, rvalid;
  axil_resp_t        bresp, rresp;
  logic [DATA_W-1:0] rdata, scratch;
  logic              wr_acc, rd_acc;

  assign wr_acc = s_req.awvalid && s_req.wvalid && !bvalid;
  assign rd_acc = s_req.arvalid && !rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout    <= '0;
      scratch <= '0;
      bvalid  <= 1'b0;
      bresp   <= RESP_OKAY;
    end else begin
      if (wr_acc) begin
        bvalid <= 1'b1;
        bresp  <= RESP_OKAY;
        if (s_req.awaddr == ADDR_DATA)         dout    <= s_req.wdata[OUT_W-1:0];
        else if (s_req.awaddr == ADDR_SCRATCH) scratch <= s_req.wdata;
        else                                   bresp   <= RESP_SLVERR;
      end else if (bvalid && s_req.bready) begin
        bvalid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
      rresp  <= RESP_OKAY;
    end else begin
      if (rd_acc) begin
        rvalid <= 1'b1;
        rresp  <= RESP_OKAY;
        if (s_req.araddr == ADDR_DATA)         rdata <= DATA_W'(din);
        else if (s_req.araddr == ADDR_SCRATCH) rdata <= scratch;
        else begin
          rdata <= '0;
          rresp <= RESP_SLVERR;
        end
      end else if (rvalid && s_req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    s_rsp         = '0;
    s_rsp.awready = wr_acc;
    s_rsp.wready  = wr_acc;
    s_rsp.bvalid  = bvalid;
    s_rsp.bresp   = bresp;
    s_rsp.arready = rd_acc;
    s_rsp.rvalid  = rvalid;
    s_rsp.rdata   = rdata;
    s_rsp.rresp   = rresp;
  end

  // AXI rule: a valid that is not yet accepted stays asserted with stable payload.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.awvalid && !s_rsp.awready |=> s_req.awvalid && $stable(s_req.awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.wvalid && !s_rsp.wready |=> s_req.wvalid && $stable(s_req.wdata));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.arvalid && !s_rsp.arready |=> s_req.arvalid && $stable(s_req.araddr));

endmodule
