// par_transfer_chip: Parallel Transfer sharing of Inst 2 and Inst 3.
//
// The chip keeps the whole example 1687 network (TDR 1, C1, sub-network S with
// TDR 2, C2, TDR 3, C3, and C4) behind its JTAG TAP, but Inst 2 and Inst 3 sit
// on the far side of the system bus. TDR 2 and TDR 3 together form one 32-bit
// virtual TDR (TDR 2 in bits 15:0, TDR 3 in bits 31:16):
//   * TAP to instrument: cdc_update copies the two update stages into the
//     system clock domain after every Update-DR; tap_side_logic sees the
//     change and writes the word over the bus; shared_side_logic drives it
//     onto the instrument inputs.
//   * instrument to TAP: tap_side_logic polls every POLL_PERIOD clk cycles;
//     shared_side_logic samples the instrument outputs on the read; the
//     returned word sits on the capture inputs of TDR 2 and TDR 3 for the
//     next Capture-DR.
// A second bus manager (axil_traffic_gen, enabled by traffic_en) loads the
// shared-address interconnect at lower priority. To the external JTAG tools
// the network looks as if the instruments were wired to their TDRs, provided
// the system clock is fast enough relative to TCK (the document derives
// K > 20 for its delays; this RTL has shorter bus delays).
// The named internal nets state, c1..c4, s_en, wr_issue, rd_issue, m1_wait
// and tg_done are read by nothing inside the chip; they are kept as
// observation points for test benches. rst_n is an asynchronous reset here
// and also the disable condition of the bus assertions, which is why lint
// sees it used both ways.
module par_transfer_chip #(
  parameter int unsigned W           = 16,
  parameter int unsigned POLL_PERIOD = 17
) (
  input  logic tck,
  input  logic trst_n,
  input  logic tms,
  input  logic tdi,
  output logic tdo,
  input  logic clk,
  input  logic rst_n,
  input  logic traffic_en,
  output logic tg_err
);
  import axil_pkg::*;
  import jtag_pkg::*;

  tap_state_t state;
  logic net_sel, net_capture, net_shift, net_update, net_rst, net_so;
  logic s_si, s_so, s_sel, c1, c4, c2, c3;
  logic [W-1:0] do2, do3, di2, di3;
  logic [2*W-1:0] s_data, rd_data, inst_out, inst_in;
  logic s_en, wr_issue, rd_issue, m1_wait;
  logic [15:0] tg_done;
  axil_req_t m1_req, m2_req, s_req;
  axil_rsp_t m1_rsp, m2_rsp, s_rsp;

  jtag_tap u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .net_sel, .net_capture, .net_shift, .net_update, .net_rst, .net_so, .state
  );

  ijtag_network #(.W(W)) u_net (
    .tck, .rst(net_rst), .sel(net_sel), .capture(net_capture), .shift(net_shift),
    .update(net_update), .tdi, .so(net_so), .s_si, .s_so, .s_sel, .c1, .c4
  );

  subnetwork_s #(.W(W)) u_s (
    .tck, .rst(net_rst), .sel(s_sel), .capture(net_capture), .shift(net_shift),
    .update(net_update), .si(s_si), .so(s_so),
    .do2, .di2, .do3, .di3, .c2, .c3
  );

  cdc_update #(.W(2*W)) u_cdc (
    .tck, .update_dr(net_update), .upd_data({do3, do2}),
    .clk, .rst_n, .s_data, .s_en
  );

  tap_side_logic #(.OUT_W(2*W), .IN_W(2*W), .POLL_PERIOD(POLL_PERIOD)) u_tap_side (
    .clk, .rst_n, .smp(s_data), .rd_data, .m_req(m1_req), .m_rsp(m1_rsp),
    .wr_issue, .rd_issue
  );

  assign {di3, di2} = rd_data;

  axil_traffic_gen u_mgr2 (
    .clk, .rst_n, .en(traffic_en), .m_req(m2_req), .m_rsp(m2_rsp),
    .err(tg_err), .n_done(tg_done)
  );

  axil_interconnect u_ic (
    .clk, .rst_n, .m1_req, .m1_rsp, .m2_req, .m2_rsp, .s_req, .s_rsp, .m1_wait
  );

  shared_side_logic #(.OUT_W(2*W), .IN_W(2*W)) u_shared_side (
    .clk, .rst_n, .s_req, .s_rsp, .dout(inst_in), .din(inst_out)
  );

  inverter_instrument #(.W(W)) u_inst2 (.di(inst_in[W-1:0]),   .do_o(inst_out[W-1:0]));
  inverter_instrument #(.W(W)) u_inst3 (.di(inst_in[2*W-1:W]), .do_o(inst_out[2*W-1:W]));

endmodule
