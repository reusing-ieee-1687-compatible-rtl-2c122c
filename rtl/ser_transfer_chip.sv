// ser_transfer_chip: Serial Transfer sharing of the whole sub-network S.
//
// Sub-network S (TDR 2 with Inst 2, C2, TDR 3 with Inst 3, C3) is moved to
// the far side of the system bus together with a Local TAP Controller. Only
// four wires cross the bus:
//   * TAP side to shared side: TCK, G-TMS and SI. G-TMS is the chip TMS gated
//     by the select of segment S (network selected and C4 = 0). The three
//     signals go through two-flip-flop synchronisers into the system clock
//     domain; tap_side_logic writes every change of the 3-bit sample, and
//     shared_side_logic replays it as L-TCK, L-TMS and L-TDI.
//   * shared side to TAP side: L-TDO, the lock-up output of S, is polled every
//     POLL_PERIOD clk cycles and drives SO, the scan input of mux C4.
// The Local TAP Controller is an ordinary TAP FSM clocked by L-TCK. While S is
// deselected G-TMS is 0 and the local FSM parks in Run-Test/Idle; when S is
// selected at an Update state both FSMs step into Select-DR-Scan together.
// There is no instruction register on the local side. Segment S is reset by
// the system reset and while the local FSM is in Test-Logic-Reset.
// Correct operation needs the system clock to be much faster than TCK: two
// samples per TCK period must cross the bus and come back (the document
// derives K > 78 for its delays).
// The named internal nets state, l_state, c1..c4, the local IR decodes,
// wr_issue, rd_issue, m1_wait and tg_done are read by nothing inside the
// chip; they are kept as observation points for test benches. rst_n is an
// asynchronous reset and also the disable condition of the bus assertions.
module ser_transfer_chip #(
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

  tap_state_t state, l_state;
  logic net_sel, net_capture, net_shift, net_update, net_rst, net_so;
  logic si, so, sel_s, g_tms, c1, c4, c2, c3;
  logic [2:0] smp;
  logic [0:0] l_tdo_rd;
  logic l_tck, l_tms, l_tdi, l_tdo;
  logic l_capture_dr, l_shift_dr, l_update_dr, l_capture_ir, l_shift_ir, l_update_ir, l_tlr;
  logic s_rst;
  logic [W-1:0] do2, do3, di2, di3;
  logic wr_issue, rd_issue, m1_wait;
  logic [15:0] tg_done;
  axil_req_t m1_req, m2_req, s_req;
  axil_rsp_t m1_rsp, m2_rsp, s_rsp;

  // ---------------- TAP side ----------------
  jtag_tap u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .net_sel, .net_capture, .net_shift, .net_update, .net_rst, .net_so, .state
  );

  ijtag_network #(.W(W)) u_net (
    .tck, .rst(net_rst), .sel(net_sel), .capture(net_capture), .shift(net_shift),
    .update(net_update), .tdi, .so(net_so), .s_si(si), .s_so(so), .s_sel(sel_s), .c1, .c4
  );

  assign g_tms = tms & sel_s;

  sync_2ff #(.W(3)) u_sync (.clk, .rst_n, .d({tck, g_tms, si}), .q(smp));

  tap_side_logic #(.OUT_W(3), .IN_W(1), .POLL_PERIOD(POLL_PERIOD)) u_tap_side (
    .clk, .rst_n, .smp, .rd_data(l_tdo_rd), .m_req(m1_req), .m_rsp(m1_rsp),
    .wr_issue, .rd_issue
  );

  assign so = l_tdo_rd[0];

  // ---------------- system bus ----------------
  axil_traffic_gen u_mgr2 (
    .clk, .rst_n, .en(traffic_en), .m_req(m2_req), .m_rsp(m2_rsp),
    .err(tg_err), .n_done(tg_done)
  );

  axil_interconnect u_ic (
    .clk, .rst_n, .m1_req, .m1_rsp, .m2_req, .m2_rsp, .s_req, .s_rsp, .m1_wait
  );

  // ---------------- shared side ----------------
  shared_side_logic #(.OUT_W(3), .IN_W(1)) u_shared_side (
    .clk, .rst_n, .s_req, .s_rsp, .dout({l_tck, l_tms, l_tdi}), .din(l_tdo)
  );

  tap_fsm u_local_tap (
    .tck(l_tck), .trst(~rst_n), .tms(l_tms), .state(l_state),
    .capture_dr(l_capture_dr), .shift_dr(l_shift_dr), .update_dr(l_update_dr),
    .capture_ir(l_capture_ir), .shift_ir(l_shift_ir), .update_ir(l_update_ir),
    .tlr(l_tlr)
  );

  assign s_rst = ~rst_n | l_tlr;

  subnetwork_s #(.W(W)) u_s (
    .tck(l_tck), .rst(s_rst), .sel(1'b1), .capture(l_capture_dr), .shift(l_shift_dr),
    .update(l_update_dr), .si(l_tdi), .so(l_tdo),
    .do2, .di2, .do3, .di3, .c2, .c3
  );

  inverter_instrument #(.W(W)) u_inst2 (.di(do2), .do_o(di2));
  inverter_instrument #(.W(W)) u_inst3 (.di(do3), .do_o(di3));

endmodule
