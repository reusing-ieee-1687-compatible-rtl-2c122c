// jtag_tap: chip-level IEEE 1149.1 Test Access Port that fronts the 1687 network.
//
// It holds the TAP controller FSM (tap_fsm), a 2-bit instruction register, a
// 1-bit bypass register and the TDO output stage. While the instruction
// IR_IJTAG is in the IR, the DR-Scan controls are passed to the 1687 network
// (net_capture/net_shift/net_update, qualified by net_sel) and the network's
// scan output drives TDO; with any other instruction the bypass register sits
// between TDI and TDO. net_rst is high in Test-Logic-Reset (or with TRST) and
// resets the network and the IR (to BYPASS).
//
// Timing: shift stages load on the rising edge of TCK, the IR update stage on
// the falling edge in Update-IR, and TDO changes on the falling edge, as in
// IEEE 1149.1. The IR width, codes and reset instruction are this design's
// own choice; the TAP, its FSM and its role follow the document.
module jtag_tap
  import jtag_pkg::*;
(
  input  logic tck,
  input  logic trst_n,
  input  logic tms,
  input  logic tdi,
  output logic tdo,
  // 1687 network side
  output logic net_sel,
  output logic net_capture,
  output logic net_shift,
  output logic net_update,
  output logic net_rst,
  input  logic net_so,
  // state of the FSM, for observation
  output tap_state_t state
);

  logic capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir, tlr;
  logic [IR_W-1:0] ir_sh, ir;
  logic byp;

  tap_fsm u_fsm (
    .tck, .trst(~trst_n), .tms, .state,
    .capture_dr, .shift_dr, .update_dr,
    .capture_ir, .shift_ir, .update_ir, .tlr
  );

  assign net_rst = tlr | ~trst_n;

  // IR shift/capture stage
  always_ff @(posedge tck) begin
    if (capture_ir)    ir_sh <= IR_CAPTURE;
    else if (shift_ir) ir_sh <= {tdi, ir_sh[IR_W-1:1]};
  end

  // IR update stage
  always_ff @(negedge tck or posedge net_rst) begin
    if (net_rst)        ir <= IR_BYPASS;
    else if (update_ir) ir <= ir_sh;
  end

  assign net_sel     = (ir == IR_IJTAG);
  assign net_capture = capture_dr & net_sel;
  assign net_shift   = shift_dr & net_sel;
  assign net_update  = update_dr & net_sel;

  // Bypass register
  always_ff @(posedge tck) begin
    if (capture_dr && !net_sel)    byp <= 1'b0;
    else if (shift_dr && !net_sel) byp <= tdi;
  end

  // TDO stage
  always_ff @(negedge tck or posedge net_rst) begin
    if (net_rst)       tdo <= 1'b0;
    else if (shift_ir) tdo <= ir_sh[0];
    else if (shift_dr) tdo <= net_sel ? net_so : byp;
  end

endmodule
