// ijtag_network: the example IEEE 1687 network around segment S.
//
// Scan order: tdi -> TDR 1 (with Inst 1) -> mux/C1 -> [segment S] -> mux/C4
// -> so. C1 bypasses TDR 1 (bypass input tdi); C4 bypasses segment S (bypass
// input is the C1 output). Segment S itself is not inside this module: it is
// reached through s_si / s_so / s_sel so the chip can place it locally
// (Parallel Transfer) or across the system bus (Serial Transfer). s_si leaves
// through a falling-edge lock-up stage, so it changes on the falling edge of
// TCK. s_sel is high while the network is selected and C4 = 0; the DR
// controls for S are the network's own controls qualified by s_sel.
//
// All registers reset to 0 (every TDR on the scan path). The topology and
// polarity are the document's; the lock-up flip-flop is this design's choice.
module ijtag_network #(
  parameter int unsigned W = 16
) (
  input  logic tck,
  input  logic rst,
  input  logic sel,
  input  logic capture,
  input  logic shift,
  input  logic update,
  input  logic tdi,
  output logic so,
  // segment S attachment
  output logic s_si,
  input  logic s_so,
  output logic s_sel,
  // control bits, for observation
  output logic c1,
  output logic c4
);

  logic         tdr1_so, c1_so;
  logic [W-1:0] tdr1_do, inst1_do;

  ijtag_tdr #(.W(W)) u_tdr1 (
    .tck, .rst, .sel(sel & ~c1), .capture, .shift, .update,
    .si(tdi), .so(tdr1_so), .di(inst1_do), .do_o(tdr1_do)
  );

  inverter_instrument #(.W(W)) u_inst1 (.di(tdr1_do), .do_o(inst1_do));

  ijtag_mux_ctrl u_c1 (
    .tck, .rst, .sel, .capture, .shift, .update,
    .si_path(tdr1_so), .si_byp(tdi), .so(c1_so), .ctrl(c1)
  );

  // Lock-up stage into segment S
  always_ff @(negedge tck or posedge rst) begin
    if (rst) s_si <= 1'b0;
    else     s_si <= c1_so;
  end

  assign s_sel = sel & ~c4;

  ijtag_mux_ctrl u_c4 (
    .tck, .rst, .sel, .capture, .shift, .update,
    .si_path(s_so), .si_byp(c1_so), .so, .ctrl(c4)
  );

endmodule
