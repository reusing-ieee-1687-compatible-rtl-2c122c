// subnetwork_s: segment S of the example 1687 network.
//
// Scan order: si -> TDR 2 -> mux/C2 -> TDR 3 -> mux/C3 -> lock-up -> so.
// C2 bypasses TDR 2 (bypass input is the segment input), C3 bypasses TDR 3
// (bypass input is the C2 output); each TDR is selected while the segment is
// selected and its control bit is 0. The segment output passes through a
// falling-edge lock-up stage so that it changes on the falling edge of TCK,
// which the Serial Transfer solution relies on when it samples L-TDO.
//
// The parallel data ports of TDR 2 and TDR 3 are brought out (do2/do3 from
// the update stages, di2/di3 into the capture stages): in the Parallel
// Transfer chip they go across the system bus, in the Serial Transfer chip
// they connect to local instruments. The topology is the document's; the
// falling-edge flip-flop standing in for a lock-up latch is this design's
// choice.
module subnetwork_s #(
  parameter int unsigned W = 16
) (
  input  logic         tck,
  input  logic         rst,
  input  logic         sel,
  input  logic         capture,
  input  logic         shift,
  input  logic         update,
  input  logic         si,
  output logic         so,
  output logic [W-1:0] do2,
  input  logic [W-1:0] di2,
  output logic [W-1:0] do3,
  input  logic [W-1:0] di3,
  output logic         c2,
  output logic         c3
);

  logic tdr2_so, c2_so, tdr3_so, c3_so;

  ijtag_tdr #(.W(W)) u_tdr2 (
    .tck, .rst, .sel(sel & ~c2), .capture, .shift, .update,
    .si, .so(tdr2_so), .di(di2), .do_o(do2)
  );

  ijtag_mux_ctrl u_c2 (
    .tck, .rst, .sel, .capture, .shift, .update,
    .si_path(tdr2_so), .si_byp(si), .so(c2_so), .ctrl(c2)
  );

  ijtag_tdr #(.W(W)) u_tdr3 (
    .tck, .rst, .sel(sel & ~c3), .capture, .shift, .update,
    .si(c2_so), .so(tdr3_so), .di(di3), .do_o(do3)
  );

  ijtag_mux_ctrl u_c3 (
    .tck, .rst, .sel, .capture, .shift, .update,
    .si_path(tdr3_so), .si_byp(c2_so), .so(c3_so), .ctrl(c3)
  );

  // Lock-up stage on the segment output
  always_ff @(negedge tck or posedge rst) begin
    if (rst) so <= 1'b0;
    else     so <= c3_so;
  end

endmodule
