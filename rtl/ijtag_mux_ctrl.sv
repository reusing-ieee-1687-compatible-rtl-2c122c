// ijtag_mux_ctrl: scan multiplexer with its 1-bit control register C.
//
// The multiplexer chooses between the scan output of the path it guards
// (si_path: a TDR or a whole segment) and a bypass wire (si_byp). Its output
// feeds a 1-bit TDR, C, whose update stage (ctrl) steers the multiplexer:
// ctrl = 0 keeps the guarded path on the scan chain, ctrl = 1 bypasses it. The
// polarity follows the document (a TDR behind two such bits is selected when
// both are 0). C captures its own update value at Capture-DR, shifts on the
// rising edge and updates on the falling edge of TCK while selected, and
// resets to 0 (guarded path on the chain).
module ijtag_mux_ctrl (
  input  logic tck,
  input  logic rst,
  input  logic sel,
  input  logic capture,
  input  logic shift,
  input  logic update,
  input  logic si_path,
  input  logic si_byp,
  output logic so,
  output logic ctrl
);

  logic mux_out;

  assign mux_out = ctrl ? si_byp : si_path;

  always_ff @(posedge tck or posedge rst) begin
    if (rst)                 so <= 1'b0;
    else if (sel && capture) so <= ctrl;
    else if (sel && shift)   so <= mux_out;
  end

  always_ff @(negedge tck or posedge rst) begin
    if (rst)                ctrl <= 1'b0;
    else if (sel && update) ctrl <= so;
  end

endmodule
