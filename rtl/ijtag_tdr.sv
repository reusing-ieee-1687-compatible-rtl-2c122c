// ijtag_tdr: IEEE 1687 test data register with parallel instrument ports.
//
// Two stages: a shift/capture stage on the scan path and an update stage that
// drives the instrument. The register reacts to the DR controls only while it
// is selected (sel), that is, while it is on the active scan path. On the
// rising edge of TCK it loads di (Capture-DR) or shifts one bit (Shift-DR:
// scan enters at the MSB, so is the LSB); on the falling edge of TCK in
// Update-DR it copies the shift stage to do_o. rst (asynchronous, active
// high) clears both stages, so after reset the register holds 0 as the
// document states. W defaults to the document's 16 bits; the shift direction
// is this design's own choice.
module ijtag_tdr #(
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
  input  logic [W-1:0] di,
  output logic [W-1:0] do_o
);

  logic [W-1:0] sh;

  always_ff @(posedge tck or posedge rst) begin
    if (rst)                  sh <= '0;
    else if (sel && capture)  sh <= di;
    else if (sel && shift)    sh <= (sh >> 1) | (W'(si) << (W - 1));
  end

  always_ff @(negedge tck or posedge rst) begin
    if (rst)                 do_o <= '0;
    else if (sel && update)  do_o <= sh;
  end

  assign so = sh[0];

endmodule
