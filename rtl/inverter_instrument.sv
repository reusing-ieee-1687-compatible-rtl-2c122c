// inverter_instrument: the test instrument of the example network.
//
// An array of W inverters: whatever the TDR (or the shared-side logic) writes
// to di comes back inverted on do_o, so a read that follows a write returns
// the complement. The document uses exactly this instrument, W = 16, to
// validate both sharing solutions. Purely combinational.
module inverter_instrument #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] di,
  output logic [W-1:0] do_o
);

  assign do_o = ~di;

endmodule
