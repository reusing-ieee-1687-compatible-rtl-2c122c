// sync_2ff: multi-bit two-flip-flop synchroniser into the clk domain.
//
// Each bit of d passes through two clk flip-flops; q follows d two to three
// clk cycles later. Used for the JTAG signals (TCK, G-TMS, SI) in the Serial
// Transfer solution, where each bit is an independent level that the system
// clock, much faster than TCK, samples many times per TCK period. Reset
// value 0.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
