// cdc_update: TCK-to-system-clock crossing of the shared TDR contents
// (Parallel Transfer).
//
// TCK is not free running, so the crossing is driven from the fast system
// clock. The TDR update stages (upd_data) are written on the falling edge of
// TCK in Update-DR. On that same edge a TCK-side flip-flop registers the
// Update-DR decode; its output is carried into the clk domain through SYNC
// flip-flops and then serves as clock enable of the "S" flip-flops that copy
// upd_data. By the time the enable arrives the update stages have been stable
// for at least SYNC clk cycles, so every S flip-flop takes the same, coherent
// word. The enable may stay high for several clk cycles (ratio K); copying
// the same word again is harmless, since the consumer reacts to changes.
//
// The structure (one flip-flop on the TCK side, a synchroniser, S flip-flops
// with enable) follows the document; SYNC = 2 and the falling-edge TCK-side
// flip-flop are this design's own choices.
module cdc_update #(
  parameter int unsigned W    = 32,
  parameter int unsigned SYNC = 2
) (
  input  logic         tck,
  input  logic         update_dr,
  input  logic [W-1:0] upd_data,
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] s_data,
  output logic         s_en
);

  logic            upd_tck;
  logic [SYNC-1:0] sync;

  always_ff @(negedge tck or negedge rst_n) begin
    if (!rst_n) upd_tck <= 1'b0;
    else        upd_tck <= update_dr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[SYNC-2:0], upd_tck};
  end

  assign s_en = sync[SYNC-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s_data <= '0;
    else if (s_en) s_data <= upd_data;
  end

endmodule
