// tb_cdc_update: TCK (slow, gated) to clk crossing of the TDR update stages.
// Checks that the S flip-flops take the update-stage word only after an
// Update-DR, within SYNC + 1 clk cycles of the falling TCK edge that wrote
// it (+1 for sampling), that changes of the update stages outside Update-DR
// never reach the S flip-flops, and that the enable lasts at most about one
// TCK period.
module tb_cdc_update;
  localparam int W = 32;
  logic tck = 0, update_dr = 0, clk = 0, rst_n = 1, s_en;
  logic [W-1:0] upd_data = '0, s_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cdc_update #(.W(W)) dut (.*);

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h (t=%0t)", what, got, exp, $time); end
  endtask

  initial begin
    logic [W-1:0] v, junk;
    int lat;
    #1 rst_n = 0;
    #20 rst_n = 1;
    chk("reset", s_data, 0);
    for (int k = 0; k < 20; k++) begin
      v = W'($urandom);
      // TCK period 200: Update-DR state for one period, data written at the falling edge
      #100 tck = 1; update_dr = 1;
      #100 tck = 0; upd_data = v;
      lat = 0;
      while (s_data !== v && lat < 10) begin @(posedge clk); #1 lat++; end
      chk("word transferred", s_data, v);
      checks++;
      if (lat > 4) begin failures++; $display("FAIL latency %0d clk", lat); end
      #100 tck = 1; update_dr = 0;
      #100 tck = 0;
      #100 tck = 1;
      #100 tck = 0;
      // update stage disturbed outside Update-DR (not possible in a TDR, but the
      // crossing must still ignore it)
      junk = W'($urandom);
      upd_data = junk;
      repeat (30) @(posedge clk);
      chk("no transfer without Update-DR", s_data, v);
      chk("enable dropped", s_en, 0);
      upd_data = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
