// tb_shared_side_logic: Shared-side Logic driven by a model AXI4-Lite
// manager. Checks that a DATA write reaches dout, that a DATA read returns
// din as sampled when the read address is accepted (din changes right after),
// the SCRATCH register, SLVERR for unmapped offsets, and the one-cycle
// response latency of both channels.
module tb_shared_side_logic;
  import axil_pkg::*;
  logic clk = 0, rst_n = 1;
  axil_req_t s_req = '0;
  axil_rsp_t s_rsp;
  logic [31:0] dout, din = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  shared_side_logic #(.OUT_W(32), .IN_W(32)) dut (.*);

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h (t=%0t)", what, got, exp, $time); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d, output axil_resp_t r, output int lat);
    s_req.awvalid = 1; s_req.awaddr = a; s_req.wvalid = 1; s_req.wdata = d; s_req.bready = 1;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!s_rsp.bvalid);
    s_req.awvalid = 0; s_req.wvalid = 0;
    r = s_rsp.bresp;
    @(posedge clk); #1;
    s_req.bready = 0;
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d, output axil_resp_t r, input logic [31:0] din_after);
    s_req.arvalid = 1; s_req.araddr = a; s_req.rready = 1;
    @(posedge clk); #1;
    din = din_after;  // changes after the address was accepted
    s_req.arvalid = 0;
    while (!s_rsp.rvalid) begin @(posedge clk); #1; end
    d = s_rsp.rdata; r = s_rsp.rresp;
    @(posedge clk); #1;
    s_req.rready = 0;
  endtask

  initial begin
    axil_resp_t r;
    logic [31:0] d, v;
    int lat;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk("dout reset", dout, 0);
    for (int k = 0; k < 20; k++) begin
      v = $urandom;
      wr(ADDR_DATA, v, r, lat);
      chk("DATA write", dout, v);
      chk("write OKAY", r, RESP_OKAY);
      chk("write response after 1 cycle", lat, 1);
      v = $urandom;
      din = v;
      rd(ADDR_DATA, d, r, ~v);
      chk("DATA read samples din at address", d, v);
      chk("read OKAY", r, RESP_OKAY);
    end
    v = $urandom;
    d = dout;
    wr(ADDR_SCRATCH, v, r, lat);
    chk("SCRATCH leaves dout", dout, d);
    rd(ADDR_SCRATCH, d, r, din);
    chk("SCRATCH read", d, v);
    wr(32'h40, 32'h1, r, lat);
    chk("SLVERR on write", r, RESP_SLVERR);
    rd(32'h40, d, r, din);
    chk("SLVERR on read", r, RESP_SLVERR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
