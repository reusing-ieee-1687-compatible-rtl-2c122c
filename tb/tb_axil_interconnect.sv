// tb_axil_interconnect: two model managers share one Shared-side Logic
// through the interconnect. Manager 0 (M1) writes and polls DATA, manager 1
// (M2) writes and reads back SCRATCH, both at random times. Checks every
// response (data reaches the right register, read data returns to the
// requester), that M1 wins when both managers raise a request in the same
// cycle on a free address channel, that a write and a read can be in flight
// together, and that M1 sometimes waits for M2 (m1_wait).
module tb_axil_interconnect;
  import axil_pkg::*;
  logic clk = 0, rst_n = 1, m1_wait;
  axil_req_t mreq [2];
  axil_rsp_t mrsp [2];
  axil_req_t s_req;
  axil_rsp_t s_rsp;
  logic [31:0] dout;
  int checks = 0, failures = 0, n_wait = 0, n_overlap = 0, n_tie = 0, n_tie_m1 = 0;

  always #5 clk = ~clk;

  axil_interconnect dut (.clk, .rst_n, .m1_req(mreq[0]), .m1_rsp(mrsp[0]), .m2_req(mreq[1]),
                         .m2_rsp(mrsp[1]), .s_req, .s_rsp, .m1_wait);
  shared_side_logic u_sub (.clk, .rst_n, .s_req, .s_rsp, .dout, .din(dout ^ 32'hFFFF_0000));

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h (t=%0t)", what, got, exp, $time); end
  endtask

  task automatic wr(input int m, input logic [31:0] a, input logic [31:0] d);
    mreq[m].awvalid = 1; mreq[m].awaddr = a; mreq[m].wvalid = 1; mreq[m].wdata = d;
    do @(posedge clk); while (!(mrsp[m].awready && mrsp[m].wready));
    #1 mreq[m].awvalid = 0; mreq[m].wvalid = 0;
    if (m == 1) repeat ($urandom % 4) @(posedge clk);  // slow B consumer
    #1 mreq[m].bready = 1;
    while (!mrsp[m].bvalid) begin @(posedge clk); #1; end
    chk("bresp", mrsp[m].bresp, RESP_OKAY);
    @(posedge clk); #1 mreq[m].bready = 0;
  endtask

  task automatic rd(input int m, input logic [31:0] a, output logic [31:0] d);
    mreq[m].arvalid = 1; mreq[m].araddr = a;
    do @(posedge clk); while (!mrsp[m].arready);
    #1 mreq[m].arvalid = 0; mreq[m].rready = 1;
    while (!mrsp[m].rvalid) begin @(posedge clk); #1; end
    d = mrsp[m].rdata;
    @(posedge clk); #1 mreq[m].rready = 0;
  endtask

  always @(posedge clk) begin
    if (m1_wait) n_wait++;
    if (dut.wr_busy && dut.rd_busy) n_overlap++;
    // tie: both raise a new write on a free channel in the same cycle
    if (!dut.a_lock && !dut.wr_busy && mreq[0].awvalid && mreq[1].awvalid) begin
      n_tie++;
      #1 if (dut.a_sel == 2'd0) n_tie_m1++;
    end
  end

  initial begin
    mreq[0] = '0; mreq[1] = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // simultaneous writes: M1 must go first
    for (int k = 0; k < 10; k++) begin
      logic [31:0] a, b, d;
      a = $urandom; b = $urandom;
      fork
        wr(0, ADDR_DATA, a);
        wr(1, ADDR_SCRATCH, b);
      join
      chk("DATA from M1", dout, a);
      rd(1, ADDR_SCRATCH, d);
      chk("SCRATCH to M2", d, b);
    end
    // random concurrent traffic
    fork
      for (int k = 0; k < 60; k++) begin
        logic [31:0] a, d;
        repeat ($urandom % 4) @(posedge clk);
        #1;
        a = $urandom;
        fork
          wr(0, ADDR_DATA, a);
          begin
            repeat ($urandom % 3) @(posedge clk);
            #1 rd(0, ADDR_DATA, d);
          end
        join
        rd(0, ADDR_DATA, d);
        chk("M1 polled DATA", d, a ^ 32'hFFFF_0000);
      end
      for (int k = 0; k < 60; k++) begin
        logic [31:0] b, d;
        repeat ($urandom % 3) @(posedge clk);
        #1;
        b = $urandom;
        wr(1, ADDR_SCRATCH, b);
        rd(1, ADDR_SCRATCH, d);
        chk("M2 read-back", d, b);
      end
    join
    checks++; if (n_tie == 0 || n_tie != n_tie_m1) begin failures++; $display("FAIL priority %0d/%0d", n_tie_m1, n_tie); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no write/read overlap"); end
    checks++; if (n_wait == 0) begin failures++; $display("FAIL M1 never waited"); end
    $display("ties=%0d overlap=%0d wait=%0d", n_tie, n_overlap, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
