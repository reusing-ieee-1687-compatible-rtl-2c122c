// jtag_bfm: JTAG driver used by the testbenches in place of an external
// JTAG controller.
//
// TCK is only toggled inside the tasks (it is not free running). TMS and TDI
// change while TCK is low (the falling-edge convention of IEEE 1149.1) and
// TDO is sampled just before each rising edge; each task returns one time
// unit after the last falling edge, once the falling-edge logic has settled. Every scan ends in the Update
// state, so the next scan starts with TMS = 1 and reaches Select-DR-Scan in
// one clock, which gives the shortest Update-DR to Capture-DR distance (two
// TCK rising edges). idle(n) spends n clocks with TMS = 0 (Run-Test/Idle).
module jtag_bfm #(
  parameter time HALF = 100
) (
  output logic tck,
  output logic tms,
  output logic tdi,
  input  logic tdo
);

  int unsigned n_tck = 0;

  initial begin
    tck = 1'b0;
    tms = 1'b1;
    tdi = 1'b0;
  end

  task automatic clk1(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    #HALF;
    tdo_v = tdo;
    tck = 1'b1;
    n_tck++;
    #HALF;
    tck = 1'b0;
    #1;
  endtask

  task automatic reset_tap();
    logic d;
    repeat (6) clk1(1'b1, 1'b0, d);
    clk1(1'b0, 1'b0, d);
  endtask

  task automatic idle(input int n);
    logic d;
    repeat (n) clk1(1'b0, 1'b0, d);
  endtask

  // Shift len bits of din (bit 0 first) through the IR; dout gets TDO bits.
  task automatic scan_ir(input logic [63:0] din, input int len, output logic [63:0] dout);
    logic d;
    dout = '0;
    clk1(1'b1, 1'b0, d);  // Select-DR-Scan
    clk1(1'b1, 1'b0, d);  // Select-IR-Scan
    clk1(1'b0, 1'b0, d);  // Capture-IR
    clk1(1'b0, 1'b0, d);  // Shift-IR
    for (int i = 0; i < len; i++) begin
      clk1(i == len - 1, din[i], d);
      dout[i] = d;
    end
    clk1(1'b1, 1'b0, d);  // Update-IR
  endtask

  task automatic scan_dr(input logic [63:0] din, input int len, output logic [63:0] dout);
    logic d;
    dout = '0;
    clk1(1'b1, 1'b0, d);  // Select-DR-Scan
    clk1(1'b0, 1'b0, d);  // Capture-DR
    clk1(1'b0, 1'b0, d);  // Shift-DR
    for (int i = 0; i < len; i++) begin
      clk1(i == len - 1, din[i], d);
      dout[i] = d;
    end
    clk1(1'b1, 1'b0, d);  // Update-DR
  endtask

endmodule
