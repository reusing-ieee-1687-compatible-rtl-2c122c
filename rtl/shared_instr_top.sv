// shared_instr_top: both instrument-sharing solutions side by side.
//
// The Parallel Transfer chip (par_*) and the Serial Transfer chip (ser_*)
// each have their own JTAG port and their own system bus; they share only the
// system clock, its reset and the enable of the background bus traffic. The
// two are alternatives for the same job: making instruments of an IEEE 1687
// network reachable over a system bus while the network still looks
// unchanged to standard 1687 tools driving the JTAG port. tg_err_* report a
// read-back mismatch seen by the background traffic manager of either bus.
module shared_instr_top (
  input  logic clk,
  input  logic rst_n,
  input  logic traffic_en,
  // Parallel Transfer chip JTAG port
  input  logic par_tck,
  input  logic par_trst_n,
  input  logic par_tms,
  input  logic par_tdi,
  output logic par_tdo,
  output logic par_tg_err,
  // Serial Transfer chip JTAG port
  input  logic ser_tck,
  input  logic ser_trst_n,
  input  logic ser_tms,
  input  logic ser_tdi,
  output logic ser_tdo,
  output logic ser_tg_err
);

  par_transfer_chip u_par (
    .tck(par_tck), .trst_n(par_trst_n), .tms(par_tms), .tdi(par_tdi), .tdo(par_tdo),
    .clk, .rst_n, .traffic_en, .tg_err(par_tg_err)
  );

  ser_transfer_chip u_ser (
    .tck(ser_tck), .trst_n(ser_trst_n), .tms(ser_tms), .tdi(ser_tdi), .tdo(ser_tdo),
    .clk, .rst_n, .traffic_en, .tg_err(ser_tg_err)
  );

endmodule
