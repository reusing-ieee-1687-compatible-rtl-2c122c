// tap_fsm: IEEE 1149.1 TAP controller state machine.
//
// Sixteen states advanced on the rising edge of TCK by TMS, with the arcs of
// the standard (Test-Logic-Reset, Run-Test/Idle, the DR-Scan branch and the
// IR-Scan branch). The decoded control outputs are plain state decodes:
// capture_*, shift_* and update_* are high for the whole TCK period the FSM
// spends in that state, so downstream logic acts on the rising edge
// (capture/shift) or on the falling edge (update) inside it.
//
// The same module is the chip TAP controller and the Local TAP Controller of
// the shared segment in the Serial Transfer solution; the local copy is kept
// in step with the chip one only through its (gated) TMS input. trst is an
// asynchronous, active-high reset into Test-Logic-Reset; the state encoding
// is this design's own choice.
module tap_fsm
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst,
  input  logic       tms,
  output tap_state_t state,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       update_ir,
  output logic       tlr
);

  tap_state_t nxt;

  always_comb begin
    unique case (state)
      TLR:        nxt = tms ? TLR       : RTI;
      RTI:        nxt = tms ? SEL_DR    : RTI;
      SEL_DR:     nxt = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: nxt = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   nxt = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   nxt = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   nxt = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   nxt = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  nxt = tms ? SEL_DR    : RTI;
      SEL_IR:     nxt = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: nxt = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   nxt = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   nxt = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   nxt = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   nxt = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  nxt = tms ? SEL_DR    : RTI;
      default:    nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or posedge trst) begin
    if (trst) state <= TLR;
    else      state <= nxt;
  end

  assign capture_dr = (state == CAPTURE_DR);
  assign shift_dr   = (state == SHIFT_DR);
  assign update_dr  = (state == UPDATE_DR);
  assign capture_ir = (state == CAPTURE_IR);
  assign shift_ir   = (state == SHIFT_IR);
  assign update_ir  = (state == UPDATE_IR);
  assign tlr        = (state == TLR);

endmodule
