// jtag_pkg: shared types and constants of the JTAG/IEEE 1687 side of the design.
//
// tap_state_t enumerates the sixteen states of the IEEE 1149.1 TAP controller.
// The encoding is this design's own choice; only the state names and the TMS
// arcs between them are fixed by the standard. The instruction codes belong to
// the 2-bit instruction register of jtag_tap, also this design's own choice.
package jtag_pkg;

  typedef enum logic [3:0] {
    TLR        = 4'h0,  // Test-Logic-Reset
    RTI        = 4'h1,  // Run-Test/Idle
    SEL_DR     = 4'h2,
    CAPTURE_DR = 4'h3,
    SHIFT_DR   = 4'h4,
    EXIT1_DR   = 4'h5,
    PAUSE_DR   = 4'h6,
    EXIT2_DR   = 4'h7,
    UPDATE_DR  = 4'h8,
    SEL_IR     = 4'h9,
    CAPTURE_IR = 4'hA,
    SHIFT_IR   = 4'hB,
    EXIT1_IR   = 4'hC,
    PAUSE_IR   = 4'hD,
    EXIT2_IR   = 4'hE,
    UPDATE_IR  = 4'hF
  } tap_state_t;

  localparam int unsigned IR_W = 2;
  localparam logic [IR_W-1:0] IR_IJTAG  = 2'b10;  // selects the 1687 network
  localparam logic [IR_W-1:0] IR_BYPASS = 2'b11;  // 1-bit bypass register

  // Value loaded into the IR shift stage at Capture-IR (LSBs 01 as 1149.1 asks).
  localparam logic [IR_W-1:0] IR_CAPTURE = 2'b01;

endpackage
