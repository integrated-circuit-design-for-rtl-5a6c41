// Shared types and constants of the annular-CMUT transmit beamformer.
//
// The beamformer ASIC has one "row" per transducer element. Every row receives
// the same control word over common data lines (bf_ctrl_t below) and its own
// trigger line from the FPGA. The control word selects the signal source of a
// row (single pulse from the oneshot, pulse train from the digitally
// controlled oscillator, the raw FPGA trigger, or ground), the 3-bit oneshot
// width code, the 5-bit oscillator code and the 3-bit divider tap.
//
// The field set and the select encodings follow the host software's control
// record (demux select 0 = oneshot, 1 = oscillator; 4-input multiplexer
// 00 ground, 01 FPGA, 10 oneshot, 11 oscillator). Field order and the serial
// frame layout are this design's own choice.
package bf_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Select code of the 4-input output multiplexer, {s1,s0}.
  typedef enum logic [1:0] {
    SRC_GROUND  = 2'b00,
    SRC_FPGA    = 2'b01,
    SRC_ONESHOT = 2'b10,
    SRC_DCO     = 2'b11
  } src_sel_e;

  // Control bits shared by all rows of the ASIC (14 bits).
  typedef struct packed {
    logic       demux_sel;     // 0: trigger goes to the oneshot, 1: to the DCO enable
    logic [2:0] oneshot_code;  // {d2,d1,d0} discharge-current code of the oneshot
    logic [4:0] dco_code;      // {d4..d0} current code of the delay elements
    logic [2:0] mux8_sel;      // divider tap: 0 -> f/2 ... 7 -> f/256
    src_sel_e   mux4_sel;      // row output source
  } bf_ctrl_t;

  localparam int unsigned CTRL_W   = $bits(bf_ctrl_t);
  localparam int unsigned FDC_TAPS = 8;     // divide by 2 .. 256
  localparam int unsigned DCO_CODES = 32;   // 5 controlled current-source transistors
  localparam int unsigned OS_CODES  = 8;    // 3 controlled current-source transistors

  // Serial command bytes understood by the FPGA configuration loader.
  localparam logic [7:0] CMD_CONFIG = 8'hA5;
  localparam logic [7:0] CMD_FIRE   = 8'h5A;

endpackage
