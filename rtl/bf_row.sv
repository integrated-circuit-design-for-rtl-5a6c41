// One beamforming row: the complete transmit chain for one CMUT element.
//
// trig (from the FPGA) -> demultiplexer -> either
//   oneshot: a single pulse, trimmed within its first 10 ns by the 3-bit code
//   DCO: the enable flip-flop starts a ring oscillator set by the 5-bit code,
//        an 8-stage divider gives f/2 .. f/256, the 8-input mux picks one
// -> 4-input mux (ground, raw FPGA trigger, oneshot, divided pulse train)
// -> buffer -> 3.3 V pulser -> 45 V pulser -> element.
//
// All rows are identical and share the control word, so the moment a row's
// trigger arrives is the moment its element fires. The four-inverter buffer
// between the multiplexer and the 3.3 V pulser has no logic function (it only
// sharpens edges and adds drive) and is not modelled; the multiplexer output
// is available as drive. Routing the row trigger to the "FPGA" input of the
// 4-input multiplexer is this design's reading of "a direct FPGA bit".
// The row is a mixed model: the demultiplexer, flip-flops, divider and
// multiplexers are logic, the oneshot, ring oscillator and pulsers are
// behavioural models.
// The oscillator enable and the 3.3 V node voltage are internal signals
// kept for probing in simulation; nothing inside the row reads them.
// Timing: no clock. Row output to element 50 % point is 0.6 ns (3.3 V stage)
// plus the 45 V stage delay (4 ns at 5.1 pF); the oneshot path adds its trim
// delay, the oscillator path starts half a period after the trigger edge.
//
// Interface: trig, ctrl (bf_pkg::bf_ctrl_t), osc_set_n, osc_rst_n
// (asynchronous set/reset of the oscillator enable and of the divider),
// drive (core-voltage row output), hv_out (logic view of the element
// voltage), v_cmut (element voltage, volts).
module bf_row
  import bf_pkg::*;
#(
  parameter real C_LOAD_PF = 5.1
) (
  input  logic     trig,
  input  bf_ctrl_t ctrl,
  input  logic     osc_set_n,
  input  logic     osc_rst_n,
  output logic     drive,
  output logic     hv_out,
  output real      v_cmut
);
  timeunit 1ns;
  timeprecision 1ps;

  logic       to_oneshot, to_dco;
  logic       os_out;
  logic       dco_en, dco_osc;
  logic [7:0] fdc_taps;
  logic       train;
  logic       mv_out;
  real        v_mv;

  bf_demux u_demux (
    .in_trig    (trig),
    .sel        (ctrl.demux_sel),
    .out_oneshot(to_oneshot),
    .out_dco    (to_dco)
  );

  bf_oneshot u_oneshot (
    .in_trig(to_oneshot),
    .code   (ctrl.oneshot_code),
    .out    (os_out)
  );

  bf_dco u_dco (
    .trig (to_dco),
    .set_n(osc_set_n),
    .rst_n(osc_rst_n),
    .code (ctrl.dco_code),
    .en   (dco_en),
    .osc  (dco_osc)
  );

  bf_fdc #(.STAGES(8)) u_fdc (
    .clk_in(dco_osc),
    .set_n (osc_set_n),
    .rst_n (osc_rst_n),
    .f     (fdc_taps)
  );

  bf_mux8 u_mux8 (
    .in (fdc_taps),
    .sel(ctrl.mux8_sel),
    .out(train)
  );

  bf_mux4 u_mux4 (
    .in_ground (1'b0),
    .in_fpga   (trig),
    .in_oneshot(os_out),
    .in_dco    (train),
    .sel       (ctrl.mux4_sel),
    .out       (drive)
  );

  bf_mv_pulser u_mv (
    .in   (drive),
    .v_out(v_mv),
    .out  (mv_out)
  );

  bf_hv_pulser #(.C_LOAD_PF(C_LOAD_PF)) u_hv (
    .in   (mv_out),
    .v_out(v_cmut),
    .out  (hv_out)
  );

endmodule
