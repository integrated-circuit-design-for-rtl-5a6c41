// Two-output demultiplexer at the head of every beamformer row.
//
// The trigger coming from the FPGA is steered either to the oneshot
// (single-pulse generator) or to the clock input of the oscillator's enable
// flip-flop. The gate structure is the one of the chip: two NAND gates, one
// fed with the select bit and one with its inverse, each followed by an
// inverter, so each output is the AND of the trigger and its select term and
// the unselected output is held low.
//
// Interface: in_trig (trigger from the FPGA), sel (0 = oneshot, 1 = oscillator;
// this polarity is taken from the host software's control record),
// out_oneshot, out_dco. Purely combinational, no clock.
module bf_demux (
  input  logic in_trig,
  input  logic sel,
  output logic out_oneshot,
  output logic out_dco
);
  timeunit 1ns;
  timeprecision 1ps;

  logic nand_os, nand_dco;

  always_comb begin
    nand_os     = ~(in_trig & ~sel);
    nand_dco    = ~(in_trig &  sel);
    out_oneshot = ~nand_os;
    out_dco     = ~nand_dco;
  end

endmodule
