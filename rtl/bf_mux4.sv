// 4-input output multiplexer of a beamformer row.
//
// Picks the signal that goes on to the buffer and the pulsers: ground, the
// FPGA trigger passed straight through, the oneshot pulse, or the divided
// oscillator pulse train. On the chip it is four transmission gates driven by
// two select bits and their inverses. With {s1,s0} = 00 input 0 passes and
// with 11 input 3 passes; the assignment of the sources to the inputs follows
// the host software (00 ground, 01 FPGA, 10 oneshot, 11 oscillator).
//
// Interface: in_ground, in_fpga, in_oneshot, in_dco, sel (bf_pkg::src_sel_e),
// out. Combinational.
module bf_mux4
  import bf_pkg::*;
(
  input  logic     in_ground,
  input  logic     in_fpga,
  input  logic     in_oneshot,
  input  logic     in_dco,
  input  src_sel_e sel,
  output logic     out
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    unique case (sel)
      SRC_GROUND:  out = in_ground;
      SRC_FPGA:    out = in_fpga;
      SRC_ONESHOT: out = in_oneshot;
      SRC_DCO:     out = in_dco;
      default:     out = 1'b0;
    endcase
  end

endmodule
