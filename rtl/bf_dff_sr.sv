// Rising-edge D flip-flop with asynchronous set and reset.
//
// This is the storage cell of the chip: a NAND-based edge-triggered flip-flop
// whose output can be forced without a clock edge. It serves as the enable
// circuit of the oscillator (D tied high, clocked by the demultiplexer) and as
// each stage of the frequency divider (D tied to QN).
//
// Interface: clk, d, set_n and rst_n (both active low, asynchronous; reset
// wins when both are asserted, which is this design's choice), q and qn.
// Timing: q takes d on the rising edge of clk.
module bf_dff_sr (
  input  logic clk,
  input  logic d,
  input  logic set_n,
  input  logic rst_n,
  output logic q,
  output logic qn
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n or negedge set_n) begin
    if (!rst_n)      q <= 1'b0;
    else if (!set_n) q <= 1'b1;
    else             q <= d;
  end

  assign qn = ~q;

endmodule
