// 8-input multiplexer choosing one tap of the frequency down converter.
//
// Built on the chip from transmission gates switched by the three select bits
// and their inverses; logically it passes in[sel] to the output.
//
// Interface: in[7:0] (in[k] = oscillator frequency / 2^(k+1)), sel[2:0]
// ({s2,s1,s0}), out. Combinational.
module bf_mux8 (
  input  logic [7:0] in,
  input  logic [2:0] sel,
  output logic       out
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    out = 1'b0;
    for (int k = 0; k < 8; k++) begin
      if (sel == 3'(k)) out = in[k];
    end
  end

endmodule
