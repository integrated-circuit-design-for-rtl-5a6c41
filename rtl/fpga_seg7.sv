// Hexadecimal to seven-segment decoder for the FPGA board's display.
//
// Turns a 4-bit value into the seven segment lines {g,f,e,d,c,b,a} of one
// digit. The board display has common-anode digits, so a segment is lit when
// its line is low (active low, as the board's digit enables are). Digits
// 0-9 use the usual shapes, A-F the usual mixed-case letters (A b C d E F),
// so a whole received byte can be shown as two digits. The board test
// program only names this decoder and feeds it a 4-bit digit; the segment
// order, polarity and the letter shapes are this design's choice.
//
// Interface: digit[3:0] in, seg_n[6:0] out (bit 0 = segment a ... bit 6 = g).
// Timing: purely combinational.
module fpga_seg7 (
  input  logic [3:0] digit,
  output logic [6:0] seg_n
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [6:0] seg;  // active high, {g,f,e,d,c,b,a}

  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      default: seg = 7'b1110001;  // F
    endcase
    seg_n = ~seg;
  end
endmodule
