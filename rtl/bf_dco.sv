// Behavioural model of the digitally controlled oscillator (DCO) of a row.
// The ring itself is analog (current-starved delay elements) and is modelled
// with delays; the enable flip-flop is real logic.
//
// On the chip the DCO is an enable flip-flop, a 2-input NAND, an inverter and
// three digitally controlled delay elements closed into a ring of five
// inverting stages, followed by a four-inverter buffer. The enable flip-flop
// has D tied high and is clocked by the demultiplexer, so the first rising
// trigger edge starts the oscillation; only its asynchronous reset stops it.
// While the enable is low the NAND output is high and the ring node that
// feeds the NAND settles high, so the output rests at 1 and its first
// transition (a fall) comes half a period after enabling.
//
// The 5-bit code sets the current of all three delay elements. The frequency
// for each code is the table the host software uses to choose a code
// (256 MHz for code 0 down to 20 MHz for code 31, not monotonic between codes
// 15 and 16); the model toggles every half period of that frequency.
//
// Interface: trig (demultiplexer output, clock of the enable flip-flop),
// set_n, rst_n (asynchronous enable set/reset from the FPGA, active low),
// code, en (enable flip-flop output), osc (buffered pulse train).
// The enable flip-flop's inverted output is left open, as on the chip.
module bf_dco (
  input  logic       trig,
  input  logic       set_n,
  input  logic       rst_n,
  input  logic [4:0] code,
  output logic       en,
  output logic       osc
);
  timeunit 1ns;
  timeprecision 1ps;

  // Oscillation frequency in MHz for each code {d4..d0}.
  function automatic real freq_mhz(input logic [4:0] c);
    case (c)
      5'd0:  return 256.0;  5'd1:  return 250.0;  5'd2:  return 244.0;  5'd3:  return 238.0;
      5'd4:  return 222.0;  5'd5:  return 217.0;  5'd6:  return 213.0;  5'd7:  return 200.0;
      5'd8:  return 196.0;  5'd9:  return 179.0;  5'd10: return 175.0;  5'd11: return 164.0;
      5'd12: return 156.0;  5'd13: return 143.0;  5'd14: return 137.0;  5'd15: return 127.0;
      5'd16: return 178.0;  5'd17: return 169.0;  5'd18: return 158.0;  5'd19: return 151.0;
      5'd20: return 142.0;  5'd21: return 130.0;  5'd22: return 122.0;  5'd23: return 112.0;
      5'd24: return 100.0;  5'd25: return 85.0;   5'd26: return 81.0;   5'd27: return 65.0;
      5'd28: return 53.0;   5'd29: return 39.0;   5'd30: return 34.0;   default: return 20.0;
    endcase
  endfunction

  bf_dff_sr u_enable (
    .clk  (trig),
    .d    (1'b1),
    .set_n(set_n),
    .rst_n(rst_n),
    .q    (en),
    .qn   ()
  );

  initial osc = 1'b1;

  // Ring: toggle every half period while enabled, rest high otherwise.
  always begin : ring
    real half_ns;
    if (!en) begin
      osc = 1'b1;
      @(posedge en);
    end else begin
      half_ns = 500.0 / freq_mhz(code);
      #(half_ns);
      if (en) osc = ~osc;
    end
  end

endmodule
