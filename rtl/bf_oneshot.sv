// Behavioural model of the oneshot (single pulse generator) of a beamformer row.
// This is a model of an analog current-starved circuit, not synthesizable logic.
//
// On the chip the pulse width is set by a 3-bit digitally controlled current
// source that, through a current mirror, sets the discharge current of the
// first inverter. The FPGA sends a trigger that is 10 ns or a multiple of
// 10 ns long; the circuit reshapes only the first 10 ns: the output rises a
// code-dependent time after the trigger rises and falls with the trigger. A
// trigger of N*10 ns therefore yields a pulse of (N-1)*10 ns + w(code).
//
// w(code) for code {d2,d1,d0} = 0..7 is 10, 9.8, 9.7, 9.6, 7.5, 7.0, 5.0 and
// 2.5 ns, the table used by the host software to pick the code for a wanted
// width; code 0 leaves the trigger unchanged. A trigger that ends before the
// trim delay has passed produces no pulse.
//
// Interface: in_trig (from the demultiplexer), code, out.
// The model uses event controls, blocking assignments and a computed delay
// (0 ns for code 0) because it describes analog timing, not a register.
module bf_oneshot (
  input  logic       in_trig,
  input  logic [2:0] code,
  output logic       out
);
  timeunit 1ns;
  timeprecision 1ps;

  // Output pulse length within the first 10 ns of the trigger, in ns.
  function automatic real first_slot_width(input logic [2:0] c);
    case (c)
      3'd0:    return 10.0;
      3'd1:    return 9.8;
      3'd2:    return 9.7;
      3'd3:    return 9.6;
      3'd4:    return 7.5;
      3'd5:    return 7.0;
      3'd6:    return 5.0;
      default: return 2.5;
    endcase
  endfunction

  int unsigned rise_count = 0;

  initial out = 1'b0;

  // The rising edge of the output is held back by the trim delay.
  always @(posedge in_trig) begin : rise_path
    int unsigned my_edge;
    real         trim;
    rise_count = rise_count + 1;
    my_edge    = rise_count;
    trim       = 10.0 - first_slot_width(code);
    if (trim > 0.0) #(trim);
    if (in_trig && my_edge == rise_count) out = 1'b1;
  end

  // The falling edge follows the trigger.
  always @(negedge in_trig) out = 1'b0;

endmodule
