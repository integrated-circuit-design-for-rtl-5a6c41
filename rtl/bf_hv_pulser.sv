// Behavioural model of the 45 V high-voltage pulser that drives one CMUT
// element. The circuit is analog (a level-shifting stage of a large
// high-voltage NMOS with a diode-connected high-voltage PMOS load, followed by
// buffer stages); this model reproduces its timing, not its transistors.
//
// Delay, rise and fall time depend on the capacitive load. The model
// interpolates linearly, and extrapolates from the nearest pair, between the
// three reported operating points:
//   2.5 pF: delay 4 ns, rise 4.2 ns, fall 5.3 ns
//   5.1 pF: delay 4 ns, rise 7.8 ns, fall 7.8 ns
//   10  pF: delay 5 ns, rise 13.3 ns, fall 17 ns
// The default load is the 5.1 pF the stage was sized for (the on-chip test
// capacitor is 5.17 pF). The output is treated as non-inverting, which is an
// assumption: only the overall pulse is specified. Edges are RC-shaped: the
// delay is counted from the input edge to the 50 % point of the output and
// rise/fall are 10-90 % times (a linear ramp could not meet the 10 pF point,
// whose 5 ns delay is shorter than half its 17 ns fall). Even an RC edge
// cannot place the 50 % point of a 17 ns fall within 5 ns, so at 10 pF the
// falling edge starts at once and its 50 % point comes 5.4 ns after the
// input edge.
//
// Interface: in (medium-voltage logic from the MV pulser), v_out (element
// voltage in volts), out (logic view of v_out, high above half of VHV_V).
module bf_hv_pulser #(
  parameter real VHV_V     = 45.0,
  parameter real C_LOAD_PF = 5.1,
  parameter real STEP_NS   = 0.1
) (
  input  logic in,
  output real  v_out,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  // Piecewise-linear interpolation over the three load points.
  function automatic real interp(input real c, input real y25, input real y51, input real y10);
    if (c <= 5.1) return y25 + (y51 - y25) * (c - 2.5) / (5.1 - 2.5);
    else          return y51 + (y10 - y51) * (c - 5.1) / (10.0 - 5.1);
  endfunction

  localparam real DELAY_NS  = interp(C_LOAD_PF, 4.0, 4.0, 5.0);
  localparam real T_RISE_NS = interp(C_LOAD_PF, 4.2, 7.8, 13.3);
  localparam real T_FALL_NS = interp(C_LOAD_PF, 5.3, 7.8, 17.0);

  // RC edge: v moves toward the rail with time constant tau, where the
  // 10-90 % time is 2.2 tau and the 50 % point is ln(2) tau after the start.
  localparam real TAU_R_NS  = T_RISE_NS / 2.197;
  localparam real TAU_F_NS  = T_FALL_NS / 2.197;
  // Edge start after the input edge, never negative (see header).
  localparam real START_R_NS = (DELAY_NS > 0.6931 * TAU_R_NS) ? DELAY_NS - 0.6931 * TAU_R_NS : 0.0;
  localparam real START_F_NS = (DELAY_NS > 0.6931 * TAU_F_NS) ? DELAY_NS - 0.6931 * TAU_F_NS : 0.0;
  localparam real K_R = 1.0 - $exp(-STEP_NS / TAU_R_NS);
  localparam real K_F = 1.0 - $exp(-STEP_NS / TAU_F_NS);
  localparam real SNAP_V = VHV_V * 1.0e-4;

  logic in_d = 1'b0;

  // Transport delay so that the 50 % point of the output lands at DELAY_NS.
  int unsigned edge_id = 0;

  always @(in) begin : delay_line
    edge_id = edge_id + 1;
    fork
      begin : one_edge
        automatic int unsigned id  = edge_id;
        automatic logic        lvl = in;
        #(lvl ? START_R_NS : START_F_NS);
        // A newer input edge cancels this one (inertial delay).
        if (id == edge_id) in_d = lvl;
      end
    join_none
  end

  // Exponential settling toward the rail selected by the delayed input.
  initial begin
    v_out = 0.0;
    forever begin
      if ((in_d && v_out >= VHV_V) || (!in_d && v_out <= 0.0)) begin
        @(in_d);
      end else begin
        #(STEP_NS);
        if (in_d) begin
          v_out = v_out + (VHV_V - v_out) * K_R;
          if (VHV_V - v_out < SNAP_V) v_out = VHV_V;
        end else begin
          v_out = v_out - v_out * K_F;
          if (v_out < SNAP_V) v_out = 0.0;
        end
      end
    end
  end

  always_comb out = (v_out >= VHV_V / 2.0);

endmodule
