// Behavioural model of the medium-voltage (3.3 V) pulser of a row.
// The circuit is analog (two thick-oxide inverters); this model reproduces
// its timing and output swing, it is not synthesizable.
//
// The pulser takes the 1.8 V core signal and, through two inverters supplied
// from 3.3 V, drives the large input gate of the high-voltage stage. The
// model delays the input and then lets the output voltage settle
// exponentially (an RC edge) toward the selected rail, so that the 50 %
// point comes DELAY_NS after the input edge and the 10-90 % time equals the
// given rise or fall time. Defaults are the reported figures: 0.6 ns delay,
// 0.5 ns rise, 0.3 ns fall, 3.3 V supply. Reading the reported times as
// 50 % delay and 10-90 % edges is this model's assumption. The two inverters make the
// stage non-inverting.
//
// Interface: in (core logic level), v_out (output voltage in volts), out
// (logic view of v_out, high above half the supply).
module bf_mv_pulser #(
  parameter real VDD_V     = 3.3,
  parameter real DELAY_NS  = 0.6,
  parameter real T_RISE_NS = 0.5,
  parameter real T_FALL_NS = 0.3,
  parameter real STEP_NS   = 0.01
) (
  input  logic in,
  output real  v_out,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  // RC edge: v moves toward the rail with time constant tau, where the
  // 10-90 % time is 2.2 tau and the 50 % point is ln(2) tau after the start.
  localparam real TAU_R_NS  = T_RISE_NS / 2.197;
  localparam real TAU_F_NS  = T_FALL_NS / 2.197;
  // Edge start after the input edge, never negative (see header).
  localparam real START_R_NS = (DELAY_NS > 0.6931 * TAU_R_NS) ? DELAY_NS - 0.6931 * TAU_R_NS : 0.0;
  localparam real START_F_NS = (DELAY_NS > 0.6931 * TAU_F_NS) ? DELAY_NS - 0.6931 * TAU_F_NS : 0.0;
  localparam real K_R = 1.0 - $exp(-STEP_NS / TAU_R_NS);
  localparam real K_F = 1.0 - $exp(-STEP_NS / TAU_F_NS);
  localparam real SNAP_V = VDD_V * 1.0e-4;

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
      if ((in_d && v_out >= VDD_V) || (!in_d && v_out <= 0.0)) begin
        @(in_d);
      end else begin
        #(STEP_NS);
        if (in_d) begin
          v_out = v_out + (VDD_V - v_out) * K_R;
          if (VDD_V - v_out < SNAP_V) v_out = VDD_V;
        end else begin
          v_out = v_out - v_out * K_F;
          if (v_out < SNAP_V) v_out = 0.0;
        end
      end
    end
  end

  always_comb out = (v_out >= VDD_V / 2.0);

endmodule
