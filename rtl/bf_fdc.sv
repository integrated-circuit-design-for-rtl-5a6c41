// Frequency down converter: an 8-stage ripple divider.
//
// Each stage is a D flip-flop with its QN fed back to D, so it toggles on
// every rising edge of its clock and halves the frequency. Stage 0 is clocked
// by the oscillator; every later stage is clocked by the QN output of the one
// before it, so stage n toggles when stage n-1's Q falls, and tap f[n]
// carries the input frequency divided by 2^(n+1): f/2, f/4, ..., f/256.
// Set and reset of all stages are common.
//
// Interface: clk_in (oscillator pulse train), set_n and rst_n (asynchronous,
// active low, common to all stages), f[STAGES-1:0] (f[0] = f/2).
// Timing: ripple; stage n settles n flip-flop delays after the input edge.
// Clocking each stage by the previous QN (a counting-up ripple) is this
// design's choice; any polarity divides by two.
module bf_fdc #(
  parameter int unsigned STAGES = 8
) (
  input  logic              clk_in,
  input  logic              set_n,
  input  logic              rst_n,
  output logic [STAGES-1:0] f
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [STAGES-1:0] q, qn;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic stage_clk;
    if (i == 0) begin : g_first
      assign stage_clk = clk_in;
    end else begin : g_next
      assign stage_clk = qn[i-1];
    end
    bf_dff_sr u_ff (
      .clk  (stage_clk),
      .d    (qn[i]),
      .set_n(set_n),
      .rst_n(rst_n),
      .q    (q[i]),
      .qn   (qn[i])
    );
  end

  assign f = q;

endmodule
