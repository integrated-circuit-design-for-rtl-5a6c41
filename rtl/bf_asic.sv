// Beamformer ASIC: N_ROWS identical transmit rows sharing one control word.
//
// The chip has no phasing logic of its own. The control word (signal source,
// oneshot code, oscillator code, divider tap) reaches every row over common
// data lines; each row has its own trigger line, and the time that line is
// raised is the firing time of its element. The default of 16 rows is the
// chip for the 4x4 annular array (four rings, each cut into four elements);
// 4 rows gives the chips for the four-ring and four-sector arrays and 1 row
// the test cell.
//
// Interface: trig[N_ROWS], ctrl, osc_set_n, osc_rst_n (common to all rows),
// drive[N_ROWS] (core-voltage output of each row), hv_out[N_ROWS] (logic
// view of each element voltage), v_cmut[N_ROWS] (element voltages, volts).
// Timing: no clock; every row adds the same delay from trigger to element
// (about 4.6 ns at the 5.1 pF load in the oneshot-code-0 and direct modes),
// so the relative firing times equal the relative trigger times.
// The row count and the shared-control/per-row-trigger structure follow the
// described chips; the port grouping is this design's own.
module bf_asic
  import bf_pkg::*;
#(
  parameter int unsigned N_ROWS    = 16,
  parameter real         C_LOAD_PF = 5.1
) (
  input  logic [N_ROWS-1:0] trig,
  input  bf_ctrl_t          ctrl,
  input  logic              osc_set_n,
  input  logic              osc_rst_n,
  output logic [N_ROWS-1:0] drive,
  output logic [N_ROWS-1:0] hv_out,
  output real               v_cmut [N_ROWS]
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    bf_row #(.C_LOAD_PF(C_LOAD_PF)) u_row (
      .trig     (trig[r]),
      .ctrl     (ctrl),
      .osc_set_n(osc_set_n),
      .osc_rst_n(osc_rst_n),
      .drive    (drive[r]),
      .hv_out   (hv_out[r]),
      .v_cmut   (v_cmut[r])
    );
  end

endmodule
