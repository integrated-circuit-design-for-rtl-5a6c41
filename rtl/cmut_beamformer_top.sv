// Transmit beamformer for an annular CMUT array: FPGA controller plus ASIC.
//
// The FPGA part (fpga_beam_ctrl) receives the control word and per-element
// firing latencies over a serial line and, on the fire command, raises each
// row's trigger on its own clock cycle. The ASIC part (bf_asic) turns each
// trigger into a single pulse or a pulse train, chosen by the control word,
// and lifts it to 45 V for its element. The enable set inputs of the ASIC
// are not used by the controller and are tied inactive.
//
// Interface: clk (FPGA clock), rst_n (active low), uart_rx (serial line),
// trig[N_ROWS] (trigger lines between FPGA and ASIC, brought out for
// observation), drive[N_ROWS] (core-voltage row outputs), hv_out[N_ROWS] and
// v_cmut[N_ROWS] (element drive, logic view and volts), busy, cfg_valid,
// rx_frame_err, bad_cmd; and for the board's serial-link test, which runs
// beside the controller on the same receive line: sw[7:0] (switches),
// seg_n/an_n (four-digit display), flash (receive LED), uart_tx, rx_mirror.
// Timing: one byte takes 10*CLKS_PER_BIT clock cycles on the serial line; a
// configuration is 5 + 2*N_ROWS bytes. After the FIRE byte's stop bit is
// sampled, row r's trigger rises a fixed few cycles plus lat[r] later and stays
// high pw cycles; its element crosses 22.5 V a fixed analog delay after.
// The split between FPGA and ASIC follows the described system; the serial
// frame format and the command bytes are this design's own choice.
module cmut_beamformer_top
  import bf_pkg::*;
#(
  parameter int unsigned N_ROWS       = 16,
  parameter int unsigned LAT_W        = 16,
  parameter int unsigned PW_W         = 16,
  parameter int unsigned CLKS_PER_BIT = 5208,
  parameter real         C_LOAD_PF    = 5.1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              uart_rx,
  output logic [N_ROWS-1:0] trig,
  output logic [N_ROWS-1:0] drive,
  output logic [N_ROWS-1:0] hv_out,
  output real               v_cmut [N_ROWS],
  output logic              busy,
  output logic              cfg_valid,
  output logic              rx_frame_err,
  output logic [7:0]        bad_cmd,
  // board serial-link test
  input  logic [7:0]        sw,
  output logic [6:0]        seg_n,
  output logic [3:0]        an_n,
  output logic              flash,
  output logic              uart_tx,
  output logic              rx_mirror
);
  timeunit 1ns;
  timeprecision 1ps;

  bf_ctrl_t ctrl;
  logic     osc_rst_n;

  fpga_beam_ctrl #(
    .N_ROWS(N_ROWS), .LAT_W(LAT_W), .PW_W(PW_W), .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_fpga (
    .clk         (clk),
    .rst_n       (rst_n),
    .uart_rx     (uart_rx),
    .ctrl        (ctrl),
    .trig        (trig),
    .osc_rst_n   (osc_rst_n),
    .busy        (busy),
    .cfg_valid   (cfg_valid),
    .rx_frame_err(rx_frame_err),
    .bad_cmd     (bad_cmd)
  );

  bf_asic #(.N_ROWS(N_ROWS), .C_LOAD_PF(C_LOAD_PF)) u_asic (
    .trig     (trig),
    .ctrl     (ctrl),
    .osc_set_n(1'b1),
    .osc_rst_n(osc_rst_n),
    .drive    (drive),
    .hv_out   (hv_out),
    .v_cmut   (v_cmut)
  );

  fpga_serial_test #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_link_test (
    .clk      (clk),
    .rst_n    (rst_n),
    .rx       (uart_rx),
    .sw       (sw),
    .seg_n    (seg_n),
    .an_n     (an_n),
    .flash    (flash),
    .tx       (uart_tx),
    .rx_mirror(rx_mirror)
  );

endmodule
