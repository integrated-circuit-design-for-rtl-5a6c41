// FPGA beam controller: serial receiver, command decoder and firing
// sequencer in one block.
//
// The host computes, for a chosen focal point, the travel time from every
// element to the focus, divides it by the FPGA clock period, and sends the
// resulting cycle counts together with the ASIC control bits over the serial
// line. This block stores them, drives the control word onto the ASIC's
// common data lines, and on the fire command raises each row's trigger on its
// own cycle (see fpga_fire_ctrl).
//
// Interface: clk, rst_n, uart_rx (serial line), ctrl (ASIC control word),
// trig[N_ROWS] (one trigger per ASIC row), osc_rst_n (clears the oscillator
// enables and dividers outside a firing sequence), busy, cfg_valid,
// rx_frame_err (pulse), bad_cmd (count).
// The sequencer's end-of-sequence pulse is not used here: busy falling
// carries the same information to the outside.
// Timing: synchronous to clk; the serial byte format (8N1, LSB first,
// CLKS_PER_BIT clocks per bit) matches the board's serial test program,
// the frame layout on top of it is this design's own.
module fpga_beam_ctrl
  import bf_pkg::*;
#(
  parameter int unsigned N_ROWS       = 16,
  parameter int unsigned LAT_W        = 16,
  parameter int unsigned PW_W         = 16,
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              uart_rx,
  output bf_ctrl_t          ctrl,
  output logic [N_ROWS-1:0] trig,
  output logic              osc_rst_n,
  output logic              busy,
  output logic              cfg_valid,
  output logic              rx_frame_err,
  output logic [7:0]        bad_cmd
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0]       rx_data;
  logic             rx_valid;
  logic [PW_W-1:0]  pw;
  logic [LAT_W-1:0] lat [N_ROWS];
  logic             fire;
  logic             done;

  fpga_uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .rx       (uart_rx),
    .data     (rx_data),
    .valid    (rx_valid),
    .frame_err(rx_frame_err)
  );

  fpga_cfg_loader #(.N_ROWS(N_ROWS), .LAT_W(LAT_W), .PW_W(PW_W)) u_loader (
    .clk       (clk),
    .rst_n     (rst_n),
    .byte_data (rx_data),
    .byte_valid(rx_valid),
    .ctrl      (ctrl),
    .pw        (pw),
    .lat       (lat),
    .cfg_valid (cfg_valid),
    .fire      (fire),
    .bad_cmd   (bad_cmd)
  );

  fpga_fire_ctrl #(.N_ROWS(N_ROWS), .LAT_W(LAT_W), .PW_W(PW_W)) u_fire (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (fire),
    .lat      (lat),
    .pw       (pw),
    .trig     (trig),
    .osc_rst_n(osc_rst_n),
    .busy     (busy),
    .done     (done)
  );

endmodule
