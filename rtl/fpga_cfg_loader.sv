// Command decoder of the FPGA beam controller.
//
// Turns the byte stream from the serial receiver into the ASIC control word,
// the trigger length and one firing latency per row, and issues the fire
// command. Two commands exist (bf_pkg::CMD_CONFIG, bf_pkg::CMD_FIRE):
//
//   CONFIG frame: A5, ctrl[13:8], ctrl[7:0], pw[7:0], pw[15:8],
//                 then for row 0 .. N_ROWS-1: lat[7:0], lat[15:8]
//   FIRE:         5A
//
// ctrl is a packed bf_pkg::bf_ctrl_t. pw is the length of every trigger in
// FPGA clock cycles (the oneshot reshapes the first 10 ns of it; in
// oscillator mode it sets how long the pulse train lasts). lat is the cycle,
// counted from the fire command, on which a row's trigger starts.
// A frame is collected in shadow registers and becomes active only when its
// last byte has arrived, so a broken frame never leaves a half-written set.
// FIRE before any complete CONFIG, and any other byte in place of a command,
// is ignored and counted in bad_cmd. The frame layout is this design's own;
// the host software of the system only states which values it sends.
//
// Interface: clk, rst_n (synchronous, active low), byte_data/byte_valid from
// the receiver, ctrl, pw, lat[N_ROWS] (active set), cfg_valid (a complete
// frame has been loaded), fire (one-cycle pulse), bad_cmd (count, saturating).
module fpga_cfg_loader
  import bf_pkg::*;
#(
  parameter int unsigned N_ROWS = 16,
  parameter int unsigned LAT_W  = 16,
  parameter int unsigned PW_W   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       byte_data,
  input  logic             byte_valid,
  output bf_ctrl_t         ctrl,
  output logic [PW_W-1:0]  pw,
  output logic [LAT_W-1:0] lat [N_ROWS],
  output logic             cfg_valid,
  output logic             fire,
  output logic [7:0]       bad_cmd
);
  timeunit 1ns;
  timeprecision 1ps;

  // Bytes after the command byte: 2 control, 2 trigger length, 2 per row.
  localparam int unsigned PAYLOAD = 4 + 2 * N_ROWS;
  localparam int unsigned IDX_W   = $clog2(PAYLOAD + 1);

  typedef enum logic {L_CMD, L_PAYLOAD} lstate_e;

  lstate_e          state;
  logic [IDX_W-1:0] idx;
  logic [15:0]      sh_ctrl;
  logic [15:0]      sh_pw;
  logic [15:0]      sh_lat [N_ROWS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= L_CMD;
      idx       <= '0;
      sh_ctrl   <= '0;
      sh_pw     <= '0;
      ctrl      <= '0;
      pw        <= '0;
      cfg_valid <= 1'b0;
      fire      <= 1'b0;
      bad_cmd   <= '0;
      for (int r = 0; r < N_ROWS; r++) begin
        sh_lat[r] <= '0;
        lat[r]    <= '0;
      end
    end else begin
      fire <= 1'b0;
      if (byte_valid) begin
        unique case (state)
          L_CMD: begin
            idx <= '0;
            if (byte_data == CMD_CONFIG) begin
              state <= L_PAYLOAD;
            end else if (byte_data == CMD_FIRE && cfg_valid) begin
              fire <= 1'b1;
            end else if (bad_cmd != 8'hFF) begin
              bad_cmd <= bad_cmd + 1'b1;
            end
          end
          L_PAYLOAD: begin
            idx <= idx + 1'b1;
            if (idx == IDX_W'(0))      sh_ctrl[15:8] <= byte_data;
            else if (idx == IDX_W'(1)) sh_ctrl[7:0]  <= byte_data;
            else if (idx == IDX_W'(2)) sh_pw[7:0]    <= byte_data;
            else if (idx == IDX_W'(3)) sh_pw[15:8]   <= byte_data;
            else begin
              for (int r = 0; r < N_ROWS; r++) begin
                if (idx == IDX_W'(4 + 2 * r))     sh_lat[r][7:0]  <= byte_data;
                if (idx == IDX_W'(4 + 2 * r + 1)) sh_lat[r][15:8] <= byte_data;
              end
            end
            if (idx == IDX_W'(PAYLOAD - 1)) begin
              // Last byte: commit the whole frame at once.
              state     <= L_CMD;
              cfg_valid <= 1'b1;
              ctrl      <= bf_ctrl_t'(sh_ctrl[CTRL_W-1:0]);
              pw        <= PW_W'(sh_pw);
              for (int r = 0; r < N_ROWS - 1; r++) lat[r] <= LAT_W'(sh_lat[r]);
              lat[N_ROWS-1] <= LAT_W'({byte_data, sh_lat[N_ROWS-1][7:0]});
            end
          end
          default: state <= L_CMD;
        endcase
      end
    end
  end

endmodule
