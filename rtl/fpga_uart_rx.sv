// Serial (RS-232, 8N1) receiver of the FPGA beam controller.
//
// The host sends the control bits and the per-element firing latencies over
// a serial line. The receiver synchronises the line into the FPGA clock
// domain, waits for a falling start edge, re-checks the start bit half a bit
// later, then samples the eight data bits (LSB first) and the stop bit each
// one full bit period apart, i.e. in the middle of every bit.
//
// One bit lasts CLKS_PER_BIT clock cycles; the default of 5208 is 9600 baud
// from a 50 MHz board clock, the bit length counted by the board program.
// Mid-bit sampling and a single stop bit are this design's choices.
//
// Interface: clk, rst_n (synchronous to clk, active low), rx (line, idle
// high), data (received byte), valid (one-cycle pulse with a good byte),
// frame_err (one-cycle pulse when the stop bit is low; data is dropped).
// Timing: valid rises about 9.5 bit periods after the start edge.
module fpga_uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;
  logic [1:0]       sync;
  logic             rx_s;

  // Two-flop synchroniser; the line idles high.
  always_ff @(posedge clk) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rx};
  end
  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx_s) state <= S_START;
        end
        S_START: begin
          if (cnt == CNT_W'(CLKS_PER_BIT / 2 - 1)) begin
            cnt <= '0;
            if (!rx_s) begin
              state   <= S_DATA;
              bit_idx <= '0;
            end else begin
              state <= S_IDLE;           // glitch, not a start bit
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rx_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
