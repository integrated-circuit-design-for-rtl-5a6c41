// Serial transmitter of the FPGA board test: 8 data bits, no parity, one stop
// bit, LSB first, CLKS_PER_BIT clock cycles per bit (5208 = 9600 baud at
// 50 MHz, the same rate as the receiver).
//
// While en is high the transmitter sends the 7-bit value data as one
// character per frame ({1'b0, data}: start bit, 7 data bits, a 0 as the
// eighth bit, stop bit), back to back; the value is sampled at the start of
// each frame. When en falls the frame in progress is completed and the line
// then rests high. The board test program drives en and data from the slide
// switches; that it sends a 7-bit character while a switch is on follows
// from its wiring, the framing and the repeat-while-enabled behaviour are
// this design's choice.
//
// Interface: clk, rst_n (synchronous, active low), en, data[6:0], tx (line,
// idle high), busy (a frame is on the line).
// Timing: a frame lasts 10 * CLKS_PER_BIT cycles, with one idle cycle
// between back-to-back frames; the start bit begins on the
// cycle after en is seen high while idle.
module fpga_uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [6:0] data,
  output logic       tx,
  output logic       busy
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CNT_W = $clog2(CLKS_PER_BIT + 1);

  logic [CNT_W-1:0] cnt;
  logic [3:0]       bit_idx;  // 0: start, 1..8: data, 9: stop
  logic [9:0]       frame;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
      tx      <= 1'b1;
      busy    <= 1'b0;
    end else if (!busy) begin
      tx <= 1'b1;
      if (en) begin
        frame   <= {1'b1, 1'b0, data, 1'b0};  // stop, bit 7, data[6:0], start
        busy    <= 1'b1;
        bit_idx <= '0;
        cnt     <= '0;
        tx      <= 1'b0;
      end
    end else begin
      if (cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          tx   <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          tx      <= frame[bit_idx + 1'b1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
