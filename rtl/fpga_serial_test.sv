// Serial-link test of the FPGA board, used to bring up the RS-232 connection
// between the host and the FPGA before the beamformer program runs on it.
//
// It receives bytes on the same serial line as the beamformer controller and
// shows, on the board's four-digit seven-segment display, the eight slide
// switches (left two digits) and the last correctly received byte (right two
// digits), all in hexadecimal. A byte with a bad stop bit leaves the shown
// byte unchanged. An LED flashes for about 62 ms (FLASH_TICKS ticks of a
// 16x-baud clock) whenever a start bit begins while it is dark. Switch 7
// enables the transmitter, which sends the value of switches 6..0 back to the
// host, and the raw receive line is mirrored on a second output for probing.
//
// The display is scanned one digit at a time, one digit per baud period
// (CLKS_PER_BIT clocks), with active-low digit enables in the order
// switches-high, switches-low, byte-high, byte-low, as in the board program.
// The choice of what is shown, the flash length in 16x-baud ticks, the switch
// wiring and the rates follow the board program; the byte receiver is the
// controller's own receiver (the board program checks more stop-bit time), the
// decoder and transmitter are simple stand-ins for components it only names,
// and the board program's special handling of a few byte values (00, FF and
// the digits '1', '2') is left out.
//
// Interface: clk, rst_n (synchronous, active low), rx (serial line), sw[7:0]
// (slide switches), seg_n[6:0] (segments, active low), an_n[3:0] (digit
// enables, active low, an_n[0] = leftmost digit), flash (LED), tx (serial
// output), rx_mirror. The receiver's frame-error flag and the transmitter's
// busy flag are not needed by this test and stay unconnected inside.
// Timing: the display advances one digit per CLKS_PER_BIT clocks; the shown
// byte changes two clocks after the receiver's stop-bit sample.
module fpga_serial_test #(
  parameter int unsigned CLKS_PER_BIT = 5208,
  parameter int unsigned FLASH_TICKS  = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  input  logic [7:0] sw,
  output logic [6:0] seg_n,
  output logic [3:0] an_n,
  output logic       flash,
  output logic       tx,
  output logic       rx_mirror
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned TICK16 = (CLKS_PER_BIT / 16 > 0) ? CLKS_PER_BIT / 16 : 1;
  localparam int unsigned SCAN_W = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned T16_W  = $clog2(TICK16 + 1);
  localparam int unsigned FL_W   = $clog2(FLASH_TICKS + 1);

  // byte receiver and last good byte
  logic [7:0] rx_data, shown;
  logic       rx_valid, rx_err, tx_busy;

  fpga_uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(clk), .rst_n(rst_n), .rx(rx), .data(rx_data), .valid(rx_valid), .frame_err(rx_err)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)        shown <= '0;
    else if (rx_valid) shown <= rx_data;
  end

  // display scan, one digit per baud period
  logic [SCAN_W-1:0] scan_cnt;
  logic [1:0]        digit_sel;
  logic [3:0]        digit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scan_cnt  <= '0;
      digit_sel <= '0;
    end else if (scan_cnt == SCAN_W'(CLKS_PER_BIT - 1)) begin
      scan_cnt  <= '0;
      digit_sel <= digit_sel + 1'b1;
    end else begin
      scan_cnt <= scan_cnt + 1'b1;
    end
  end

  always_comb begin
    unique case (digit_sel)
      2'd0:    digit = sw[7:4];
      2'd1:    digit = sw[3:0];
      2'd2:    digit = shown[7:4];
      default: digit = shown[3:0];
    endcase
    an_n = ~(4'b0001 << digit_sel);
  end

  fpga_seg7 u_seg (.digit(digit), .seg_n(seg_n));

  // receive-activity LED on a 16x-baud tick
  logic [T16_W-1:0] t16_cnt;
  logic [FL_W-1:0]  fl_cnt;
  logic             rx_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t16_cnt <= '0;
      fl_cnt  <= '0;
      flash   <= 1'b0;
      rx_s    <= 1'b1;
    end else begin
      rx_s <= rx;
      if (t16_cnt == T16_W'(TICK16 - 1)) begin
        t16_cnt <= '0;
        if (fl_cnt == '0) begin
          if (!rx_s) begin
            flash  <= 1'b1;
            fl_cnt <= FL_W'(1);
          end else begin
            flash <= 1'b0;
          end
        end else if (fl_cnt == FL_W'(FLASH_TICKS)) begin
          fl_cnt <= '0;
        end else begin
          fl_cnt <= fl_cnt + 1'b1;
        end
      end else begin
        t16_cnt <= t16_cnt + 1'b1;
      end
    end
  end

  fpga_uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(clk), .rst_n(rst_n), .en(sw[7]), .data(sw[6:0]), .tx(tx), .busy(tx_busy)
  );

  assign rx_mirror = rx;
endmodule
