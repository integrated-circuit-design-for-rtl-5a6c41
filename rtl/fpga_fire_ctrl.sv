// Firing-time sequencer of the FPGA beam controller.
//
// Phasing of the array is done entirely in the FPGA: instead of shift
// registers or comparators on the ASIC, every row has its own trigger line
// and the FPGA raises it at that row's moment. On fire, a counter starts at
// zero and counts FPGA clock cycles; the trigger of row r is high while
// lat[r] <= count < lat[r] + pw. Because all rows of the ASIC are identical
// and add the same delay, the trigger time of a row is the firing time of its
// element. The sequence ends when the counter reaches max(lat) + pw.
//
// While a sequence runs, osc_rst_n is released (high); outside a sequence
// it is held low, which clears the oscillator enable flip-flops and the
// frequency dividers of all rows. A pulse train therefore starts at a row's
// trigger and stops, in every row at once, at the end of the sequence. How
// the oscillators are stopped is this design's choice.
//
// Interface: clk, rst_n (synchronous, active low), start (one-cycle pulse,
// ignored while busy), lat[N_ROWS], pw (captured at start), trig[N_ROWS]
// (registered, glitch-free), osc_rst_n, busy, done (one-cycle pulse).
// Timing: trig[r] rises lat[r] + 1 cycles after the cycle in which start is
// high and stays high for pw cycles (pw = 0 is treated as 1).
module fpga_fire_ctrl #(
  parameter int unsigned N_ROWS = 16,
  parameter int unsigned LAT_W  = 16,
  parameter int unsigned PW_W   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LAT_W-1:0] lat [N_ROWS],
  input  logic [PW_W-1:0]  pw,
  output logic [N_ROWS-1:0] trig,
  output logic             osc_rst_n,
  output logic             busy,
  output logic             done
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CNT_W = (LAT_W > PW_W ? LAT_W : PW_W) + 1;

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] end_cnt;
  logic [LAT_W-1:0] lat_q [N_ROWS];
  logic [PW_W-1:0]  pw_q;
  logic [LAT_W-1:0] lat_max;

  always_comb begin
    lat_max = '0;
    for (int r = 0; r < N_ROWS; r++) begin
      if (lat[r] > lat_max) lat_max = lat[r];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      end_cnt   <= '0;
      pw_q      <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      trig      <= '0;
      osc_rst_n <= 1'b0;
      for (int r = 0; r < N_ROWS; r++) lat_q[r] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        trig      <= '0;
        osc_rst_n <= 1'b0;
        cnt       <= '0;
        if (start) begin
          busy      <= 1'b1;
          osc_rst_n <= 1'b1;
          pw_q      <= (pw == '0) ? PW_W'(1) : pw;
          end_cnt   <= CNT_W'(lat_max) + CNT_W'((pw == '0) ? PW_W'(1) : pw);
          for (int r = 0; r < N_ROWS; r++) lat_q[r] <= lat[r];
        end
      end else begin
        for (int r = 0; r < N_ROWS; r++) begin
          trig[r] <= (cnt >= CNT_W'(lat_q[r])) &&
                     (cnt <  CNT_W'(lat_q[r]) + CNT_W'(pw_q));
        end
        if (cnt == end_cnt) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          osc_rst_n <= 1'b0;
          trig      <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // A row's trigger can only be high inside a sequence.
  a_trig_in_seq: assert property (@(posedge clk) disable iff (!rst_n)
    (trig != '0) |-> busy || $past(busy));

endmodule
