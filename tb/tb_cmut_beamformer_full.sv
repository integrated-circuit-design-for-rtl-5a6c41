// Full-size run of the transmit beamformer with every parameter at its default:
// 16 rows, 16-bit latencies and pulse widths, serial receiver at 5208 clocks per
// bit. With the 50 MHz board clock used here that is 9600 baud, so one byte
// takes about 1.04 ms and a full configuration about 38 ms of simulated time.
// The run loads the 4x4 phasing pattern (latencies 462..585 counts, shifted so
// the smallest is 0) in oneshot mode with code 0, fires once and
// checks that every element reaches the high-voltage level once, with element
// spacing equal to the latency differences times the 20 ns clock period, and
// that every drive pulse is as wide as its 20 ns trigger (code 0 trims nothing).
module tb_cmut_beamformer_full;
  timeunit 1ns;
  timeprecision 1ps;
  import bf_pkg::*;

  localparam int N = 16;
  localparam int CPB = 5208;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [N-1:0] trig, drive, hv_out;
  real v_cmut [N];
  logic busy, cfg_valid, rx_frame_err;
  logic [7:0] bad_cmd;

  cmut_beamformer_top dut (
    .clk(clk), .rst_n(rst_n), .uart_rx(rx), .trig(trig), .drive(drive), .hv_out(hv_out),
    .v_cmut(v_cmut), .busy(busy), .cfg_valid(cfg_valid), .rx_frame_err(rx_frame_err),
    .bad_cmd(bad_cmd), .sw(8'h00), .seg_n(), .an_n(), .flash(), .uart_tx(),
    .rx_mirror());

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int EX [N] = '{508, 524, 536, 520, 486, 528, 559, 520, 473, 531, 573, 520, 462, 534, 585, 520};

  task automatic send(input logic [7:0] b);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = 1; repeat (CPB + 2) @(posedge clk);
  endtask

  realtime t_hv [N], t_drv_r [N], t_drv_f [N];
  int n_hv [N], n_drv [N];
  for (genvar r = 0; r < N; r++) begin : g_m
    initial begin n_hv[r] = 0; n_drv[r] = 0; end
    always @(posedge hv_out[r]) begin t_hv[r] = $realtime; n_hv[r]++; end
    always @(posedge drive[r]) begin t_drv_r[r] = $realtime; n_drv[r]++; end
    always @(negedge drive[r]) t_drv_f[r] = $realtime;
  end

  initial begin
    bf_ctrl_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    c = '0; c.demux_sel = 1'b0; c.oneshot_code = 3'd0; c.mux4_sel = SRC_ONESHOT;
    send(CMD_CONFIG);
    send({2'b00, c[13:8]});
    send(c[7:0]);
    send(8'd1); send(8'd0);     // one-cycle (20 ns) triggers
    for (int r = 0; r < N; r++) begin
      send(8'(EX[r] - 462)); send(8'((EX[r] - 462) >> 8));
    end
    check(cfg_valid && bad_cmd == 0 && !rx_frame_err, "configuration accepted");
    for (int r = 0; r < N; r++) begin n_hv[r] = 0; n_drv[r] = 0; end
    send(CMD_FIRE);
    while (busy) @(posedge clk);
    #500;
    for (int r = 0; r < N; r++) begin
      check(n_hv[r] == 1 && n_drv[r] == 1, $sformatf("row %0d fired once", r));
      check(t_drv_f[r] - t_drv_r[r] > 19.99 && t_drv_f[r] - t_drv_r[r] < 20.01,
            $sformatf("row %0d pulse width %0.3f ns", r, t_drv_f[r] - t_drv_r[r]));
      check(t_hv[r] - t_hv[12] > 20.0 * (EX[r] - 462) - 0.01 && t_hv[r] - t_hv[12] < 20.0 * (EX[r] - 462) + 0.01,
            $sformatf("row %0d element delay %0.3f ns", r, t_hv[r] - t_hv[12]));
    end
    $display("element 14 fires %0.1f ns after element 12", t_hv[14] - t_hv[12]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
