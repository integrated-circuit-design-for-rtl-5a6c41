// Testbench for the three chip configurations, each a separate instance of the
// top with its own serial line, all on a 100 MHz FPGA clock (the faster of the
// two clock settings of the host program) and a shortened bit time of 16 clocks.
//   u16: 4x4 array chip, 16 rows. The latency table for 50 MHz, doubled for
//        100 MHz (1016 .. 1170 cycles, full values, no offset removed);
//        oneshot code 5 with 10 ns triggers: 7 ns pulses.
//   u4:  four-element chip, 4 rows, latencies 508, 486, 473, 462 (one column
//        of the table, chosen here as an example); oscillator mode, code 24
//        (100 MHz), divider tap 1 (25 MHz), pw 40 cycles. The oscillator
//        reset is common, so every train ends when the sequence ends
//        (max latency + pw = 548 cycles): row r carries (548 - lat[r]) cycles
//        of a 40 ns period.
//   u1:  test cell, 1 row, load 5.17 pF (the on-chip capacitor); oneshot
//        code 4 with a 10 ns trigger: one 7.5 ns pulse.
// Checks element spacing against latency differences times 10 ns, pulse
// widths, train periods and pulse counts, and that each chip fires once.
module tb_cmut_beamformer_configs;
  timeunit 1ns;
  timeprecision 1ps;
  import bf_pkg::*;

  localparam int CPB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] rx = '1;

  logic [15:0] trig16, drive16, hv16;
  real v16 [16];
  logic [3:0] trig4, drive4, hv4;
  real v4 [4];
  logic [0:0] trig1, drive1, hv1;
  real v1 [1];
  logic [2:0] busy, cfg_valid, ferr;
  logic [7:0] bad [3];

  cmut_beamformer_top #(.N_ROWS(16), .CLKS_PER_BIT(CPB)) u16 (
    .clk(clk), .rst_n(rst_n), .uart_rx(rx[0]), .trig(trig16), .drive(drive16), .hv_out(hv16),
    .v_cmut(v16), .busy(busy[0]), .cfg_valid(cfg_valid[0]), .rx_frame_err(ferr[0]), .bad_cmd(bad[0]), .sw(8'h00), .seg_n(), .an_n(), .flash(), .uart_tx(),
    .rx_mirror());
  cmut_beamformer_top #(.N_ROWS(4), .CLKS_PER_BIT(CPB)) u4 (
    .clk(clk), .rst_n(rst_n), .uart_rx(rx[1]), .trig(trig4), .drive(drive4), .hv_out(hv4),
    .v_cmut(v4), .busy(busy[1]), .cfg_valid(cfg_valid[1]), .rx_frame_err(ferr[1]), .bad_cmd(bad[1]), .sw(8'h00), .seg_n(), .an_n(), .flash(), .uart_tx(),
    .rx_mirror());
  cmut_beamformer_top #(.N_ROWS(1), .CLKS_PER_BIT(CPB), .C_LOAD_PF(5.17)) u1 (
    .clk(clk), .rst_n(rst_n), .uart_rx(rx[2]), .trig(trig1), .drive(drive1), .hv_out(hv1),
    .v_cmut(v1), .busy(busy[2]), .cfg_valid(cfg_valid[2]), .rx_frame_err(ferr[2]), .bad_cmd(bad[2]), .sw(8'h00), .seg_n(), .an_n(), .flash(), .uart_tx(),
    .rx_mirror());

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int EX [16] = '{508, 524, 536, 520, 486, 528, 559, 520, 473, 531, 573, 520, 462, 534, 585, 520};
  localparam int L4 [4] = '{508, 486, 473, 462};

  task automatic send(input int line, input logic [7:0] b);
    rx[line] = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx[line] = b[i]; repeat (CPB) @(posedge clk); end
    rx[line] = 1; repeat (CPB + 2) @(posedge clk);
  endtask

  task automatic send16(input int line, input int v);
    send(line, 8'(v)); send(line, 8'(v >> 8));
  endtask

  task automatic send_ctrl(input int line, input bf_ctrl_t c, input int pw);
    send(line, CMD_CONFIG);
    send(line, {2'b00, c[13:8]});
    send(line, c[7:0]);
    send16(line, pw);
  endtask

  // observation
  realtime t16_hv [16], t16_r [16], t16_f [16];
  int n16 [16];
  for (genvar r = 0; r < 16; r++) begin : g16
    initial n16[r] = 0;
    always @(posedge drive16[r]) begin t16_r[r] = $realtime; n16[r]++; end
    always @(negedge drive16[r]) t16_f[r] = $realtime;
    always @(posedge hv16[r]) t16_hv[r] = $realtime;
  end
  realtime t4_first [4], t4_last [4];
  int n4 [4];
  for (genvar r = 0; r < 4; r++) begin : g4
    initial n4[r] = 0;
    always @(posedge drive4[r]) begin
      if (n4[r] == 0) t4_first[r] = $realtime;
      t4_last[r] = $realtime;
      n4[r]++;
    end
  end
  realtime t1_r, t1_f;
  int n1 = 0, n1_hv = 0;
  real v1_max = 0.0;
  always @(posedge drive1[0]) begin t1_r = $realtime; n1++; end
  always @(negedge drive1[0]) t1_f = $realtime;
  always @(posedge hv1[0]) n1_hv++;
  always @(v1[0]) if (v1[0] > v1_max) v1_max = v1[0];

  initial begin
    bf_ctrl_t c16, c4, c1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    c16 = '0; c16.oneshot_code = 3'd5; c16.mux4_sel = SRC_ONESHOT;
    c4 = '0; c4.demux_sel = 1'b1; c4.dco_code = 5'd24; c4.mux8_sel = 3'd1; c4.mux4_sel = SRC_DCO;
    c1 = '0; c1.oneshot_code = 3'd4; c1.mux4_sel = SRC_ONESHOT;
    fork
      begin
        send_ctrl(0, c16, 1);
        for (int r = 0; r < 16; r++) send16(0, 2 * EX[r]);
      end
      begin
        send_ctrl(1, c4, 40);
        for (int r = 0; r < 4; r++) send16(1, L4[r]);
      end
      begin
        send_ctrl(2, c1, 1);
        send16(2, 0);
      end
    join
    check(cfg_valid == 3'b111 && bad[0] == 0 && bad[1] == 0 && bad[2] == 0, "all three chips configured");
    for (int r = 0; r < 16; r++) n16[r] = 0;
    for (int r = 0; r < 4; r++) n4[r] = 0;
    n1 = 0; n1_hv = 0; v1_max = 0.0;
    fork
      send(0, CMD_FIRE);
      send(1, CMD_FIRE);
      send(2, CMD_FIRE);
    join
    while (busy != 3'b000) @(posedge clk);
    #500;

    // 4x4 chip at 100 MHz
    for (int r = 0; r < 16; r++) begin
      check(n16[r] == 1, $sformatf("16-row chip: row %0d fired once", r));
      check(t16_f[r] - t16_r[r] > 6.99 && t16_f[r] - t16_r[r] < 7.01,
            $sformatf("16-row chip: row %0d pulse %0.3f ns", r, t16_f[r] - t16_r[r]));
      check(t16_hv[r] - t16_hv[12] > 20.0 * (EX[r] - 462) - 0.01 &&
            t16_hv[r] - t16_hv[12] < 20.0 * (EX[r] - 462) + 0.01,
            $sformatf("16-row chip: row %0d element delay %0.2f ns", r, t16_hv[r] - t16_hv[12]));
    end
    // four-element chip, pulse trains
    for (int r = 0; r < 4; r++) begin
      real exp_n;
      exp_n = (548.0 - L4[r]) * 10.0 / 40.0;
      check(n4[r] >= int'($floor(exp_n)) && n4[r] <= int'($ceil(exp_n)),
            $sformatf("4-row chip: row %0d has %0d pulses, expected %0.2f", r, n4[r], exp_n));
      check(t4_last[r] - t4_first[r] > 40.0 * (n4[r] - 1) - 0.1 && t4_last[r] - t4_first[r] < 40.0 * (n4[r] - 1) + 0.1,
            $sformatf("4-row chip: row %0d train spacing %0.2f ns", r, t4_last[r] - t4_first[r]));
      check(t4_first[r] - t4_first[3] > 10.0 * (L4[r] - 462) - 0.01 &&
            t4_first[r] - t4_first[3] < 10.0 * (L4[r] - 462) + 0.01,
            $sformatf("4-row chip: row %0d train start %0.2f ns", r, t4_first[r] - t4_first[3]));
    end
    // test cell
    check(n1 == 1 && t1_f - t1_r > 7.49 && t1_f - t1_r < 7.51, $sformatf("test cell pulse %0.3f ns", t1_f - t1_r));
    check(n1_hv == 1 && v1_max > 35.0, $sformatf("test cell element peak %0.1f V", v1_max));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
