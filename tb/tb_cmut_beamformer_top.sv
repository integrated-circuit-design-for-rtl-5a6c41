// End-to-end testbench of the transmit beamformer: 16 rows, serial line at
// 16 clocks per bit, 100 MHz FPGA clock. Everything goes through the serial
// port as the host would send it. Scenarios, each counted as a mechanism
// that must occur at least once:
//   fire_refused  FIRE before any configuration is ignored
//   bad_cmd       an unknown command byte is counted
//   frame_err     a byte with a low stop bit is flagged
//   oneshot       single pulses, trimmed (code 6: 20 ns trigger -> 15 ns)
//   fpga_direct   the trigger itself is passed to the element
//   dco           pulse trains from the oscillator through the divider
//   osc_stop      the pulse trains stop when the sequence ends
//   ground        the row output stays low although triggers fire
//   busy_ignore   a FIRE arriving during a sequence starts nothing
//   link_test     the board's serial-link test, on the same line, shows the
//                 last received byte on its display and lights its LED
// For every firing the element of each row must reach 45 V at its latency:
// the element 50 % crossings keep the spacing lat[r] - lat[12] in 10 ns units.
module tb_cmut_beamformer_top;
  timeunit 1ns;
  timeprecision 1ps;
  import bf_pkg::*;

  localparam int N = 16;
  localparam int CPB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [N-1:0] trig, drive, hv_out;
  real v_cmut [N];
  logic busy, cfg_valid, rx_frame_err;
  logic [7:0] bad_cmd;
  logic [7:0] sw = 8'h00;
  logic [6:0] seg_n;
  logic [3:0] an_n;
  logic flash, uart_tx, rx_mirror;

  cmut_beamformer_top #(.CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .uart_rx(rx), .trig(trig), .drive(drive), .hv_out(hv_out),
    .v_cmut(v_cmut), .busy(busy), .cfg_valid(cfg_valid), .rx_frame_err(rx_frame_err),
    .bad_cmd(bad_cmd), .sw(sw), .seg_n(seg_n), .an_n(an_n), .flash(flash), .uart_tx(uart_tx),
    .rx_mirror(rx_mirror));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {M_FIRE_REFUSED, M_BAD_CMD, M_FRAME_ERR, M_ONESHOT, M_FPGA, M_DCO, M_OSC_STOP,
                    M_GROUND, M_BUSY_IGNORE, M_LINK_TEST, M_COUNT} mech_e;
  int mech [M_COUNT];
  localparam string MNAME [M_COUNT] = '{"fire_refused", "bad_cmd", "frame_err", "oneshot", "fpga_direct",
                                        "dco", "osc_stop", "ground", "busy_ignore", "link_test"};

  localparam int EX [N] = '{508, 524, 536, 520, 486, 528, 559, 520, 473, 531, 573, 520, 462, 534, 585, 520};

  task automatic send(input logic [7:0] b, input logic stop = 1'b1);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat (2) @(posedge clk);
  endtask

  task automatic configure(input bf_ctrl_t c, input int pw);
    send(CMD_CONFIG);
    send({2'b00, c[13:8]});
    send(c[7:0]);
    send(8'(pw)); send(8'(pw >> 8));
    for (int r = 0; r < N; r++) begin
      send(8'(EX[r] - 462)); send(8'((EX[r] - 462) >> 8));
    end
  endtask

  // per-row observation
  realtime t_hv [N], t_drv_r [N], t_drv_f [N], p_drv [N];
  int n_hv [N], n_drv [N];
  int n_seq = 0;
  for (genvar r = 0; r < N; r++) begin : g_m
    initial begin n_hv[r] = 0; n_drv[r] = 0; end
    always @(posedge hv_out[r]) begin t_hv[r] = $realtime; n_hv[r]++; end
    always @(posedge drive[r]) begin
      if (n_drv[r] > 0) p_drv[r] = $realtime - t_drv_r[r];
      t_drv_r[r] = $realtime;
      n_drv[r]++;
    end
    always @(negedge drive[r]) t_drv_f[r] = $realtime;
  end
  always @(posedge busy) n_seq++;

  task automatic clear_obs();
    for (int r = 0; r < N; r++) begin n_hv[r] = 0; n_drv[r] = 0; end
  endtask

  task automatic fire_and_wait();
    send(CMD_FIRE);
    while (busy) @(posedge clk);
    #200;
  endtask

  task automatic check_phasing(input string tag);
    for (int r = 0; r < N; r++) begin
      check(t_hv[r] - t_hv[12] > 10.0 * (EX[r] - 462) - 0.01 && t_hv[r] - t_hv[12] < 10.0 * (EX[r] - 462) + 0.01,
            $sformatf("%s row %0d element timing", tag, r));
    end
  endtask

  initial begin
    bf_ctrl_t c;
    int seq0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // fire before configuration
    send(CMD_FIRE);
    repeat (50) @(posedge clk);
    check(n_seq == 0 && bad_cmd == 1, "fire refused before configuration");
    if (n_seq == 0 && bad_cmd == 1) mech[M_FIRE_REFUSED]++;
    // unknown byte
    send(8'hC3);
    check(bad_cmd == 2, "unknown byte counted");
    if (bad_cmd == 2) mech[M_BAD_CMD]++;
    // stop-bit error
    fork
      begin
        @(posedge rx_frame_err);
        mech[M_FRAME_ERR]++;
      end
      send(8'h5A, 1'b0);
    join_any
    repeat (CPB) @(posedge clk);
    check(mech[M_FRAME_ERR] == 1 && n_seq == 0, "stop-bit error flagged, byte dropped");

    // oneshot mode: 20 ns triggers, code 6 -> 15 ns pulses
    c = '0; c.demux_sel = 1'b0; c.oneshot_code = 3'd6; c.mux4_sel = SRC_ONESHOT;
    configure(c, 2);
    check(cfg_valid, "configuration loaded");
    clear_obs();
    fire_and_wait();
    for (int r = 0; r < N; r++) begin
      check(n_hv[r] == 1 && n_drv[r] == 1, $sformatf("oneshot row %0d one pulse", r));
      check(t_drv_f[r] - t_drv_r[r] > 14.99 && t_drv_f[r] - t_drv_r[r] < 15.01,
            $sformatf("oneshot row %0d width %0.3f", r, t_drv_f[r] - t_drv_r[r]));
    end
    check_phasing("oneshot");
    if (n_hv[0] == 1) mech[M_ONESHOT]++;

    // direct FPGA mode: 30 ns
    c.mux4_sel = SRC_FPGA;
    configure(c, 3);
    clear_obs();
    fire_and_wait();
    for (int r = 0; r < N; r++)
      check(n_drv[r] == 1 && t_drv_f[r] - t_drv_r[r] > 29.99 && t_drv_f[r] - t_drv_r[r] < 30.01,
            $sformatf("direct row %0d width", r));
    check_phasing("direct");
    if (n_drv[0] == 1) mech[M_FPGA]++;

    // oscillator mode: code 0 (256 MHz), tap 2 (f/8): 31.25 ns period
    c.demux_sel = 1'b1; c.dco_code = 5'd0; c.mux8_sel = 3'd2; c.mux4_sel = SRC_DCO;
    configure(c, 100);
    clear_obs();
    send(CMD_FIRE);
    while (busy) @(posedge clk);
    begin
      int n_end [N];
      for (int r = 0; r < N; r++) n_end[r] = n_drv[r];
      #300;
      for (int r = 0; r < N; r++) begin
        check(n_drv[r] >= 20, $sformatf("dco row %0d pulse train (%0d pulses)", r, n_drv[r]));
        check(p_drv[r] > 31.24 && p_drv[r] < 31.26, $sformatf("dco row %0d period %0.3f", r, p_drv[r]));
        check(n_drv[r] == n_end[r] && drive[r] == 1'b0, $sformatf("dco row %0d stopped", r));
      end
      if (n_drv[0] >= 20) mech[M_DCO]++;
      if (n_drv[0] == n_end[0] && drive == '0) mech[M_OSC_STOP]++;
    end

    // ground: triggers fire, nothing reaches the elements
    c.mux4_sel = SRC_GROUND;
    configure(c, 5);
    clear_obs();
    seq0 = n_seq;
    begin
      int trig_seen = 0;
      fork
        begin
          @(posedge trig[0]);
          trig_seen = 1;
        end
        fire_and_wait();
      join
      check(trig_seen == 1 && n_seq == seq0 + 1, "ground mode: triggers fire");
      for (int r = 0; r < N; r++) check(n_drv[r] == 0 && n_hv[r] == 0, $sformatf("ground row %0d quiet", r));
      if (trig_seen == 1 && n_drv[0] == 0) mech[M_GROUND]++;
    end

    // FIRE during a running sequence (sequence of ~1240 cycles, a byte is 160)
    c.mux4_sel = SRC_FPGA;
    configure(c, 1000);
    seq0 = n_seq;
    send(CMD_FIRE);
    send(CMD_FIRE);
    check(busy, "still busy at the second FIRE");
    while (busy) @(posedge clk);
    #100;
    check(n_seq == seq0 + 1, "FIRE while busy starts nothing");
    if (n_seq == seq0 + 1) mech[M_BUSY_IGNORE]++;

    // board link test running beside the controller: last byte on the display
    begin
      bit ok;
      // last byte sent was CMD_FIRE = 5A: digits '5' and 'A'
      while (an_n != 4'b1011) @(posedge clk);
      #1;
      ok = (seg_n == ~7'h6D);
      while (an_n != 4'b0111) @(posedge clk);
      #1;
      ok &= (seg_n == ~7'h77);
      check(ok, $sformatf("link test shows the last received byte (5A), shown %h", dut.u_link_test.shown));
      check(flash == 1'b1, "link test LED lit by recent traffic");
      if (ok) mech[M_LINK_TEST]++;
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-13s occurred %0d time(s)", MNAME[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s exercised", MNAME[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
