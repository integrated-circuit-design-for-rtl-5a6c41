// Self-checking testbench of the 16-row ASIC. The rows are triggered at the
// times of the 4x4 example latency table (10 ns per count, offset removed)
// in oneshot mode; every element must reach its 50 % point the same fixed
// time after its own trigger (2.5 ns trim of code 4 + 0.6 ns + 4 ns), so the
// phasing set by the trigger times is preserved, and every element must see
// exactly one 45 V pulse. Then all rows run in oscillator mode from one
// common release of the reset and must all show the divided period.
module tb_bf_asic;
  timeunit 1ns;
  timeprecision 1ps;
  import bf_pkg::*;

  localparam int N = 16;
  int checks = 0, failures = 0;
  logic [N-1:0] trig = '0;
  bf_ctrl_t ctrl;
  logic osc_rst_n = 0;
  logic [N-1:0] drive, hv_out;
  real v_cmut [N];

  bf_asic dut (.trig(trig), .ctrl(ctrl), .osc_set_n(1'b1), .osc_rst_n(osc_rst_n),
               .drive(drive), .hv_out(hv_out), .v_cmut(v_cmut));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int EX [N] = '{508, 524, 536, 520, 486, 528, 559, 520, 473, 531, 573, 520, 462, 534, 585, 520};

  realtime t_trig [N], t_hv [N], t_drv [N], p_drv [N];
  int n_hv [N], n_drv [N];
  for (genvar r = 0; r < N; r++) begin : g_m
    initial begin n_hv[r] = 0; n_drv[r] = 0; end
    always @(posedge trig[r]) t_trig[r] = $realtime;
    always @(posedge hv_out[r]) begin t_hv[r] = $realtime; n_hv[r]++; end
    always @(posedge drive[r]) begin
      if (n_drv[r] > 0) p_drv[r] = $realtime - t_drv[r];
      t_drv[r] = $realtime;
      n_drv[r]++;
    end
    // each row's trigger: 20 ns pulse at its latency (in 10 ns counts, minus the smallest)
    initial begin
      wait (ctrl.mux4_sel == SRC_ONESHOT);
      #(10.0 * (EX[r] - 462) + 50.0);
      trig[r] = 1'b1;
      #20 trig[r] = 1'b0;
    end
  end

  initial begin
    ctrl = '0;
    #5;
    ctrl.demux_sel = 1'b0; ctrl.oneshot_code = 3'd4; ctrl.mux4_sel = SRC_ONESHOT;
    #(10.0 * (585 - 462) + 200.0);
    for (int r = 0; r < N; r++) begin
      check(n_hv[r] == 1, $sformatf("row %0d one element pulse", r));
      check(t_hv[r] - t_trig[r] > 7.0 && t_hv[r] - t_trig[r] < 7.25,
            $sformatf("row %0d trigger-to-element %0.3f ns", r, t_hv[r] - t_trig[r]));
      check(t_hv[r] - t_hv[12] > 10.0 * (EX[r] - 462) - 0.01 && t_hv[r] - t_hv[12] < 10.0 * (EX[r] - 462) + 0.01,
            $sformatf("row %0d phasing", r));
    end
    // oscillator mode: code 24 (100 MHz), tap 1 (f/4): 40 ns
    ctrl.demux_sel = 1'b1; ctrl.dco_code = 5'd24; ctrl.mux8_sel = 3'd1; ctrl.mux4_sel = SRC_DCO;
    for (int r = 0; r < N; r++) n_drv[r] = 0;
    osc_rst_n = 1;
    #10 trig = '1;
    #20 trig = '0;
    #400;
    for (int r = 0; r < N; r++) begin
      check(n_drv[r] >= 9, $sformatf("row %0d pulse train", r));
      check(p_drv[r] > 39.99 && p_drv[r] < 40.01, $sformatf("row %0d period %0.3f", r, p_drv[r]));
    end
    osc_rst_n = 0;
    #50 check(drive == '0, "common reset stops all rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
