// Self-checking testbench of one beamformer row with the control word
// driven directly. Runs the four sources of the output multiplexer:
// ground (no output), direct FPGA (the trigger passes), oneshot (a 20 ns
// trigger with code 6 gives 10 + 5 = 15 ns) and the oscillator (code 0,
// 256 MHz) through several divider taps, where the period of the row output
// must be 2^(k+1) / 256 MHz. Also checks that the element voltage reaches
// 45 V about 4.6 ns after the row output (0.6 ns MV + 4 ns HV delay) and
// that the unselected generator stays quiet.
module tb_bf_row;
  timeunit 1ns;
  timeprecision 1ps;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  logic trig = 0, osc_set_n = 1, osc_rst_n = 1;
  bf_ctrl_t ctrl;
  logic drive, hv_out;
  real v_cmut;

  bf_row dut (.trig(trig), .ctrl(ctrl), .osc_set_n(osc_set_n), .osc_rst_n(osc_rst_n),
              .drive(drive), .hv_out(hv_out), .v_cmut(v_cmut));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime d_rise, d_fall, d_prev_rise, d_period, hv_rise;
  int d_rises = 0, hv_rises = 0;
  real vmax = 0.0;
  always @(posedge drive) begin
    if (d_rises > 0) d_period = $realtime - d_rise;
    d_rise = $realtime;
    d_rises++;
  end
  always @(negedge drive) d_fall = $realtime;
  always @(posedge hv_out) begin hv_rise = $realtime; hv_rises++; end
  always @(v_cmut) if (v_cmut > vmax) vmax = v_cmut;

  task automatic pulse(input realtime w);
    trig = 1; #(w); trig = 0;
  endtask

  initial begin
    ctrl = '0;
    #1 osc_rst_n = 0;
    // ground
    ctrl.mux4_sel = SRC_GROUND;
    #10 pulse(30.0);
    #50 check(d_rises == 0 && hv_rises == 0 && vmax == 0.0, "ground source: no output");
    // direct FPGA
    ctrl.mux4_sel = SRC_FPGA;
    #10 pulse(100.0);
    #50;
    check(d_rises == 1 && d_fall - d_rise > 99.99 && d_fall - d_rise < 100.01, "FPGA source passes trigger");
    check(hv_rises == 1 && hv_rise - d_rise > 4.4 && hv_rise - d_rise < 4.8,
          $sformatf("element 50 %% point %0.3f ns after row output", hv_rise - d_rise));
    check(vmax == 45.0, "element driven to 45 V");
    // oneshot
    ctrl.mux4_sel = SRC_ONESHOT; ctrl.demux_sel = 1'b0; ctrl.oneshot_code = 3'd6;
    #10 pulse(20.0);
    #50;
    check(d_rises == 2 && d_fall - d_rise > 14.99 && d_fall - d_rise < 15.01,
          $sformatf("oneshot width %0.3f", d_fall - d_rise));
    check(dut.dco_en == 1'b0, "oscillator not enabled in oneshot mode");
    // oscillator through the divider
    ctrl.mux4_sel = SRC_DCO; ctrl.demux_sel = 1'b1; ctrl.dco_code = 5'd0;
    for (int k = 0; k < 8; k += 2) begin
      real exp_p;
      int r0;
      ctrl.mux8_sel = 3'(k);
      exp_p = (2.0 ** (k + 1)) * 1000.0 / 256.0;
      osc_rst_n = 1;
      r0 = d_rises;
      #10 pulse(20.0);
      #(exp_p * 4.5);
      check(d_rises - r0 >= 3, $sformatf("tap %0d pulse train present", k));
      // the ring half period is rounded to 1 ps, so allow 1e-4 relative
      check(d_period > exp_p * 0.9999 - 0.01 && d_period < exp_p * 1.0001 + 0.01,
            $sformatf("tap %0d period %0.3f expected %0.3f", k, d_period, exp_p));
      osc_rst_n = 0;
      #20;
      r0 = d_rises;
      #(exp_p * 2) check(d_rises == r0 && drive == 1'b0, $sformatf("tap %0d stopped by reset", k));
    end
    // oneshot must not fire in oscillator mode
    ctrl.mux4_sel = SRC_ONESHOT;
    #10 pulse(20.0);
    #30 check(dut.os_out == 1'b0 && drive == 1'b0, "oneshot quiet in oscillator mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
