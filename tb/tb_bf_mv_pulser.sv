// Self-checking testbench of the 3.3 V pulser model: 50 % crossing 0.6 ns
// after each input edge, 10-90 % rise 0.5 ns and fall 0.3 ns, output between
// 0 and 3.3 V, settling back to 0 V.
module tb_bf_mv_pulser;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in = 0, out;
  real v;

  bf_mv_pulser dut (.in(in), .v_out(v), .out(out));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t50r, t50f, t10r, t90r, t90f, t10f;
  real vmax = 0.0, vmin = 10.0, vprev = 0.0;
  always @(v) begin
    if (v > vmax) vmax = v;
    if (v < vmin) vmin = v;
    if (vprev < 0.33 && v >= 0.33) t10r = $realtime;
    if (vprev < 1.65 && v >= 1.65) t50r = $realtime;
    if (vprev < 2.97 && v >= 2.97) t90r = $realtime;
    if (vprev > 2.97 && v <= 2.97) t90f = $realtime;
    if (vprev > 1.65 && v <= 1.65) t50f = $realtime;
    if (vprev > 0.33 && v <= 0.33) t10f = $realtime;
    vprev = v;
  end

  initial begin
    realtime t0, t1;
    #10 in = 1; t0 = $realtime;
    #20 in = 0; t1 = $realtime;
    #20;
    check(t50r - t0 > 0.57 && t50r - t0 < 0.63, $sformatf("rise delay %0.3f", t50r - t0));
    check(t50f - t1 > 0.57 && t50f - t1 < 0.63, $sformatf("fall delay %0.3f", t50f - t1));
    check(t90r - t10r > 0.47 && t90r - t10r < 0.53, $sformatf("rise time %0.3f", t90r - t10r));
    check(t10f - t90f > 0.27 && t10f - t90f < 0.33, $sformatf("fall time %0.3f", t10f - t90f));
    check(vmax <= 3.3 && vmax > 3.29, "swing reaches 3.3 V");
    check(vmin >= 0.0, "never below ground");
    check(out == 1'b0 && v == 0.0, "settles low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
