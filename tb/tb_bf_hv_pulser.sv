// Self-checking testbench of the 45 V pulser model at the three reported
// loads: 2.5 pF (delay 4 ns, rise 4.2, fall 5.3), 5.1 pF (4, 7.8, 7.8) and
// 10 pF (5, 13.3, 17). Delay is measured at 50 %, edges at 10-90 %. A 5 MHz
// input (100 ns high) drives all three instances.
module tb_bf_hv_pulser;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in = 0;
  logic out [3];
  real  v [3];

  bf_hv_pulser #(.C_LOAD_PF(2.5))  dut25 (.in(in), .v_out(v[0]), .out(out[0]));
  bf_hv_pulser                     dut51 (.in(in), .v_out(v[1]), .out(out[1]));
  bf_hv_pulser #(.C_LOAD_PF(10.0)) dut10 (.in(in), .v_out(v[2]), .out(out[2]));

  localparam real DLY [3] = '{4.0, 4.0, 5.0};
  localparam real TR  [3] = '{4.2, 7.8, 13.3};
  localparam real TF  [3] = '{5.3, 7.8, 17.0};

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

  realtime t10r [3], t50r [3], t90r [3], t90f [3], t50f [3], t10f [3];
  real vmax [3], vprev [3];
  for (genvar k = 0; k < 3; k++) begin : g_m
    initial begin vmax[k] = 0.0; vprev[k] = 0.0; end
    always @(v[k]) begin
      if (v[k] > vmax[k]) vmax[k] = v[k];
      if (vprev[k] < 4.5  && v[k] >= 4.5)  t10r[k] = $realtime;
      if (vprev[k] < 22.5 && v[k] >= 22.5) t50r[k] = $realtime;
      if (vprev[k] < 40.5 && v[k] >= 40.5) t90r[k] = $realtime;
      if (vprev[k] > 40.5 && v[k] <= 40.5) t90f[k] = $realtime;
      if (vprev[k] > 22.5 && v[k] <= 22.5) t50f[k] = $realtime;
      if (vprev[k] > 4.5  && v[k] <= 4.5)  t10f[k] = $realtime;
      vprev[k] = v[k];
    end
  end

  initial begin
    realtime t0, t1;
    #10 in = 1; t0 = $realtime;
    #100 in = 0; t1 = $realtime;
    #100;
    for (int k = 0; k < 3; k++) begin
      check(t50r[k] - t0 > DLY[k] - 0.15 && t50r[k] - t0 < DLY[k] + 0.15,
            $sformatf("load %0d rise delay %0.3f", k, t50r[k] - t0));
      check(t50f[k] - t1 > DLY[k] - 0.15 && t50f[k] - t1 < DLY[k] + ((k == 2) ? 0.5 : 0.15),
            $sformatf("load %0d fall delay %0.3f", k, t50f[k] - t1));
      check(t90r[k] - t10r[k] > TR[k] - 0.25 && t90r[k] - t10r[k] < TR[k] + 0.25,
            $sformatf("load %0d rise time %0.3f", k, t90r[k] - t10r[k]));
      check(t10f[k] - t90f[k] > TF[k] - 0.25 && t10f[k] - t90f[k] < TF[k] + 0.25,
            $sformatf("load %0d fall time %0.3f", k, t10f[k] - t90f[k]));
      check(vmax[k] == 45.0, "reaches 45 V");
      check(out[k] == 1'b0 && v[k] == 0.0, "returns to 0 V");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
