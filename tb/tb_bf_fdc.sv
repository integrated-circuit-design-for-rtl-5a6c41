// Self-checking testbench of bf_fdc, the 8-stage ripple divider.
// A 250 MHz (4 ns) clock drives it. After n input rising edges the taps read
// as a binary number must equal n mod 256 (f[0] = f/2 ... f[7] = f/256). The
// period of every tap is measured and must be 2^(k+1) * 4 ns, 1024 ns for the
// last one. The common reset is checked to clear all stages.
module tb_bf_fdc;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk_in = 0, set_n = 1, rst_n = 0;
  logic [7:0] f;

  bf_fdc dut (.clk_in(clk_in), .set_n(set_n), .rst_n(rst_n), .f(f));

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

  realtime last_rise [8];
  realtime period [8];
  for (genvar k = 0; k < 8; k++) begin : g_meas
    initial begin last_rise[k] = -1.0; period[k] = 0.0; end
    always @(posedge f[k]) begin
      if (last_rise[k] >= 0.0) period[k] = $realtime - last_rise[k];
      last_rise[k] = $realtime;
    end
  end

  initial begin
    #3;
    check(f == 8'h00, "reset clears all stages");
    rst_n = 1;
    for (int n = 1; n <= 700; n++) begin
      #2 clk_in = 1;
      #1 check(f == 8'(n), $sformatf("count after %0d edges is %0d", n, f));
      #1 clk_in = 0;
    end
    for (int k = 0; k < 8; k++)
      check(period[k] > (4.0 * (2 ** (k + 1))) - 0.01 && period[k] < (4.0 * (2 ** (k + 1))) + 0.01,
            $sformatf("tap %0d period %0.3f ns", k, period[k]));
    check(period[7] > 1023.9 && period[7] < 1024.1, "f/256 period is 1024 ns at 250 MHz");
    rst_n = 0; #1 check(f == 8'h00, "common reset");
    rst_n = 1; set_n = 0; #1 check(f == 8'hFF, "common set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
