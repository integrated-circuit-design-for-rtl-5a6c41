// Self-checking testbench of the oneshot model. For every 3-bit code and for
// trigger lengths of 10, 20, 40 and 50 ns the output pulse width must be
// (N-1)*10 ns + w(code), w = 10, 9.8, 9.7, 9.6, 7.5, 7.0, 5.0, 2.5 ns, and
// the output must fall together with the trigger. A trigger shorter than the
// trim time must give no pulse.
module tb_bf_oneshot;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in_trig = 0, out;
  logic [2:0] code = 0;

  bf_oneshot dut (.in_trig(in_trig), .code(code), .out(out));

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

  realtime t_rise, t_fall;
  int n_pulses = 0;
  always @(posedge out) begin t_rise = $realtime; n_pulses++; end
  always @(negedge out) t_fall = $realtime;

  localparam real W [8] = '{10.0, 9.8, 9.7, 9.6, 7.5, 7.0, 5.0, 2.5};
  localparam int  N [4] = '{1, 2, 4, 5};

  initial begin
    realtime t_in_fall;
    #5;
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 4; i++) begin
        real exp_w;
        int n_before;
        code = 3'(c);
        n_before = n_pulses;
        #5 in_trig = 1;
        #(10.0 * N[i]) in_trig = 0;
        t_in_fall = $realtime;
        #1;
        exp_w = 10.0 * (N[i] - 1) + W[c];
        check(n_pulses == n_before + 1, $sformatf("one pulse for code %0d", c));
        check(t_fall == t_in_fall, "output falls with trigger");
        check((t_fall - t_rise) > exp_w - 0.002 && (t_fall - t_rise) < exp_w + 0.002,
              $sformatf("code %0d N=%0d width %0.3f expected %0.3f", c, N[i], t_fall - t_rise, exp_w));
        #20;
      end
    end
    // trigger shorter than the trim of code 7 (7.5 ns): no pulse
    begin
      int n_before;
      code = 3'd7;
      n_before = n_pulses;
      #5 in_trig = 1;
      #5 in_trig = 0;
      #20 check(n_pulses == n_before, "short trigger suppressed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
