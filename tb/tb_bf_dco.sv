// Self-checking testbench of the DCO model. Checks that the output rests
// high before enabling, that a trigger rising edge starts oscillation, that
// the period for every one of the 32 codes is 1000/f ns with f from the frequency
// table (256 MHz for code 0 ... 20 MHz for code 31), that a level without an
// edge does not restart it, and that the asynchronous reset stops it.
module tb_bf_dco;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic trig = 0, set_n = 1, rst_n = 1, en, osc;
  logic [4:0] code = 0;

  bf_dco dut (.trig(trig), .set_n(set_n), .rst_n(rst_n), .code(code), .en(en), .osc(osc));

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

  localparam real FREQ [32] = '{256, 250, 244, 238, 222, 217, 213, 200, 196, 179, 175, 164, 156, 143, 137, 127,
                                178, 169, 158, 151, 142, 130, 122, 112, 100, 85, 81, 65, 53, 39, 34, 20};

  realtime last_rise, period;
  int rises = 0;
  always @(posedge osc) begin
    if (last_rise > 0.0) period = $realtime - last_rise;
    last_rise = $realtime;
    rises++;
  end

  initial begin
    last_rise = -1.0;
    #1 rst_n = 0;
    #4 rst_n = 1;
    rises = 0;
    #50 check(osc == 1'b1 && en == 1'b0, "rests high while disabled");
    check(rises == 0, "no oscillation before trigger");
    for (int c = 0; c < 32; c++) begin
      real exp_p;
      code = 5'(c);
      exp_p = 1000.0 / FREQ[c];
      last_rise = -1.0;
      rises = 0;
      #1 trig = 1;
      #1 check(en == 1'b1, "enable set by trigger edge");
      #(exp_p * 6.2);
      check(rises >= 5, $sformatf("code %0d oscillates", c));
      check(period > exp_p - 0.01 && period < exp_p + 0.01,
            $sformatf("code %0d period %0.3f expected %0.3f", c, period, exp_p));
      trig = 0;
      // reset stops it; output returns to rest
      rst_n = 0;
      #(exp_p + 1.0);
      check(en == 1'b0 && osc == 1'b1, "reset stops oscillation");
      begin
        int r0;
        r0 = rises;
        #(exp_p * 3) check(rises == r0, "no edges after reset");
      end
      rst_n = 1;
      #5;
    end
    // a trigger already high when the reset is released does not restart it
    trig = 1; rst_n = 0; #5 rst_n = 1;
    #20 check(en == 1'b0, "level without edge does not enable");
    trig = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
