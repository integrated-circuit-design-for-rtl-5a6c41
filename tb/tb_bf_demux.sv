// Self-checking testbench of bf_demux: every combination of trigger and
// select, compared with the expected steering (select 0 -> oneshot,
// select 1 -> oscillator, unselected output low).
module tb_bf_demux;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in_trig, sel, out_os, out_dco;

  bf_demux dut (.in_trig(in_trig), .sel(sel), .out_oneshot(out_os), .out_dco(out_dco));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {sel, in_trig} = 2'(i);
      #1;
      check(out_os  == (in_trig && !sel), $sformatf("oneshot out trig=%0b sel=%0b", in_trig, sel));
      check(out_dco == (in_trig &&  sel), $sformatf("dco out trig=%0b sel=%0b", in_trig, sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
