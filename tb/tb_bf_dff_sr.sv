// Self-checking testbench of bf_dff_sr: capture on the rising edge only,
// asynchronous reset and set without a clock edge, reset priority, and the
// enable-circuit use (D tied high: the first rising edge sets Q).
module tb_bf_dff_sr;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, d = 0, set_n = 1, rst_n = 1, q, qn;

  bf_dff_sr dut (.clk(clk), .d(d), .set_n(set_n), .rst_n(rst_n), .q(q), .qn(qn));

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

  logic model;
  initial begin
    #0.5 rst_n = 0;
    #0.5 check(q == 0 && qn == 1, "async reset");
    rst_n = 1; #1;
    model = 0;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      #2 clk = 1;
      model = d;
      #1 check(q == model && qn == !model, "capture on rising edge");
      d = ~d;
      #2 clk = 0;
      #1 check(q == model, "no capture on falling edge");
    end
    // asynchronous set and reset between clock edges
    set_n = 0; #1 check(q == 1, "async set"); set_n = 1;
    rst_n = 0; #1 check(q == 0, "async reset mid-cycle");
    set_n = 0; #1 check(q == 0, "reset wins over set");
    set_n = 1; rst_n = 1; #1 check(q == 0, "holds after release");
    // enable-circuit use: D high, first rising edge sets Q
    d = 1; #1 check(q == 0, "level alone does not set");
    clk = 1; #1 check(q == 1, "rising edge sets enable");
    clk = 0; #1 check(q == 1, "stays set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
