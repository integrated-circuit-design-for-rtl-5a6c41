// Self-checking testbench of bf_mux8: for every select value, random input
// patterns, the output must equal the selected divider tap.
module tb_bf_mux8;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [7:0] in;
  logic [2:0] sel;
  logic out;

  bf_mux8 dut (.in(in), .sel(sel), .out(out));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 20; i++) begin
        sel = 3'(s);
        in  = 8'($urandom);
        #1 check(out == in[s], $sformatf("sel=%0d in=%h out=%0b", s, in, out));
      end
      in = 8'(1 << s);         #1 check(out == 1'b1, "one-hot selected");
      in = ~(8'(1 << s));      #1 check(out == 1'b0, "one-cold selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
