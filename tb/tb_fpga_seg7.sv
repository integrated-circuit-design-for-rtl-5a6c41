// Self-checking testbench of fpga_seg7: every one of the 16 digits is compared
// with the segment letters (a..g) that should light for it, written out as
// text, and the outputs must be active low.
module tb_fpga_seg7;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [3:0] digit;
  logic [6:0] seg_n;

  fpga_seg7 dut (.digit(digit), .seg_n(seg_n));

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

  localparam string LIT [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                                 "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] want;
      want = '1;
      for (int i = 0; i < LIT[d].len(); i++) want[LIT[d][i] - "a"] = 1'b0;
      digit = 4'(d);
      #1;
      check(seg_n == want, $sformatf("digit %h: segments %b expected %b", d, seg_n, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
