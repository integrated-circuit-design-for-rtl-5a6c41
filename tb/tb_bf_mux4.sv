// Self-checking testbench of bf_mux4: each source code must pass its own
// input (00 ground, 01 FPGA, 10 oneshot, 11 oscillator) for all input values.
module tb_bf_mux4;
  timeunit 1ns;
  timeprecision 1ps;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  logic g, fp, os, dc, out;
  src_sel_e sel;

  bf_mux4 dut (.in_ground(g), .in_fpga(fp), .in_oneshot(os), .in_dco(dc), .sel(sel), .out(out));

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
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 16; v++) begin
        logic exp;
        sel = src_sel_e'(s);
        {g, fp, os, dc} = 4'(v);
        case (s)
          0: exp = g;
          1: exp = fp;
          2: exp = os;
          default: exp = dc;
        endcase
        #1 check(out == exp, $sformatf("sel=%0d inputs=%b out=%0b", s, 4'(v), out));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
