// Self-checking testbench of fpga_uart_tx at 8 clocks per bit. A line monitor
// in the testbench decodes the output independently (finds the falling start
// edge, samples mid-bit) and checks: idle high after reset, every frame's
// start bit, data bits LSB first equal to {0, data}, stop bit, the frame
// length of 10 bits plus one idle cycle between back-to-back frames, data
// changes taking effect at the next frame, and the line going quiet after en
// falls (the frame in progress is completed).
module tb_fpga_uart_tx;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CPB = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [6:0] data = '0;
  logic tx, busy;

  fpga_uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst_n(rst_n), .en(en), .data(data), .tx(tx), .busy(busy));

  always #5 clk = ~clk;

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

  // line monitor
  logic [7:0] got [$];
  longint start_cyc [$];
  longint cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    wait (rst_n);
    forever begin
      logic [7:0] b;
      longint t0;
      @(negedge tx);
      t0 = cyc;
      repeat (CPB / 2) @(posedge clk);
      check(tx == 1'b0, "start bit low at mid-bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      check(tx == 1'b1, "stop bit high");
      got.push_back(b);
      start_cyc.push_back(t0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    check(tx == 1'b1 && !busy && got.size() == 0, "idle high, nothing sent without en");
    data = 7'h41;
    en = 1;
    wait (got.size() == 1);
    repeat (3 * CPB) @(posedge clk);   // second frame on the line
    data = 7'h2C;
    wait (got.size() == 3);
    repeat (3 * CPB) @(posedge clk);   // fourth frame on the line
    en = 0;
    repeat (30 * CPB) @(posedge clk);
    check(got.size() == 4, $sformatf("frame in progress completed after en fell (%0d frames)", got.size()));
    check(got[0] == 8'h41, "first frame carries {0, data}");
    check(got[1] == 8'h41, "data change waits for the next frame");
    check(got[2] == 8'h2C && got[3] == 8'h2C, "new data sent");
    for (int i = 1; i < got.size(); i++)
      check(start_cyc[i] - start_cyc[i-1] == 10 * CPB + 1, $sformatf("frame spacing %0d cycles", start_cyc[i] - start_cyc[i-1]));
    check(tx == 1'b1 && !busy, "line idle after en fell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
