// Self-checking testbench of fpga_uart_rx at 16 clocks per bit. Sends 100
// random bytes in 8N1 format with idle gaps of random length, checks every
// received byte and that valid comes about 9.5 bit times after the start
// edge; then sends a frame with a low stop bit (frame_err, no valid) and a
// short low glitch that is not a start bit.
module tb_fpga_uart_rx;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CPB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data;
  logic valid, frame_err;

  fpga_uart_rx #(.CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .rx(rx), .data(data), .valid(valid), .frame_err(frame_err));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1;
  endtask

  logic [7:0] q [$];
  int n_valid = 0, n_err = 0;
  longint start_cycle, cyc = 0, lat;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (rst_n && valid) begin
      n_valid++;
      lat = cyc - start_cycle;
      if (q.size() == 0) begin
        failures++; checks++; $display("FAIL: unexpected byte");
      end else begin
        logic [7:0] exp;
        exp = q.pop_front();
        check(data == exp, $sformatf("byte %h expected %h", data, exp));
        check(lat >= 9 * CPB && lat <= 10 * CPB + 4, $sformatf("latency %0d cycles", lat));
      end
    end
    if (rst_n && frame_err) n_err++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 100; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      q.push_back(b);
      start_cycle = cyc;
      send(b, 1'b1);
      repeat ($urandom_range(0, 2 * CPB)) @(posedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
    check(n_valid == 100, $sformatf("received %0d of 100", n_valid));
    check(n_err == 0, "no frame error on good frames");
    // bad stop bit
    send(8'h3C, 1'b0);
    repeat (3 * CPB) @(posedge clk);
    check(n_err == 1, "frame error flagged");
    check(n_valid == 100, "bad frame not delivered");
    // glitch shorter than half a bit
    rx = 0; repeat (CPB / 4) @(posedge clk); rx = 1;
    repeat (12 * CPB) @(posedge clk);
    check(n_valid == 100 && n_err == 1, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
