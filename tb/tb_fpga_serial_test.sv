// Self-checking testbench of fpga_serial_test at 16 clocks per bit and a
// flash length of 200 ticks (one tick per clock at that bit time, longer
// than a frame, as the real 9600 ticks are). Checks:
//  - the display scan: each digit enable is low alone for one bit time, in
//    the order switches-high, switches-low, byte-high, byte-low, and each
//    digit shows the right hex value (decoded here from the segment lines
//    with an independent table);
//  - a received byte replaces the shown byte, one with a low stop bit does not;
//  - the LED lights at a start bit and stays on FLASH_TICKS + 1 ticks;
//  - switch 7 enables the transmitter, which sends {0, sw[6:0]};
//  - the receive line is mirrored.
module tb_fpga_serial_test;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CPB = 16;
  localparam int FL = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] sw = 8'h00;
  logic [6:0] seg_n;
  logic [3:0] an_n;
  logic flash, tx, rx_mirror;

  fpga_serial_test #(.CLKS_PER_BIT(CPB), .FLASH_TICKS(FL)) dut (
    .clk(clk), .rst_n(rst_n), .rx(rx), .sw(sw), .seg_n(seg_n), .an_n(an_n), .flash(flash), .tx(tx),
    .rx_mirror(rx_mirror));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segment patterns (active high {g..a}) for 0..F
  localparam logic [6:0] PAT [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                                     7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
  function automatic int decode(input logic [6:0] s_n);
    for (int d = 0; d < 16; d++) if (~s_n == PAT[d]) return d;
    return -1;
  endfunction

  task automatic send(input logic [7:0] b, input logic stop = 1'b1);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat (2) @(posedge clk);
  endtask

  // read the four digits from one full scan: waits for each enable in turn
  task automatic read_display(output int v [4]);
    for (int k = 0; k < 4; k++) begin
      while (an_n != ~(4'b0001 << k)) @(posedge clk);
      repeat (CPB / 2) @(posedge clk);
      check(an_n == ~(4'b0001 << k), $sformatf("digit %0d enable held", k));
      v[k] = decode(seg_n);
    end
  endtask

  // flash length in clocks
  longint cyc = 0, fl_on = 0, fl_len = -1;
  int n_flash = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && flash && fl_on == 0) begin fl_on = cyc; n_flash++; end
    if (rst_n && !flash && fl_on != 0) begin fl_len = cyc - fl_on; fl_on = 0; end
  end

  // transmit monitor
  logic [7:0] tx_got [$];
  initial begin
    wait (rst_n);
    forever begin
      logic [7:0] b;
      @(negedge tx);
      repeat (CPB / 2 + CPB) @(posedge clk);
      for (int i = 0; i < 8; i++) begin b[i] = tx; repeat (CPB) @(posedge clk); end
      tx_got.push_back(b);
    end
  end

  initial begin
    int v [4];
    int start_period;
    repeat (3) @(posedge clk);
    rst_n = 1;
    sw = 8'h3A;
    repeat (5) @(posedge clk);
    read_display(v);
    check(v[0] == 3 && v[1] == 'hA && v[2] == 0 && v[3] == 0, $sformatf("display %h%h %h%h after reset", v[0], v[1], v[2], v[3]));
    // scan period
    while (an_n != 4'b1110) @(posedge clk);
    start_period = int'(cyc);
    while (an_n == 4'b1110) @(posedge clk);
    while (an_n != 4'b1110) @(posedge clk);
    check(int'(cyc) - start_period == 4 * CPB, $sformatf("scan period %0d clocks", int'(cyc) - start_period));

    // a received byte is shown, with the LED flashing
    check(n_flash == 0, "LED dark while the line is idle");
    send(8'hC5);
    repeat (FL + 5) @(posedge clk);
    check(n_flash == 1 && fl_len == FL + 1, $sformatf("LED on for %0d ticks", fl_len));
    read_display(v);
    check(v[2] == 'hC && v[3] == 5, $sformatf("received byte shown as %h%h", v[2], v[3]));
    // a byte with a low stop bit is not shown
    send(8'h77, 1'b0);
    repeat (4 * CPB) @(posedge clk);
    read_display(v);
    check(v[2] == 'hC && v[3] == 5, "byte with a bad stop bit ignored");
    check(rx_mirror == rx, "receive line mirrored");

    // transmitter off, then on
    check(tx_got.size() == 0 && tx == 1'b1, "transmitter silent while switch 7 is off");
    sw = 8'hB3;
    wait (tx_got.size() == 2);
    sw = 8'h00;
    repeat (12 * CPB) @(posedge clk);
    check(tx_got[0] == 8'h33 && tx_got[1] == 8'h33, $sformatf("transmitted %h %h", tx_got[0], tx_got[1]));
    read_display(v);
    check(v[0] == 0 && v[1] == 0, "switch digits follow the switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
