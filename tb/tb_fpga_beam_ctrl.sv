// Self-checking testbench of fpga_beam_ctrl (4 rows, 8 clocks per bit).
// Sends a CONFIG frame and a FIRE command over the serial line and checks
// the control word, that each row's trigger rises on its latency relative to
// the first row and lasts pw cycles, that the oscillator reset is released
// only during the sequence, that an unknown byte is counted and that a bad
// stop bit is flagged.
module tb_fpga_beam_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import bf_pkg::*;

  localparam int N = 4;
  localparam int CPB = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx = 1;
  bf_ctrl_t ctrl;
  logic [N-1:0] trig;
  logic osc_rst_n, busy, cfg_valid, rx_frame_err;
  logic [7:0] bad_cmd;

  fpga_beam_ctrl #(.N_ROWS(N), .CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .uart_rx(rx), .ctrl(ctrl), .trig(trig), .osc_rst_n(osc_rst_n),
    .busy(busy), .cfg_valid(cfg_valid), .rx_frame_err(rx_frame_err), .bad_cmd(bad_cmd));

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

  task automatic send(input logic [7:0] b, input logic stop = 1'b1);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat (2) @(posedge clk);
  endtask

  longint cyc = 0;
  longint t_rise [N], t_fall [N];
  logic [N-1:0] trig_q = '0;
  int n_err = 0;
  bit rst_ok = 1;
  always @(posedge clk) begin
    cyc++;
    for (int r = 0; r < N; r++) begin
      if (trig[r] && !trig_q[r]) t_rise[r] = cyc;
      if (!trig[r] && trig_q[r]) t_fall[r] = cyc;
    end
    trig_q <= trig;
    if (rst_n && rx_frame_err) n_err++;
    if (!busy && osc_rst_n && rst_n) rst_ok = 0;
  end

  localparam logic [15:0] LAT [N] = '{16'd40, 16'd10, 16'd75, 16'd10};

  initial begin
    bf_ctrl_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    c.demux_sel = 1'b1; c.oneshot_code = 3'd5; c.dco_code = 5'd19; c.mux8_sel = 3'd6; c.mux4_sel = SRC_DCO;
    send(CMD_CONFIG);
    send({2'b00, c[13:8]});
    send(c[7:0]);
    send(8'd12); send(8'd0);
    for (int r = 0; r < N; r++) begin send(LAT[r][7:0]); send(LAT[r][15:8]); end
    check(cfg_valid, "configuration loaded");
    check(ctrl == c, "control word on the common lines");
    send(CMD_FIRE);
    while (!busy) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
    for (int r = 0; r < N; r++) begin
      check(t_rise[r] - t_rise[1] == LAT[r] - LAT[1], $sformatf("row %0d relative firing time", r));
      check(t_fall[r] - t_rise[r] == 12, $sformatf("row %0d trigger length", r));
    end
    check(rst_ok, "oscillator reset released only while busy");
    send(8'h77);
    check(bad_cmd == 1, "unknown byte counted");
    send(8'h12, 1'b0);
    repeat (CPB) @(posedge clk);
    check(n_err == 1, "stop-bit error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
