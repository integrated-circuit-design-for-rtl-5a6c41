// Self-checking testbench of fpga_fire_ctrl with 16 rows. Loads the
// clock-latency table of the 4x4 array example (462 .. 585 cycles) and
// random tables, fires, and checks for every row that its trigger rises
// exactly lat+1 cycles after start and stays high pw cycles, that busy and
// the oscillator reset span the sequence, that done comes once, and that a
// start while busy is ignored.
module tb_fpga_fire_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] lat [N];
  logic [15:0] pw;
  logic [N-1:0] trig;
  logic osc_rst_n, busy, done;

  fpga_fire_ctrl #(.N_ROWS(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .lat(lat), .pw(pw), .trig(trig),
    .osc_rst_n(osc_rst_n), .busy(busy), .done(done));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-row edge recorder
  longint cyc = 0, t_start;
  longint t_rise [N], t_fall [N];
  int n_rise [N];
  int n_done = 0;
  logic [N-1:0] trig_q = '0;
  always @(posedge clk) begin
    cyc++;
    for (int r = 0; r < N; r++) begin
      if (rst_n && trig[r] && !trig_q[r]) begin t_rise[r] = cyc; n_rise[r]++; end
      if (!trig[r] && trig_q[r]) t_fall[r] = cyc;
    end
    trig_q <= trig;
    if (rst_n && done) n_done++;
  end

  task automatic run(input logic [15:0] p, input bit poke_busy);
    int maxl, pe;
    for (int r = 0; r < N; r++) n_rise[r] = 0;
    n_done = 0;
    pw = p;
    pe = (p == 0) ? 1 : p;
    maxl = 0;
    for (int r = 0; r < N; r++) if (lat[r] > maxl) maxl = lat[r];
    @(negedge clk); start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    check(busy && osc_rst_n, "busy and oscillators released");
    if (poke_busy) begin
      repeat (3) @(negedge clk);
      start = 1; @(negedge clk); start = 0;
    end
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    check(!osc_rst_n, "oscillators held in reset after the sequence");
    check(n_done == 1, "one done pulse");
    for (int r = 0; r < N; r++) begin
      check(n_rise[r] == 1, $sformatf("row %0d fired once", r));
      // start is sampled on edge t_start+1; the trigger is set lat+1 edges
      // later and the recorder sees it one edge after that.
      check(t_rise[r] - t_start == lat[r] + 3, $sformatf("row %0d rise at %0d, lat %0d",
            r, t_rise[r] - t_start, lat[r]));
      check(t_fall[r] - t_rise[r] == pe, $sformatf("row %0d width %0d", r, t_fall[r] - t_rise[r]));
    end
  endtask

  localparam int EX [N] = '{508, 524, 536, 520, 486, 528, 559, 520, 473, 531, 573, 520, 462, 534, 585, 520};

  initial begin
    pw = 1;
    for (int r = 0; r < N; r++) lat[r] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(trig == '0 && !busy && !osc_rst_n, "idle after reset");
    for (int r = 0; r < N; r++) lat[r] = 16'(EX[r]);
    run(16'd1, 1'b0);
    // relative timing of the 4x4 example: 16 cycles between ring 1 at 45 and 135 degrees
    check(t_rise[1] - t_rise[0] == 16, "16-cycle spacing of the example");
    run(16'd50, 1'b1);
    for (int k = 0; k < 5; k++) begin
      for (int r = 0; r < N; r++) lat[r] = 16'($urandom_range(0, 300));
      run(16'($urandom_range(0, 40)), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
