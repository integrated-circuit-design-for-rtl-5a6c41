// Self-checking testbench of fpga_cfg_loader (4 rows). Checks that FIRE
// before any configuration is refused, that a complete CONFIG frame loads
// the control word, trigger length and every latency, that an unknown byte
// counts as a bad command, that a second frame replaces the first only after
// its last byte, and that FIRE then gives a one-cycle fire pulse.
module tb_fpga_cfg_loader;
  timeunit 1ns;
  timeprecision 1ps;
  import bf_pkg::*;

  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] bd;
  logic bv = 0;
  bf_ctrl_t ctrl;
  logic [15:0] pw;
  logic [15:0] lat [N];
  logic cfg_valid, fire;
  logic [7:0] bad_cmd;

  fpga_cfg_loader #(.N_ROWS(N)) dut (
    .clk(clk), .rst_n(rst_n), .byte_data(bd), .byte_valid(bv), .ctrl(ctrl), .pw(pw), .lat(lat),
    .cfg_valid(cfg_valid), .fire(fire), .bad_cmd(bad_cmd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fires = 0;
  always @(posedge clk) if (rst_n && fire) fires++;

  task automatic put(input logic [7:0] b);
    @(negedge clk); bd = b; bv = 1;
    @(negedge clk); bv = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic frame(input logic [13:0] c, input logic [15:0] p, input logic [15:0] l [N], input int upto);
    logic [7:0] bytes [$];
    bytes.push_back(CMD_CONFIG);
    bytes.push_back({2'b00, c[13:8]});
    bytes.push_back(c[7:0]);
    bytes.push_back(p[7:0]);
    bytes.push_back(p[15:8]);
    for (int r = 0; r < N; r++) begin bytes.push_back(l[r][7:0]); bytes.push_back(l[r][15:8]); end
    for (int i = 0; i < upto && i < bytes.size(); i++) put(bytes[i]);
  endtask

  initial begin
    logic [15:0] l1 [N], l2 [N];
    logic [13:0] c1, c2;
    bd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(cfg_valid == 0, "no configuration after reset");
    put(CMD_FIRE);
    check(fires == 0 && bad_cmd == 1, "fire refused before configuration");
    c1 = 14'($urandom);
    for (int r = 0; r < N; r++) l1[r] = 16'($urandom);
    frame(c1, 16'd7, l1, 100);
    check(cfg_valid == 1, "configuration loaded");
    check(ctrl == bf_ctrl_t'(c1), "control word");
    check(pw == 16'd7, "trigger length");
    for (int r = 0; r < N; r++) check(lat[r] == l1[r], $sformatf("latency row %0d", r));
    put(8'h33);
    check(bad_cmd == 2, "unknown byte counted");
    // second frame, check nothing changes until its last byte
    c2 = ~c1;
    for (int r = 0; r < N; r++) l2[r] = 16'($urandom);
    frame(c2, 16'd300, l2, 4 + 2 * N);
    check(ctrl == bf_ctrl_t'(c1) && pw == 16'd7 && lat[N-1] == l1[N-1], "partial frame not applied");
    put(l2[N-1][15:8]);
    check(ctrl == bf_ctrl_t'(c2) && pw == 16'd300, "new frame applied at last byte");
    for (int r = 0; r < N; r++) check(lat[r] == l2[r], $sformatf("new latency row %0d", r));
    put(CMD_FIRE);
    check(fires == 1, "fire pulse");
    put(CMD_FIRE);
    check(fires == 2, "second fire pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
