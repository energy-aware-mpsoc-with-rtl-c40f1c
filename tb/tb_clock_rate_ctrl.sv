`timescale 1ns/1ps
// Self-checking test of the clock rate controller with 8 PMM dividers and
// the network divider, fed by a 100 MHz master oscillator (200 MHz
// generator clock). Every PMM is given a different rate, including the
// 2 MHz and 40 MHz of the sensor-polling example, the network gets 50 MHz;
// the clocks are then counted over 20 us and each must show its own rate.
module tb_clock_rate_ctrl;
  import mpsoc_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic osc_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // an edge, so that the asynchronous resets act
  always #5 osc_clk = ~osc_clk;

  logic gen_clk, gen_rst_n, locked, net_clk, net_rate_tgl;
  logic [RATE_W-1:0] rate_mhz[N], cur_rate[N], net_rate_mhz, net_cur_rate;
  logic rate_tgl[N], pmm_clk[N];

  clock_rate_ctrl #(.N_PMM(N)) dut (.*);

  int rises[N];
  int net_rises;
  for (genvar g = 0; g < N; g++) begin : g_cnt
    always @(posedge pmm_clk[g]) rises[g]++;
  end
  always @(posedge net_clk) net_rises++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int want[N] = '{2, 40, 100, 25, 10, 1, 64, 33};

  initial begin
    for (int i = 0; i < N; i++) begin rate_mhz[i] = 0; rate_tgl[i] = 0; rises[i] = 0; end
    net_rate_mhz = 0; net_rate_tgl = 0; net_rises = 0;
    #30 rst_n = 1;
    wait (gen_rst_n);
    check(locked, "generator locked");
    // reset rates: everything at 100 MHz
    for (int i = 0; i < N; i++) rises[i] = 0;
    net_rises = 0;
    #5000;
    for (int i = 0; i < N; i++) check(rises[i] >= 499 && rises[i] <= 501, $sformatf("reset rate pmm %0d: %0d", i, rises[i]));
    check(net_rises >= 499 && net_rises <= 501, "net reset rate");
    for (int i = 0; i < N; i++) begin rate_mhz[i] = RATE_W'(want[i]); rate_tgl[i] = 1; end
    net_rate_mhz = 50; net_rate_tgl = 1;
    #2000;
    for (int i = 0; i < N; i++) check(cur_rate[i] == RATE_W'(want[i]), $sformatf("cur_rate %0d", i));
    check(net_cur_rate == 50, "net cur rate");
    for (int i = 0; i < N; i++) rises[i] = 0;
    net_rises = 0;
    #20000;
    for (int i = 0; i < N; i++)
      check(rises[i] >= 20 * want[i] - 1 && rises[i] <= 20 * want[i] + 1,
            $sformatf("pmm %0d: %0d edges in 20 us, want %0d", i, rises[i], 20 * want[i]));
    check(net_rises >= 999 && net_rises <= 1001, $sformatf("net: %0d edges", net_rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
