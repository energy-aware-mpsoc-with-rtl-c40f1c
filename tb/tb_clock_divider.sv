`timescale 1ns/1ps
// Self-checking test of the per-PMM clock divider on a 200 MHz generator
// clock. The output clock is counted over fixed windows: at the reset rate
// of 100 MHz, after set_clock_rate-style requests of 40 MHz and 2 MHz (the
// rates of the sensor-polling example), and at 7 MHz, which does not divide
// 200 MHz. Also checked: the edge spacing at 40 MHz (exactly 5 generator
// cycles), that clk_en pulses once per output cycle, that rates of 0 and
// above 100 MHz are ignored, and that a new rate is in force within three
// generator cycles of the request.
module tb_clock_divider;
  import mpsoc_pkg::*;
  localparam int F_GEN = 200;
  int checks = 0, failures = 0;

  logic gen_clk = 0, rst_n = 0;
  always #2.5 gen_clk = ~gen_clk;

  logic [RATE_W-1:0] rate_mhz, cur_rate;
  logic rate_tgl, div_clk, clk_en;

  clock_divider #(.F_GEN_MHZ(F_GEN), .RESET_RATE_MHZ(100)) dut (.*);

  int rises, ens, gen_cnt, last_rise, gaps_bad;
  bit track_gap;

  always @(posedge div_clk) begin
    rises++;
    if (track_gap && last_rise >= 0 && (gen_cnt - last_rise) != 5) gaps_bad++;
    last_rise = gen_cnt;
  end
  always @(posedge gen_clk) begin
    gen_cnt++;
    if (clk_en) ens++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic set_rate(input int r);
    @(negedge gen_clk);
    rate_mhz = RATE_W'(r);
    rate_tgl = !rate_tgl;
    repeat (3) @(negedge gen_clk);
  endtask

  // count output rising edges over `us` microseconds
  task automatic measure(input int us, output int r, output int e);
    rises = 0; ens = 0;
    repeat (us * F_GEN) @(posedge gen_clk);
    r = rises; e = ens;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, e;
    rate_mhz = 0; rate_tgl = 0; rises = 0; ens = 0; gen_cnt = 0;
    last_rise = -1; track_gap = 0; gaps_bad = 0;
    #12 rst_n = 1;
    check(cur_rate == 100, "reset rate");
    measure(5, r, e);
    check(r >= 499 && r <= 501, $sformatf("100 MHz: %0d edges in 5 us", r));
    check(e == r || e == r + 1 || e == r - 1, "clk_en per cycle at 100 MHz");

    set_rate(40);
    check(cur_rate == 40, "rate 40 in force within 3 cycles");
    measure(1, r, e);
    track_gap = 1; last_rise = -1;
    measure(5, r, e);
    track_gap = 0;
    check(r >= 199 && r <= 201, $sformatf("40 MHz: %0d edges in 5 us", r));
    check(gaps_bad == 0, "40 MHz edges 5 generator cycles apart");
    check(e >= r - 1 && e <= r + 1, "clk_en per cycle at 40 MHz");

    set_rate(2);
    check(cur_rate == 2, "rate 2");
    measure(1, r, e);
    measure(20, r, e);
    check(r >= 39 && r <= 41, $sformatf("2 MHz: %0d edges in 20 us", r));

    set_rate(7);
    measure(1, r, e);
    measure(20, r, e);
    check(r >= 139 && r <= 141, $sformatf("7 MHz: %0d edges in 20 us", r));

    set_rate(0);
    check(cur_rate == 7, "rate 0 ignored");
    set_rate(150);
    check(cur_rate == 7, "rate 150 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
