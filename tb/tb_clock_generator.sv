`timescale 1ns/1ps
// Self-checking test of the clock generator model: with a 100 MHz master
// oscillator and MULT=2 it must stay low and unlocked for LOCK_CYCLES
// input cycles, then lock and run at 200 MHz (5 ns period, 50 % duty),
// and drop lock again on reset.
module tb_clock_generator;
  int checks = 0, failures = 0;
  logic clk_in = 0, rst = 1, clk_out, locked;
  always #5 clk_in = ~clk_in;

  clock_generator #(.MULT(2), .DIV(1), .LOCK_CYCLES(8)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1, th;
    int n;
    #22 rst = 0;
    repeat (5) @(posedge clk_in);
    check(!locked, "not locked before LOCK_CYCLES");
    check(!clk_out, "output low before lock");
    n = 0;
    while (!locked && n < 20) begin @(posedge clk_in); #0.01; n++; end
    check(locked, "locked");
    check(n >= 3 && n <= 6, $sformatf("lock after %0d more input cycles", n));
    repeat (3) @(posedge clk_out);
    t0 = $realtime;
    @(negedge clk_out); th = $realtime;
    repeat (100) @(posedge clk_out);
    t1 = $realtime;
    check((t1 - t0) > 499.0 && (t1 - t0) < 501.0, $sformatf("100 periods in %0f ns", t1 - t0));
    check((th - t0) > 2.49 && (th - t0) < 2.51, "50 % duty cycle");
    rst = 1;
    #1;
    check(!locked, "reset drops lock");
    #20;
    check(!clk_out, "output stops in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
