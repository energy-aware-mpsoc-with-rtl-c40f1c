`timescale 1ns/1ps
// Self-checking test of the dual-clock message FIFO. Writer and reader run
// on unrelated clocks (7 ns and 3 ns, then 3 ns and 11 ns) with random
// valid and ready; every word must come out once, in order. The test also
// fills the FIFO with the reader stopped and checks that it takes exactly
// DEPTH words, and that a word written into an empty FIFO is visible on
// the read side within three read clocks.
module tb_async_fifo;
  localparam int W = 32;
  localparam int DEPTH = 16;
  int checks = 0, failures = 0;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  realtime wper = 7.0, rper = 3.0;
  always #(wper / 2) wclk = ~wclk;
  always #(rper / 2) rclk = ~rclk;

  logic         w_valid, w_ready, r_valid, r_ready;
  logic [W-1:0] w_data, r_data;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] sb[$];
  int           n_written, n_read;
  bit           rand_w, rand_r;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wclk) begin
    if (w_valid && w_ready) begin
      sb.push_back(w_data);
      n_written++;
    end
    if (rand_w) begin
      w_valid <= 1'($urandom_range(3, 0) != 0);
      w_data  <= $urandom;
    end
  end

  // reader
  always @(posedge rclk) begin
    if (r_valid && r_ready) begin
      check(sb.size() > 0, "read from empty");
      if (sb.size() > 0) check(r_data == sb.pop_front(), "data order");
      n_read++;
    end
    if (rand_r) r_ready <= 1'($urandom_range(2, 0) != 0);
  end

  initial begin
    int cnt;
    w_valid = 0; w_data = 0; r_ready = 0; rand_w = 0; rand_r = 0;
    n_written = 0; n_read = 0;
    #20; wrst_n = 1; rrst_n = 1;
    // fill with the reader stopped
    cnt = 0;
    @(negedge wclk);
    repeat (DEPTH + 4) begin
      w_valid = 1; w_data = $urandom;
      @(negedge wclk);
    end
    w_valid = 0;
    check(n_written == DEPTH, $sformatf("capacity %0d", n_written));
    check(!w_ready, "full");
    // drain
    r_ready = 1;
    wait (n_read == DEPTH);
    @(negedge rclk);
    r_ready = 0;
    repeat (5) @(negedge rclk);
    check(!r_valid, "empty after drain");
    // latency of one word into an empty FIFO
    @(negedge wclk);
    w_valid = 1; w_data = 32'h1234_5678;
    @(posedge wclk);
    #0.1 w_valid = 0;
    cnt = 0;
    while (!r_valid && cnt < 10) begin
      @(posedge rclk); #0.1 cnt++;
    end
    check(cnt <= 3, $sformatf("latency %0d read clocks", cnt));
    r_ready = 1;
    wait (n_read == DEPTH + 1);
    // random traffic, writer slower
    rand_w = 1; rand_r = 1;
    wait (n_read > 2000);
    // writer faster
    rand_w = 0; w_valid = 0;
    wait (sb.size() == 0);
    wper = 3.0; rper = 11.0;
    rand_w = 1;
    wait (n_read > 4000);
    rand_w = 0; w_valid = 0;
    wait (sb.size() == 0);
    check(n_read == n_written, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
