`timescale 1ns/1ps
// Self-checking test of the shared memory: 8 requesters issue random
// reads and writes at the same time. Checked: at most one grant per cycle,
// no requester waits more than N-1 cycles (round robin), read data one
// clock after the grant and equal to a reference memory, and every
// request served exactly once.
module tb_shared_mem;
  localparam int N = 8;
  localparam int WORDS = 64;
  localparam int AW = $clog2(WORDS);
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req[N], gnt[N], rvalid[N];
  logic [3:0] be[N];
  logic [AW-1:0] addr[N];
  logic [31:0] wdata[N], rdata;

  shared_mem #(.N(N), .WORDS(WORDS)) dut (.*);

  logic [31:0] ref_mem[WORDS];
  int wait_cyc[N];
  int served, max_wait, conflicts;
  logic [31:0] exp_rd;
  int exp_rd_port;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ngnt, nreq;
    bit got[N];
    for (int i = 0; i < N; i++) begin req[i] = 0; be[i] = 0; addr[i] = 0; wdata[i] = 0; wait_cyc[i] = 0; end
    served = 0; max_wait = 0; exp_rd_port = -1; conflicts = 0;
    for (int w = 0; w < WORDS; w++) ref_mem[w] = 0;
    #22 rst_n = 1;
    // zero the memory through port 0
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); req[0] = 1; be[0] = 4'hF; addr[0] = AW'(w); wdata[0] = 0;
    end
    @(negedge clk); req[0] = 0;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      // new requests where idle
      for (int i = 0; i < N; i++)
        if (!req[i] && $urandom_range(2, 0) == 0) begin
          req[i] = 1; be[i] = ($urandom_range(1, 0) != 0) ? 4'h0 : 4'($urandom);
          addr[i] = AW'($urandom_range(WORDS - 1, 0)); wdata[i] = $urandom; wait_cyc[i] = 0;
        end
      #1;
      ngnt = 0; nreq = 0;
      for (int i = 0; i < N; i++) begin
        if (req[i]) nreq++;
        if (gnt[i]) begin
          ngnt++;
          check(req[i], "grant without request");
          if (be[i] == 0) begin exp_rd = ref_mem[addr[i]]; exp_rd_port = i; end
          else begin
            for (int b = 0; b < 4; b++) if (be[i][b]) ref_mem[addr[i]][8*b +: 8] = wdata[i][8*b +: 8];
            exp_rd_port = -1;
          end
        end
      end
      if (nreq > 1) conflicts++;
      check(ngnt <= 1, "one grant per cycle");
      if (nreq > 0) check(ngnt == 1, "work-conserving grant");
      if (ngnt == 0) exp_rd_port = -1;
      for (int i = 0; i < N; i++) got[i] = gnt[i];
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        if (req[i] && got[i]) begin
          req[i] = 0; served++;
        end else if (req[i]) begin
          wait_cyc[i]++;
          if (wait_cyc[i] > max_wait) max_wait = wait_cyc[i];
        end
      end
      // read data one clock after grant
      for (int i = 0; i < N; i++) check(rvalid[i] == (exp_rd_port == i), "rvalid");
      if (exp_rd_port >= 0) check(rdata == exp_rd, "read data");
      @(negedge clk);
    end
    check(max_wait <= N - 1, $sformatf("max wait %0d cycles", max_wait));
    check(conflicts > 0, "contention happened");
    $display("served %0d, max wait %0d, contended cycles %0d", served, max_wait, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
