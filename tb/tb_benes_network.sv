`timescale 1ns/1ps
// Self-checking test of the N-port Benes fabric. Random permutations are
// routed with the looping algorithm, written into the switches through the
// configuration port, and every input word must then reach exactly the
// output the permutation names, with ready flowing back along the same
// path. Multicast is tested with random settings that include broadcast
// modes, against a reference evaluation. The fabric is combinational, so a
// word passes in the same cycle.
module tb_benes_network;
  import mpsoc_pkg::*;
  import benes_route_pkg::*;
  localparam int N  = 8;
  localparam int W  = 32;
  localparam int S  = 2 * $clog2(N) - 1;
  localparam int SW = $clog2(S);
  localparam int IW = $clog2(N / 2);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          cfg_we;
  logic [SW-1:0] cfg_stage;
  logic [IW-1:0] cfg_idx;
  sw_mode_e      cfg_mode;
  logic [W-1:0]  in_data[N], out_data[N];
  logic in_valid[N], in_ready[N], out_valid[N], out_ready[N];

  benes_network #(.N(N), .W(W)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_modes(input modes_t m);
    for (int s = 0; s < S; s++)
      for (int i = 0; i < N / 2; i++) begin
        @(negedge clk);
        cfg_we = 1; cfg_stage = SW'(s); cfg_idx = IW'(i); cfg_mode = m[s][i];
      end
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    modes_t m;
    perm_t  p;
    int     src [MAXN];
    bit     orq [MAXN];
    bit     irq [MAXN];
    cfg_we = 0; cfg_stage = '0; cfg_idx = '0; cfg_mode = SW_STRAIGHT;
    for (int k = 0; k < N; k++) begin
      in_data[k] = '0; in_valid[k] = 0; out_ready[k] = 1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // permutations, including identity and reversal
    for (int t = 0; t < 60; t++) begin
      if (t == 0)      for (int k = 0; k < N; k++) p[k] = k;
      else if (t == 1) for (int k = 0; k < N; k++) p[k] = N - 1 - k;
      else             p = random_perm(N);
      for (int s = 0; s < MAXS; s++) for (int i = 0; i < MAXN / 2; i++) m[s][i] = SW_STRAIGHT;
      route(N, 0, 0, p, m);
      load_modes(m);
      for (int r = 0; r < 4; r++) begin
        for (int k = 0; k < N; k++) begin
          in_data[k]   = $urandom;
          in_valid[k]  = 1'($urandom);
          out_ready[k] = 1'($urandom);
        end
        #1;
        for (int k = 0; k < N; k++) begin
          check(out_data[p[k]] == in_data[k], $sformatf("perm %0d: data %0d->%0d", t, k, p[k]));
          check(out_valid[p[k]] == in_valid[k], "valid");
          check(in_ready[k] == out_ready[p[k]], "ready");
        end
      end
    end
    // multicast: random switch settings including broadcast modes
    for (int t = 0; t < 40; t++) begin
      for (int s = 0; s < S; s++)
        for (int i = 0; i < N / 2; i++) m[s][i] = sw_mode_e'($urandom_range(3, 0));
      evaluate(N, m, src);
      load_modes(m);
      for (int k = 0; k < N; k++) begin
        in_data[k] = $urandom; in_valid[k] = 1'b1; out_ready[k] = 1'($urandom);
      end
      #1;
      for (int o = 0; o < N; o++)
        check(out_data[o] == in_data[src[o]], $sformatf("multicast out %0d", o));
      for (int k = 0; k < MAXN; k++) orq[k] = (k < N) ? out_ready[k] : 1'b0;
      evaluate_ready(N, m, orq, irq);
      // a word is taken by all outputs of its tree or by none
      for (int o = 0; o < N; o++)
        check((out_valid[o] && out_ready[o]) == irq[src[o]], $sformatf("multicast all-or-none %0d", o));
      for (int k = 0; k < N; k++)
        check(in_ready[k] == irq[k], $sformatf("multicast ready %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
