`timescale 1ns/1ps
// Self-checking test of the interconnection network with its FIFOs. The 8
// PMM ports run on 8 unrelated clocks and the network on a ninth. For each
// phase the fabric is configured (random permutations routed with the
// looping algorithm, then random settings with broadcast switches for
// multicast), every input that has a complete circuit sends a stream of
// tagged words at random times, every output reads at random times, and
// each output must receive exactly the stream of the input its circuit
// comes from, in order, with nothing lost or duplicated. Backpressure from
// slow receivers is counted and must occur.
module tb_rt_network;
  import mpsoc_pkg::*;
  import benes_route_pkg::*;
  localparam int N  = 8;
  localparam int W  = 32;
  localparam int S  = 2 * $clog2(N) - 1;
  localparam int SW = $clog2(S);
  localparam int IW = $clog2(N / 2);
  localparam int WORDS = 60;
  int checks = 0, failures = 0;

  logic pmm_clk[N], pmm_rst_n[N];
  logic net_clk = 0, net_rst_n = 0;
  realtime per[N] = '{10.0, 13.0, 7.0, 23.0, 5.0, 17.0, 11.0, 29.0};
  always #3 net_clk = ~net_clk;
  for (genvar g = 0; g < N; g++) begin : g_clk
    initial pmm_clk[g] = 0;
    always #(per[g] / 2) pmm_clk[g] = ~pmm_clk[g];
  end

  logic tx_valid[N], tx_ready[N], rx_valid[N], rx_ready[N];
  logic [W-1:0] tx_data[N], rx_data[N];
  logic cfg_we;
  logic [SW-1:0] cfg_stage;
  logic [IW-1:0] cfg_idx;
  sw_mode_e cfg_mode;

  rt_network #(.N(N), .W(W), .FIFO_DEPTH(16)) dut (.*);

  // phase control
  bit sending[N];
  int sent[N];
  int exp_src[N];
  int nxt_seq[N];
  int rcvd[N];
  int phase;
  int backpressure;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < N; g++) begin : g_agent
    // sender: word = phase, source, sequence number
    always @(posedge pmm_clk[g]) begin
      bit acc;
      acc = tx_valid[g] && tx_ready[g];
      if (tx_valid[g] && !tx_ready[g]) backpressure++;
      if (acc) sent[g]++;
      if (!tx_valid[g] || acc) begin
        if (sending[g] && sent[g] < WORDS && $urandom_range(1, 0) == 1) begin
          tx_valid[g] <= 1;
          tx_data[g]  <= {8'(phase), 8'(g), 16'(sent[g])};
        end else begin
          tx_valid[g] <= 0;
        end
      end
    end
    // receiver
    always @(posedge pmm_clk[g]) begin
      if (rx_valid[g] && rx_ready[g]) begin
        check(exp_src[g] >= 0, $sformatf("out %0d: unexpected word", g));
        check(rx_data[g] == {8'(phase), 8'(exp_src[g]), 16'(nxt_seq[g])},
              $sformatf("out %0d: got %h want src %0d seq %0d", g, rx_data[g], exp_src[g], nxt_seq[g]));
        nxt_seq[g]++;
        rcvd[g]++;
      end
      rx_ready[g] <= ($urandom_range(3, 0) == 0);
    end
  end

  task automatic load_modes(input modes_t m);
    for (int s = 0; s < S; s++)
      for (int i = 0; i < N / 2; i++) begin
        @(negedge net_clk);
        cfg_we = 1; cfg_stage = SW'(s); cfg_idx = IW'(i); cfg_mode = m[s][i];
      end
    @(negedge net_clk);
    cfg_we = 0;
  endtask

  task automatic run_phase(input modes_t m);
    int src[MAXN];
    bit ones[MAXN], ok[MAXN];
    int want_total, got_total, t;
    phase++;
    evaluate(N, m, src);
    for (int k = 0; k < MAXN; k++) ones[k] = 1;
    evaluate_ready(N, m, ones, ok);
    load_modes(m);
    want_total = 0;
    for (int o = 0; o < N; o++) begin
      exp_src[o] = ok[src[o]] ? src[o] : -1;
      nxt_seq[o] = 0; rcvd[o] = 0;
      if (ok[src[o]]) want_total += WORDS;
    end
    for (int k = 0; k < N; k++) begin sent[k] = 0; sending[k] = ok[k]; end
    t = 0;
    do begin
      #100; t++;
      got_total = 0;
      for (int o = 0; o < N; o++) got_total += rcvd[o];
    end while (got_total < want_total && t < 2000);
    check(got_total == want_total, $sformatf("phase %0d: %0d of %0d words", phase, got_total, want_total));
    for (int o = 0; o < N; o++)
      if (exp_src[o] >= 0) check(rcvd[o] == WORDS, $sformatf("phase %0d out %0d count", phase, o));
    for (int k = 0; k < N; k++) sending[k] = 0;
    #500;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    modes_t m;
    perm_t p;
    int multi;
    phase = 0; backpressure = 0;
    cfg_we = 0; cfg_stage = 0; cfg_idx = 0; cfg_mode = SW_STRAIGHT;
    for (int k = 0; k < N; k++) begin
      pmm_rst_n[k] = 0; tx_valid[k] = 0; tx_data[k] = 0; rx_ready[k] = 0;
      sending[k] = 0; sent[k] = 0; exp_src[k] = -1; nxt_seq[k] = 0; rcvd[k] = 0;
    end
    #100;
    net_rst_n = 1;
    for (int k = 0; k < N; k++) pmm_rst_n[k] = 1;
    #100;
    for (int t = 0; t < 4; t++) begin
      p = random_perm(N);
      for (int s = 0; s < MAXS; s++) for (int i = 0; i < MAXN / 2; i++) m[s][i] = SW_STRAIGHT;
      route(N, 0, 0, p, m);
      run_phase(m);
    end
    // multicast: random settings, keep those where some input feeds 2+ outputs
    multi = 0;
    while (multi < 3) begin
      int src[MAXN];
      int fan[MAXN];
      bit ones[MAXN], ok[MAXN];
      bit has_multi;
      for (int s = 0; s < S; s++)
        for (int i = 0; i < N / 2; i++) m[s][i] = sw_mode_e'(($urandom_range(5, 0) < 4) ? $urandom_range(1, 0) : $urandom_range(3, 2));
      evaluate(N, m, src);
      for (int k = 0; k < MAXN; k++) begin ones[k] = 1; fan[k] = 0; end
      evaluate_ready(N, m, ones, ok);
      for (int o = 0; o < N; o++) fan[src[o]]++;
      has_multi = 0;
      for (int k = 0; k < N; k++) if (ok[k] && fan[k] > 1) has_multi = 1;
      if (has_multi) begin
        run_phase(m);
        multi++;
      end
    end
    check(backpressure > 0, "backpressure from slow receivers occurred");
    $display("phases %0d, backpressure cycles %0d", phase, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
