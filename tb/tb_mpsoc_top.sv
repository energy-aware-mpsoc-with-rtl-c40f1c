`timescale 1ns/1ps
// End-to-end test of the MPSoC at its default size (8 PMMs, 8 KB
// instruction and 8 KB data memory each, 16 KB shared memory, 16-word
// message FIFOs, 100 MHz master oscillator, 200 MHz generator clock).
//
// One behavioural processor agent per PMM, on that PMM's own clock, does
// what a task's code would do through the PMM buses:
//   1. loads its program image over the loader port and fetches it back;
//   2. sets its clock rate (2, 40, 100, 25, 10, 50, 20 and 80 MHz: every
//      task its own rate), which the testbench then measures;
//   3. exchanges tagged message streams through the network under two
//      permutations, the second with the network slowed to 5 MHz so that
//      senders stall on full FIFOs, and one multicast setting;
// while the testbench sets the network circuits, changes the network
// clock rate and drives all shared-memory ports at once. Each mechanism
// (rate change, circuit set-up, send stall, receive stall, multicast,
// network rate change, shared-memory contention) is counted and must
// happen at least once; every message must arrive once, in order, at the
// output its circuit leads to.
module tb_mpsoc_top;
  import mpsoc_pkg::*;
  import benes_route_pkg::*;
  localparam int N   = 8;
  localparam int S   = 2 * $clog2(N) - 1;
  localparam int SW  = $clog2(S);
  localparam int IW  = $clog2(N / 2);
  localparam int SAW = 12;
  localparam int M   = 24;   // words per message stream
  localparam int IMG = 16;   // words of program image checked per PMM

  int checks = 0, failures = 0;

  logic osc_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // an edge, so that the asynchronous resets act
  always #5 osc_clk = ~osc_clk;

  logic gen_clk, locked, net_clk;
  logic pmm_clk[N];
  logic i_req[N], i_rvalid[N], d_req[N], d_rvalid[N], d_stall[N];
  logic ld_req[N], ld_sel[N], ld_rvalid[N];
  logic [31:0] i_addr[N], i_rdata[N], d_addr[N], d_wdata[N], d_rdata[N];
  logic [31:0] ld_addr[N], ld_wdata[N], ld_rdata[N];
  logic [3:0] d_be[N], ld_be[N];
  logic [RATE_W-1:0] cur_rate[N], net_cur_rate, net_rate_mhz;
  logic net_rate_tgl;
  logic cfg_we;
  logic [SW-1:0] cfg_stage;
  logic [IW-1:0] cfg_idx;
  logic [1:0] cfg_mode;
  logic sh_req[N], sh_gnt[N], sh_rvalid[N];
  logic [3:0] sh_be[N];
  logic [SAW-1:0] sh_addr[N];
  logic [31:0] sh_wdata[N], sh_rdata;

  mpsoc_top dut (.*);

  // ---------------- scenario state ----------------
  int want_rate[N] = '{2, 40, 100, 25, 10, 50, 20, 80};
  int phase;            // current message phase, 0 = none
  int done[N];          // last step finished by each agent
  int step;             // step the agents are told to do
  bit is_sender[N];
  int exp_src[N];       // for each receiver: its source, -1 = none
  int n_rate_changes, n_circuits, n_tx_stall, n_rx_stall, n_multicast, n_net_rate, n_sh_contention;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- processor agents ----------------
  for (genvar g = 0; g < N; g++) begin : g_cpu
    task automatic dbus(input logic [3:0] be, input logic [31:0] a, input logic [31:0] wd,
                        output logic [31:0] rd, output int nstall);
      nstall = 0;
      @(negedge pmm_clk[g]);
      d_req[g] = 1; d_be[g] = be; d_addr[g] = a; d_wdata[g] = wd;
      #1;
      // d_stall, sampled before the rising edge, says whether the edge takes it
      while (d_stall[g]) begin
        nstall++;
        @(negedge pmm_clk[g]);
        #1;
      end
      @(negedge pmm_clk[g]);
      d_req[g] = 0;
      if (be == 4'h0) check(d_rvalid[g], "read data valid one clock later");
      rd = d_rdata[g];
    endtask

    initial begin
      logic [31:0] img[IMG];
      logic [31:0] rd;
      int ns;
      i_req[g] = 0; i_addr[g] = 0; d_req[g] = 0; d_be[g] = 0; d_addr[g] = 0; d_wdata[g] = 0;
      ld_req[g] = 0; ld_sel[g] = 0; ld_be[g] = 0; ld_addr[g] = 0; ld_wdata[g] = 0;
      done[g] = 0;
      // step 1: program load and fetch
      wait (step == 1);
      for (int k = 0; k < IMG; k++) begin
        @(negedge pmm_clk[g]);
        img[k] = {8'(g), 24'($urandom)};
        ld_req[g] = 1; ld_sel[g] = 0; ld_be[g] = 4'hF; ld_addr[g] = 32'(4 * k); ld_wdata[g] = img[k];
      end
      @(negedge pmm_clk[g]); ld_req[g] = 0;
      for (int k = 0; k < IMG; k++) begin
        @(negedge pmm_clk[g]); i_req[g] = 1; i_addr[g] = 32'(4 * k);
        @(negedge pmm_clk[g]); i_req[g] = 0;
        check(i_rvalid[g] && i_rdata[g] == img[k], $sformatf("pmm %0d fetch %0d", g, k));
      end
      // data memory word written and read by the processor
      dbus(4'hF, 32'h40, 32'hD00D_0000 | 32'(g), rd, ns);
      dbus(4'h0, 32'h40, 0, rd, ns);
      check(rd == (32'hD00D_0000 | 32'(g)), $sformatf("pmm %0d data memory", g));
      // step 1 also sets the clock rate
      dbus(4'hF, IO_BASE | (32'(IO_CLK_RATE) << 2), 32'(want_rate[g]), rd, ns);
      dbus(4'h0, IO_BASE | (32'(IO_CLK_RATE) << 2), 0, rd, ns);
      check(rd == 32'(want_rate[g]), $sformatf("pmm %0d rate register", g));
      n_rate_changes++;
      done[g] = 1;
      // message steps 2..4
      for (int st = 2; st <= 4; st++) begin
        wait (step == st);
        if (is_sender[g])
          for (int k = 0; k < M; k++) begin
            dbus(4'hF, IO_BASE | (32'(IO_MSG_TX) << 2), {8'(phase), 8'(g), 16'(k)}, rd, ns);
            if (ns > 0) n_tx_stall++;
          end
        if (exp_src[g] >= 0)
          for (int k = 0; k < M; k++) begin
            dbus(4'h0, IO_BASE | (32'(IO_MSG_RX) << 2), 0, rd, ns);
            if (ns > 0) n_rx_stall++;
            check(rd == {8'(phase), 8'(exp_src[g]), 16'(k)},
                  $sformatf("step %0d pmm %0d word %0d: got %h from src %0d", st, g, k, rd, exp_src[g]));
          end
        // nothing more may be waiting
        dbus(4'h0, IO_BASE | (32'(IO_STATUS) << 2), 0, rd, ns);
        check(rd[1] == 1'b0, $sformatf("pmm %0d no stray words", g));
        done[g] = st;
      end
    end
  end

  // ---------------- network configuration (net_clk domain) ----------------
  task automatic load_modes(input modes_t m);
    for (int s = 0; s < S; s++)
      for (int i = 0; i < N / 2; i++) begin
        @(negedge net_clk);
        cfg_we = 1; cfg_stage = SW'(s); cfg_idx = IW'(i); cfg_mode = 2'(m[s][i]);
      end
    @(negedge net_clk);
    cfg_we = 0;
    n_circuits++;
  endtask

  task automatic set_net_rate(input int r);
    @(negedge gen_clk);
    net_rate_mhz = RATE_W'(r);
    net_rate_tgl = !net_rate_tgl;
    repeat (4) @(negedge gen_clk);
    check(net_cur_rate == RATE_W'(r), $sformatf("network rate %0d", r));
    n_net_rate++;
  endtask

  task automatic prepare(input modes_t m);
    int src[MAXN];
    bit ones[MAXN], ok[MAXN];
    int fan[MAXN];
    evaluate(N, m, src);
    for (int k = 0; k < MAXN; k++) begin ones[k] = 1; fan[k] = 0; end
    evaluate_ready(N, m, ones, ok);
    for (int o = 0; o < N; o++) exp_src[o] = ok[src[o]] ? src[o] : -1;
    for (int o = 0; o < N; o++) if (exp_src[o] >= 0) fan[exp_src[o]]++;
    for (int k = 0; k < N; k++) begin
      is_sender[k] = ok[k];
      if (fan[k] > 1) n_multicast++;
    end
    load_modes(m);
  endtask

  task automatic wait_done(input int st, input int limit_us);
    int t;
    bit all;
    t = 0;
    do begin
      #1000; t++;
      all = 1;
      for (int k = 0; k < N; k++) if (done[k] != st) all = 0;
    end while (!all && t < limit_us);
    check(all, $sformatf("step %0d finished by every PMM", st));
  endtask

  // ---------------- shared memory (gen_clk domain) ----------------
  task automatic shared_memory_test();
    int waits;
    bit pend[N];
    logic [31:0] got[N];
    // every PMM writes its own word in the same cycle, then reads them all
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge gen_clk);
      for (int k = 0; k < N; k++) begin
        sh_req[k] = 1; sh_be[k] = (pass == 0) ? 4'hF : 4'h0;
        sh_addr[k] = SAW'(pass == 0 ? 100 + k : 100 + (k + 3) % N);
        sh_wdata[k] = 32'h5A00_0000 | 32'(k);
        pend[k] = 1;
      end
      waits = 0;
      while (pend.or() != 0) begin
        bit g[N];
        #0.1;
        for (int k = 0; k < N; k++) g[k] = sh_gnt[k];
        @(posedge gen_clk);
        #0.1;
        for (int k = 0; k < N; k++) if (sh_rvalid[k]) got[k] = sh_rdata;
        for (int k = 0; k < N; k++) begin
          if (pend[k] && g[k]) begin pend[k] = 0; sh_req[k] = 0; end
          else if (pend[k]) waits++;
        end
      end
      @(negedge gen_clk);
      if (waits > 0) n_sh_contention++;
      if (pass == 1)
        for (int k = 0; k < N; k++)
          check(got[k] == (32'h5A00_0000 | 32'((k + 3) % N)), $sformatf("shared memory read %0d", k));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rises[N];
  for (genvar g = 0; g < N; g++) begin : g_cnt
    initial rises[g] = 0;
    always @(posedge pmm_clk[g]) rises[g]++;
  end

  initial begin
    modes_t m;
    perm_t p;
    int tries;
    step = 0; phase = 0;
    n_rate_changes = 0; n_circuits = 0; n_tx_stall = 0; n_rx_stall = 0;
    n_multicast = 0; n_net_rate = 0; n_sh_contention = 0;
    net_rate_mhz = 0; net_rate_tgl = 0;
    cfg_we = 0; cfg_stage = 0; cfg_idx = 0; cfg_mode = 0;
    for (int k = 0; k < N; k++) begin
      sh_req[k] = 0; sh_be[k] = 0; sh_addr[k] = 0; sh_wdata[k] = 0;
      is_sender[k] = 0; exp_src[k] = -1;
    end
    #55 rst_n = 1;
    wait (locked);
    #1000;
    check(net_cur_rate == 100, "network starts at 100 MHz");

    // step 1: program load, individual clock rates
    step = 1;
    wait_done(1, 200);
    #3000;
    for (int k = 0; k < N; k++) check(cur_rate[k] == RATE_W'(want_rate[k]), $sformatf("pmm %0d rate in force", k));
    for (int k = 0; k < N; k++) rises[k] = 0;
    #20000;
    for (int k = 0; k < N; k++)
      check(rises[k] >= 20 * want_rate[k] - 1 && rises[k] <= 20 * want_rate[k] + 1,
            $sformatf("pmm %0d runs at %0d MHz: %0d edges in 20 us", k, want_rate[k], rises[k]));

    // step 2: a permutation at full network speed
    phase = 2;
    p = random_perm(N);
    for (int s = 0; s < MAXS; s++) for (int i = 0; i < MAXN / 2; i++) m[s][i] = SW_STRAIGHT;
    route(N, 0, 0, p, m);
    prepare(m);
    step = 2;
    wait_done(2, 400);

    // step 3: another permutation, network slowed to 5 MHz
    set_net_rate(5);
    phase = 3;
    p = random_perm(N);
    for (int s = 0; s < MAXS; s++) for (int i = 0; i < MAXN / 2; i++) m[s][i] = SW_STRAIGHT;
    route(N, 0, 0, p, m);
    prepare(m);
    step = 3;
    wait_done(3, 400);
    set_net_rate(100);

    // step 4: multicast
    phase = 4;
    tries = 0;
    do begin
      int src[MAXN];
      bit ones[MAXN], ok[MAXN];
      int fan[MAXN];
      bit good;
      for (int s = 0; s < S; s++)
        for (int i = 0; i < N / 2; i++)
          m[s][i] = sw_mode_e'(($urandom_range(5, 0) < 4) ? $urandom_range(1, 0) : $urandom_range(3, 2));
      evaluate(N, m, src);
      for (int k = 0; k < MAXN; k++) begin ones[k] = 1; fan[k] = 0; end
      evaluate_ready(N, m, ones, ok);
      for (int o = 0; o < N; o++) if (ok[src[o]]) fan[src[o]]++;
      good = 0;
      for (int k = 0; k < N; k++) if (fan[k] > 1) good = 1;
      tries++;
      if (good) break;
    end while (tries < 1000);
    prepare(m);
    step = 4;
    wait_done(4, 400);

    shared_memory_test();

    $display("mechanisms: rate changes %0d, circuit set-ups %0d, send stalls %0d, receive stalls %0d, multicast trees %0d, network rate changes %0d, shared-memory contention %0d",
             n_rate_changes, n_circuits, n_tx_stall, n_rx_stall, n_multicast, n_net_rate, n_sh_contention);
    check(n_rate_changes == N, "every PMM set its clock rate");
    check(n_circuits > 0, "circuits set up");
    check(n_tx_stall > 0, "send stall happened");
    check(n_rx_stall > 0, "receive stall happened");
    check(n_multicast > 0, "multicast happened");
    check(n_net_rate > 0, "network rate changed");
    check(n_sh_contention > 0, "shared-memory contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
