`timescale 1ns/1ps
// Workload test: the sensor-polling task with adaptive clock rate, on an
// MPSoC whose PMMs have memories of different sizes (each sized for its
// task, as space-sharing allows).
//
// PMM 1 plays the sensor: after a while it sends one data word to PMM 0.
// PMM 0 runs the task of the clock-rate example:
//   set_clock_rate(2); poll for new data; set_clock_rate(40);
//   calc_value (1200 instructions); set_clock_rate(2);
// Polling one STATUS read at a time at 2 MHz, the event must be seen within
// the 20 us deadline after the start (40 cycles at 2 MHz); the 1200
// instruction fetches of calc_value at 40 MHz must take 30 us, the
// deadline of the terminate segment. The PMM clock is counted in both
// phases. Each PMM's local memories must wrap at their own sizes.
module tb_sensor_task;
  import mpsoc_pkg::*;
  import benes_route_pkg::*;
  localparam int N   = 8;
  localparam int S   = 2 * $clog2(N) - 1;
  localparam int SW  = $clog2(S);
  localparam int IW  = $clog2(N / 2);
  localparam int SAW = 12;
  localparam int unsigned ISZ [N] = '{1024, 2048, 4096, 1024, 2048, 1024, 4096, 2048};
  localparam int unsigned DSZ [N] = '{2048, 1024, 1024, 4096, 2048, 2048, 1024, 4096};
  localparam int CALC_INSTR = 1200;

  int checks = 0, failures = 0;

  logic osc_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
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

  mpsoc_top #(.IMEM_WORDS(ISZ), .DMEM_WORDS(DSZ)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int step;
  int mem_done;
  int edges0;
  always @(posedge pmm_clk[0]) edges0++;

  for (genvar g = 0; g < N; g++) begin : g_cpu
    task automatic dbus(input logic [3:0] be, input logic [31:0] a, input logic [31:0] wd,
                        output logic [31:0] rd);
      @(negedge pmm_clk[g]);
      d_req[g] = 1; d_be[g] = be; d_addr[g] = a; d_wdata[g] = wd;
      #1;
      while (d_stall[g]) begin @(negedge pmm_clk[g]); #1; end
      @(negedge pmm_clk[g]);
      d_req[g] = 0;
      rd = d_rdata[g];
    endtask

    task automatic loader(input bit sel, input logic [3:0] be, input int word,
                          input logic [31:0] wd, output logic [31:0] rd);
      @(negedge pmm_clk[g]);
      ld_req[g] = 1; ld_sel[g] = sel; ld_be[g] = be; ld_addr[g] = 32'(4 * word); ld_wdata[g] = wd;
      @(negedge pmm_clk[g]);
      ld_req[g] = 0;
      rd = ld_rdata[g];
    endtask

    initial begin
      logic [31:0] rd;
      i_req[g] = 0; i_addr[g] = 0; d_req[g] = 0; d_be[g] = 0; d_addr[g] = 0; d_wdata[g] = 0;
      ld_req[g] = 0; ld_sel[g] = 0; ld_be[g] = 0; ld_addr[g] = 0; ld_wdata[g] = 0;
      wait (step == 1);
      // memory sizes: word SIZE aliases word 0, word SIZE-1 does not
      loader(0, 4'hF, 0, 32'h1111_0000 | 32'(g), rd);
      loader(0, 4'hF, int'(ISZ[g]) - 1, 32'h2222_0000 | 32'(g), rd);
      loader(0, 4'hF, int'(ISZ[g]), 32'h3333_0000 | 32'(g), rd);
      loader(0, 4'h0, 0, 0, rd);
      check(rd == (32'h3333_0000 | 32'(g)), $sformatf("pmm %0d instruction memory is %0d words", g, ISZ[g]));
      loader(0, 4'h0, int'(ISZ[g]) - 1, 0, rd);
      check(rd == (32'h2222_0000 | 32'(g)), $sformatf("pmm %0d instruction memory top word", g));
      loader(1, 4'hF, 0, 32'h4444_0000 | 32'(g), rd);
      loader(1, 4'hF, int'(DSZ[g]), 32'h5555_0000 | 32'(g), rd);
      loader(1, 4'h0, 0, 0, rd);
      check(rd == (32'h5555_0000 | 32'(g)), $sformatf("pmm %0d data memory is %0d words", g, DSZ[g]));
      mem_done++;
    end
  end

  // ---------------- the sensor (PMM 1) ----------------
  realtime t_initiate, t_sent, t_event, t_calc0, t_calc1;
  initial begin
    logic [31:0] rd;
    wait (step == 2);
    #15000;
    g_cpu[1].dbus(4'hF, IO_BASE | (32'(IO_MSG_TX) << 2), 32'h0000_0BAD, rd);
    t_sent = $realtime;
  end

  // ---------------- the task (PMM 0) ----------------
  int polls;
  initial begin
    logic [31:0] rd, data;
    int e0;
    wait (step == 2);
    t_initiate = $realtime;
    g_cpu[0].dbus(4'hF, IO_BASE | (32'(IO_CLK_RATE) << 2), 2, rd);     // set_clock_rate(2)
    polls = 0;
    do begin
      g_cpu[0].dbus(4'h0, IO_BASE | (32'(IO_STATUS) << 2), 0, rd);      // check_new_data
      polls++;
    end while (rd[1] == 1'b0 && polls < 1000);
    g_cpu[0].dbus(4'h0, IO_BASE | (32'(IO_MSG_RX) << 2), 0, data);
    t_event = $realtime;
    check(data == 32'h0000_0BAD, "sensor data received");
    check(t_event - t_initiate <= 20000.0, $sformatf("event after %0f ns, deadline 20 us", t_event - t_initiate));
    check(t_event - t_sent <= 3000.0, $sformatf("event seen %0f ns after the sensor sent", t_event - t_sent));
    check(cur_rate[0] == 2, "polling at 2 MHz");
    g_cpu[0].dbus(4'hF, IO_BASE | (32'(IO_CLK_RATE) << 2), 40, rd);    // set_clock_rate(40)
    repeat (2) @(negedge pmm_clk[0]);
    check(cur_rate[0] == 40, "calculating at 40 MHz");
    // calc_value: 1200 instruction fetches, one per clock
    for (int k = 0; k < CALC_INSTR; k++) begin
      @(negedge pmm_clk[0]);
      if (k == 0) begin t_calc0 = $realtime; e0 = edges0; end
      i_req[0] = 1; i_addr[0] = 32'(4 * (k % 64));
    end
    @(negedge pmm_clk[0]);
    i_req[0] = 0;
    t_calc1 = $realtime;
    check(edges0 - e0 == CALC_INSTR, $sformatf("calc took %0d cycles", edges0 - e0));
    check(t_calc1 - t_calc0 >= 29900.0 && t_calc1 - t_calc0 <= 30100.0,
          $sformatf("calc_value took %0f ns at 40 MHz, deadline 30 us", t_calc1 - t_calc0));
    g_cpu[0].dbus(4'hF, IO_BASE | (32'(IO_CLK_RATE) << 2), 2, rd);     // set_clock_rate(2)
    #1000;
    check(cur_rate[0] == 2, "back to 2 MHz");
    e0 = edges0;
    #10000;
    check(edges0 - e0 >= 19 && edges0 - e0 <= 21, $sformatf("%0d cycles in 10 us at 2 MHz", edges0 - e0));
    $display("polls %0d, event %0f ns after start, calc %0f ns", polls, t_event - t_initiate, t_calc1 - t_calc0);
    step = 3;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    modes_t m;
    perm_t p;
    step = 0; mem_done = 0; edges0 = 0;
    net_rate_mhz = 0; net_rate_tgl = 0;
    cfg_we = 0; cfg_stage = 0; cfg_idx = 0; cfg_mode = 0;
    for (int k = 0; k < N; k++) begin sh_req[k] = 0; sh_be[k] = 0; sh_addr[k] = 0; sh_wdata[k] = 0; end
    #55 rst_n = 1;
    wait (locked);
    #1000;
    step = 1;
    wait (mem_done == N);
    // circuit: sensor PMM 1 -> task PMM 0
    for (int k = 0; k < N; k++) p[k] = k;
    p[0] = 1; p[1] = 0;
    for (int s = 0; s < MAXS; s++) for (int i = 0; i < MAXN / 2; i++) m[s][i] = SW_STRAIGHT;
    route(N, 0, 0, p, m);
    for (int s = 0; s < S; s++)
      for (int i = 0; i < N / 2; i++) begin
        @(negedge net_clk);
        cfg_we = 1; cfg_stage = SW'(s); cfg_idx = IW'(i); cfg_mode = 2'(m[s][i]);
      end
    @(negedge net_clk);
    cfg_we = 0;
    step = 2;
    wait (step == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
