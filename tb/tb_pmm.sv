`timescale 1ns/1ps
// Self-checking test of the PMM shell. A program image is loaded through
// the loader port and fetched back over the instruction bus; the data bus
// writes and reads the local data memory with byte masks; the I/O
// registers are exercised: CLK_RATE (a write must flip rate_tgl with the
// new rate held, and read back), MSG_TX (a send into a full FIFO must
// stall until there is room, then go through once), MSG_RX (a receive
// with nothing waiting must stall, then return the word) and STATUS.
// Read latency of one clock is checked on every bus.
module tb_pmm;
  import mpsoc_pkg::*;
  localparam int IW = 64, DW = 64;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic i_req, i_rvalid, d_req, d_rvalid, d_stall, ld_req, ld_sel, ld_rvalid;
  logic [31:0] i_addr, i_rdata, d_addr, d_wdata, d_rdata, ld_addr, ld_wdata, ld_rdata;
  logic [3:0] d_be, ld_be;
  logic [RATE_W-1:0] rate_mhz;
  logic rate_tgl, tx_valid, tx_ready, rx_valid, rx_ready;
  logic [MSG_W-1:0] tx_data, rx_data;

  pmm #(.IMEM_WORDS(IW), .DMEM_WORDS(DW), .RESET_RATE_MHZ(100)) dut (.*);

  logic [31:0] img[IW], dref[DW];
  int stalls, sent, received;
  logic [31:0] tx_log[$];

  // network side model: records sent words
  always @(posedge clk) if (tx_valid && tx_ready) tx_log.push_back(tx_data);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // one data-bus access; waits while stalled; returns read data
  task automatic dbus(input logic [3:0] be, input logic [31:0] a, input logic [31:0] wd,
                      output logic [31:0] rd, output int nstall);
    nstall = 0;
    @(negedge clk);
    d_req = 1; d_be = be; d_addr = a; d_wdata = wd;
    #1;
    while (d_stall) begin
      nstall++;
      @(negedge clk); #1;
    end
    @(negedge clk);
    d_req = 0;
    if (be == 4'h0) check(d_rvalid, "d_rvalid one clock after read");
    else            check(!d_rvalid, "no d_rvalid after write");
    rd = d_rdata;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    logic        tgl0;
    int          ns;
    i_req = 0; i_addr = 0; d_req = 0; d_be = 0; d_addr = 0; d_wdata = 0;
    ld_req = 0; ld_sel = 0; ld_be = 0; ld_addr = 0; ld_wdata = 0;
    tx_ready = 1; rx_valid = 0; rx_data = 0; stalls = 0;
    #22 rst_n = 1;
    // load program and data images
    for (int k = 0; k < IW; k++) begin
      @(negedge clk);
      ld_req = 1; ld_sel = 0; ld_be = 4'hF; ld_addr = 32'(4 * k); img[k] = $urandom; ld_wdata = img[k];
    end
    for (int k = 0; k < DW; k++) begin
      @(negedge clk);
      ld_req = 1; ld_sel = 1; ld_be = 4'hF; ld_addr = 32'(4 * k); dref[k] = $urandom; ld_wdata = dref[k];
    end
    @(negedge clk); ld_req = 0;
    // loader read-back of both memories
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); ld_req = 1; ld_sel = k[0]; ld_be = 0; ld_addr = 32'(4 * k);
      @(negedge clk); ld_req = 0;
      check(ld_rvalid && ld_rdata == (k[0] ? dref[k] : img[k]), "loader read-back");
    end
    // instruction fetch, streaming one per clock
    for (int k = 0; k < IW; k++) begin
      @(negedge clk);
      if (k > 0) check(i_rvalid && i_rdata == img[k - 1], $sformatf("fetch %0d", k - 1));
      i_req = 1; i_addr = 32'(4 * k);
    end
    @(negedge clk); i_req = 0;
    check(i_rvalid && i_rdata == img[IW - 1], "last fetch");
    // data memory: byte writes and reads
    for (int t = 0; t < 200; t++) begin
      int a;
      logic [3:0] be;
      logic [31:0] wd;
      a = $urandom_range(DW - 1, 0);
      be = ($urandom_range(1, 0) != 0) ? 4'h0 : 4'($urandom);
      wd = $urandom;
      dbus(be, 32'(4 * a), wd, rd, ns);
      if (be == 0) check(rd == dref[a], "dmem read");
      else for (int b = 0; b < 4; b++) if (be[b]) dref[a][8*b +: 8] = wd[8*b +: 8];
    end
    // clock-rate register
    tgl0 = rate_tgl;
    dbus(4'h0, IO_BASE | 32'(IO_CLK_RATE) << 2, 0, rd, ns);
    check(rd == 100, "reset rate reads 100");
    dbus(4'hF, IO_BASE | 32'(IO_CLK_RATE) << 2, 2, rd, ns);
    check(rate_mhz == 2 && rate_tgl != tgl0, "set_clock_rate(2)");
    dbus(4'hF, IO_BASE | 32'(IO_CLK_RATE) << 2, 40, rd, ns);
    check(rate_mhz == 40 && rate_tgl == tgl0, "set_clock_rate(40)");
    dbus(4'h0, IO_BASE | 32'(IO_CLK_RATE) << 2, 0, rd, ns);
    check(rd == 40, "rate reads back");
    // send with room
    dbus(4'hF, IO_BASE | 32'(IO_MSG_TX) << 2, 32'hCAFE_0001, rd, ns);
    check(ns == 0, "send without stall");
    // send into a full FIFO: stalls until room
    tx_ready = 0;
    fork
      begin
        repeat (6) @(negedge clk);
        dbus_status_check();
        tx_ready = 1;
      end
      begin
        dbus(4'hF, IO_BASE | 32'(IO_MSG_TX) << 2, 32'hCAFE_0002, rd, ns);
      end
    join
    check(ns >= 5, $sformatf("send stalled %0d cycles", ns));
    stalls += (ns > 0);
    check(tx_log.size() == 2 && tx_log[0] == 32'hCAFE_0001 && tx_log[1] == 32'hCAFE_0002,
          "each sent word reached the FIFO once");
    // receive with nothing waiting: stalls until a word arrives
    fork
      begin
        repeat (4) @(negedge clk);
        rx_valid = 1; rx_data = 32'hBEEF_0042;
        @(posedge clk);
        while (!rx_ready) @(posedge clk);
        #1 rx_valid = 0;
      end
      begin
        dbus(4'h0, IO_BASE | 32'(IO_MSG_RX) << 2, 0, rd, ns);
      end
    join
    check(ns >= 3, $sformatf("receive stalled %0d cycles", ns));
    stalls += (ns > 0);
    check(rd == 32'hBEEF_0042, "received word");
    dbus(4'h0, IO_BASE | 32'(IO_STATUS) << 2, 0, rd, ns);
    check(rd == 32'h0, "status idle");
    check(stalls == 2, "both stall kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // STATUS is sampled by the tb directly while the processor is stalled
  task automatic dbus_status_check();
    check(d_stall && tx_valid && !tx_ready, "stall raised on full send FIFO");
  endtask
endmodule
