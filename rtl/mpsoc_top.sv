`timescale 1ns/1ps
// Space-sharing MPSoC with individually clocked processor-memory modules.
//
// Instead of time-sharing one processor among many tasks, every task gets a
// processor-memory module (PMM) of its own, so no schedule has to be found
// and checked. Each PMM runs at the clock rate its task needs, set by its
// own software, which cuts dynamic power where a task has time to spare.
// This top level holds N_PMM PMMs (local instruction and data memories,
// clock-rate register, message port), each with memories sized for its own
// task through the IMEM_WORDS and DMEM_WORDS arrays, the clock rate controller (clock
// generator plus one divider per PMM and one for the network), the
// non-blocking Benes interconnection network with its message FIFOs, and
// the on-chip shared memory.
//
// The soft-core processors are not part of this RTL: the instruction bus,
// data bus and loader port of every PMM are top-level ports, each in the
// domain of that PMM's clock, which is brought out as pmm_clk[i]. The
// network's configuration port is in the net_clk domain and the shared
// memory's ports in the gen_clk domain; both clocks are brought out too.
// osc_clk is the master oscillator input; rst_n is an asynchronous reset.
// rst_n resets every clock domain at once; each domain leaves reset two
// edges of its own clock after rst_n rises. A divided clock starts only
// after the generator has locked and the dividers have left reset, so the
// PMMs and the network leave reset after the clock rate controller.
//
// clock_generator is a behavioural model; to synthesise this module,
// replace it with the target's clock-manager primitive, which has the
// same ports. Everything else here is synthesisable.
//
// The parts and how they connect follow the design; the clock domains of
// the network configuration port and of the shared memory, and every
// detail listed as a choice in the sub-modules, are this implementation's.
module mpsoc_top
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_PMM          = 8,
  // local memory sizes in 32-bit words, one entry per PMM
  parameter int unsigned IMEM_WORDS [N_PMM] = '{default: 2048},
  parameter int unsigned DMEM_WORDS [N_PMM] = '{default: 2048},
  parameter int unsigned SHMEM_WORDS    = 4096,
  parameter int unsigned FIFO_DEPTH     = 16,
  parameter int unsigned GEN_MULT       = 2,
  parameter int unsigned F_GEN_MHZ      = 200,
  parameter int unsigned PMM_RESET_MHZ  = 100,
  parameter int unsigned NET_RESET_MHZ  = 100,
  localparam int unsigned S   = 2 * $clog2(N_PMM) - 1,
  localparam int unsigned SW  = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned IW  = (N_PMM > 2) ? $clog2(N_PMM / 2) : 1,
  localparam int unsigned SAW = $clog2(SHMEM_WORDS)
) (
  input  logic              osc_clk,
  input  logic              rst_n,
  output logic              gen_clk,
  output logic              locked,
  output logic              pmm_clk  [N_PMM],
  output logic              net_clk,
  // processor instruction buses (pmm_clk[i])
  input  logic              i_req    [N_PMM],
  input  logic [31:0]       i_addr   [N_PMM],
  output logic [31:0]       i_rdata  [N_PMM],
  output logic              i_rvalid [N_PMM],
  // processor data buses (pmm_clk[i])
  input  logic              d_req    [N_PMM],
  input  logic [3:0]        d_be     [N_PMM],
  input  logic [31:0]       d_addr   [N_PMM],
  input  logic [31:0]       d_wdata  [N_PMM],
  output logic [31:0]       d_rdata  [N_PMM],
  output logic              d_rvalid [N_PMM],
  output logic              d_stall  [N_PMM],
  // program loader ports (pmm_clk[i])
  input  logic              ld_req   [N_PMM],
  input  logic              ld_sel   [N_PMM],
  input  logic [3:0]        ld_be    [N_PMM],
  input  logic [31:0]       ld_addr  [N_PMM],
  input  logic [31:0]       ld_wdata [N_PMM],
  output logic [31:0]       ld_rdata [N_PMM],
  output logic              ld_rvalid[N_PMM],
  // clock rates in force (gen_clk)
  output logic [RATE_W-1:0] cur_rate [N_PMM],
  output logic [RATE_W-1:0] net_cur_rate,
  // network clock rate request (toggle handshake)
  input  logic [RATE_W-1:0] net_rate_mhz,
  input  logic              net_rate_tgl,
  // network circuit configuration (net_clk)
  input  logic              cfg_we,
  input  logic [SW-1:0]     cfg_stage,
  input  logic [IW-1:0]     cfg_idx,
  input  logic [1:0]        cfg_mode,
  // shared memory ports (gen_clk)
  input  logic              sh_req   [N_PMM],
  input  logic [3:0]        sh_be    [N_PMM],
  input  logic [SAW-1:0]    sh_addr  [N_PMM],
  input  logic [31:0]       sh_wdata [N_PMM],
  output logic              sh_gnt   [N_PMM],
  output logic              sh_rvalid[N_PMM],
  output logic [31:0]       sh_rdata
);
  logic              gen_rst_n;
  logic              net_rst_n;
  logic              pmm_rst_n[N_PMM];
  logic [RATE_W-1:0] rate_mhz [N_PMM];
  logic              rate_tgl [N_PMM];
  logic              tx_valid [N_PMM];
  logic              tx_ready [N_PMM];
  logic [MSG_W-1:0]  tx_data  [N_PMM];
  logic              rx_valid [N_PMM];
  logic              rx_ready [N_PMM];
  logic [MSG_W-1:0]  rx_data  [N_PMM];

  clock_rate_ctrl #(
    .N_PMM        (N_PMM),
    .GEN_MULT     (GEN_MULT),
    .F_GEN_MHZ    (F_GEN_MHZ),
    .PMM_RESET_MHZ(PMM_RESET_MHZ),
    .NET_RESET_MHZ(NET_RESET_MHZ)
  ) u_clk (
    .osc_clk     (osc_clk),
    .rst_n       (rst_n),
    .gen_clk     (gen_clk),
    .gen_rst_n   (gen_rst_n),
    .locked      (locked),
    .rate_mhz    (rate_mhz),
    .rate_tgl    (rate_tgl),
    .pmm_clk     (pmm_clk),
    .cur_rate    (cur_rate),
    .net_rate_mhz(net_rate_mhz),
    .net_rate_tgl(net_rate_tgl),
    .net_clk     (net_clk),
    .net_cur_rate(net_cur_rate)
  );

  reset_sync u_net_rst (.clk(net_clk), .arst_n(rst_n), .rst_n(net_rst_n));

  for (genvar i = 0; i < N_PMM; i++) begin : g_pmm
    reset_sync u_rst (.clk(pmm_clk[i]), .arst_n(rst_n), .rst_n(pmm_rst_n[i]));

    pmm #(
      .IMEM_WORDS    (IMEM_WORDS[i]),
      .DMEM_WORDS    (DMEM_WORDS[i]),
      .RESET_RATE_MHZ(PMM_RESET_MHZ)
    ) u_pmm (
      .clk      (pmm_clk[i]),
      .rst_n    (pmm_rst_n[i]),
      .i_req    (i_req[i]),
      .i_addr   (i_addr[i]),
      .i_rdata  (i_rdata[i]),
      .i_rvalid (i_rvalid[i]),
      .d_req    (d_req[i]),
      .d_be     (d_be[i]),
      .d_addr   (d_addr[i]),
      .d_wdata  (d_wdata[i]),
      .d_rdata  (d_rdata[i]),
      .d_rvalid (d_rvalid[i]),
      .d_stall  (d_stall[i]),
      .ld_req   (ld_req[i]),
      .ld_sel   (ld_sel[i]),
      .ld_be    (ld_be[i]),
      .ld_addr  (ld_addr[i]),
      .ld_wdata (ld_wdata[i]),
      .ld_rdata (ld_rdata[i]),
      .ld_rvalid(ld_rvalid[i]),
      .rate_mhz (rate_mhz[i]),
      .rate_tgl (rate_tgl[i]),
      .tx_valid (tx_valid[i]),
      .tx_ready (tx_ready[i]),
      .tx_data  (tx_data[i]),
      .rx_valid (rx_valid[i]),
      .rx_ready (rx_ready[i]),
      .rx_data  (rx_data[i])
    );
  end

  rt_network #(.N(N_PMM), .W(MSG_W), .FIFO_DEPTH(FIFO_DEPTH)) u_net (
    .pmm_clk  (pmm_clk),
    .pmm_rst_n(pmm_rst_n),
    .tx_valid (tx_valid),
    .tx_ready (tx_ready),
    .tx_data  (tx_data),
    .rx_valid (rx_valid),
    .rx_ready (rx_ready),
    .rx_data  (rx_data),
    .net_clk  (net_clk),
    .net_rst_n(net_rst_n),
    .cfg_we   (cfg_we),
    .cfg_stage(cfg_stage),
    .cfg_idx  (cfg_idx),
    .cfg_mode (sw_mode_e'(cfg_mode))
  );

  shared_mem #(.N(N_PMM), .WORDS(SHMEM_WORDS)) u_shmem (
    .clk   (gen_clk),
    .rst_n (gen_rst_n),
    .req   (sh_req),
    .be    (sh_be),
    .addr  (sh_addr),
    .wdata (sh_wdata),
    .gnt   (sh_gnt),
    .rvalid(sh_rvalid),
    .rdata (sh_rdata)
  );
endmodule
