`timescale 1ns/1ps
// Clock rate controller: one clock generator, one divider per PMM and one
// for the interconnection network.
//
// The master oscillator clock (osc_clk) feeds the clock generator, whose
// output gen_clk is common to all dividers. Each PMM has its own divider,
// set by its processor through rate_mhz/rate_tgl (see clock_divider), so
// every task runs just as fast as its deadlines need and no faster: the
// dynamic power of a PMM falls with its clock rate. The network has a
// divider of its own, set through net_rate_mhz/net_rate_tgl, since its
// power, too, grows with its clock rate.
//
// Reset: rst_n is asynchronous; the generator-domain reset gen_rst_n is
// released two gen_clk edges after rst_n is high. As the generator clock
// runs only once the generator has locked, this is after lock. The dividers start at PMM_RESET_MHZ and NET_RESET_MHZ.
// cur_rate and net_cur_rate report the rates in force (gen_clk domain).
//
// clock_generator is a behavioural model; to synthesise this module,
// replace it with the target's clock-manager primitive, which has the
// same ports. Everything else here is synthesisable.
//
// Generator plus one divider per PMM follows the design; the divider for
// the network clock, the generator frequency and the reset rates are this
// implementation's choices.
module clock_rate_ctrl
  import mpsoc_pkg::*;
#(
  parameter int unsigned N_PMM         = 8,
  parameter int unsigned GEN_MULT      = 2,
  parameter int unsigned F_GEN_MHZ     = 200,
  parameter int unsigned PMM_RESET_MHZ = 100,
  parameter int unsigned NET_RESET_MHZ = 100
) (
  input  logic              osc_clk,
  input  logic              rst_n,
  output logic              gen_clk,
  output logic              gen_rst_n,
  output logic              locked,
  // per-PMM rate requests and clocks
  input  logic [RATE_W-1:0] rate_mhz [N_PMM],
  input  logic              rate_tgl [N_PMM],
  output logic              pmm_clk  [N_PMM],
  output logic [RATE_W-1:0] cur_rate [N_PMM],
  // network rate request and clock
  input  logic [RATE_W-1:0] net_rate_mhz,
  input  logic              net_rate_tgl,
  output logic              net_clk,
  output logic [RATE_W-1:0] net_cur_rate
);
  clock_generator #(.MULT(GEN_MULT), .DIV(1)) u_gen (
    .clk_in (osc_clk),
    .rst    (!rst_n),
    .clk_out(gen_clk),
    .locked (locked)
  );

  reset_sync u_gen_rst (
    .clk   (gen_clk),
    .arst_n(rst_n),
    .rst_n (gen_rst_n)
  );

  for (genvar i = 0; i < N_PMM; i++) begin : g_div
    logic unused_en;
    clock_divider #(.F_GEN_MHZ(F_GEN_MHZ), .RESET_RATE_MHZ(PMM_RESET_MHZ)) u_div (
      .gen_clk (gen_clk),
      .rst_n   (gen_rst_n),
      .rate_mhz(rate_mhz[i]),
      .rate_tgl(rate_tgl[i]),
      .div_clk (pmm_clk[i]),
      .clk_en  (unused_en),
      .cur_rate(cur_rate[i])
    );
  end

  logic net_unused_en;
  clock_divider #(.F_GEN_MHZ(F_GEN_MHZ), .RESET_RATE_MHZ(NET_RESET_MHZ)) u_net_div (
    .gen_clk (gen_clk),
    .rst_n   (gen_rst_n),
    .rate_mhz(net_rate_mhz),
    .rate_tgl(net_rate_tgl),
    .div_clk (net_clk),
    .clk_en  (net_unused_en),
    .cur_rate(net_cur_rate)
  );
endmodule
