`timescale 1ns/1ps
// N x N Benes switching fabric of the real-time interconnection network.
//
// 2*log2(N)-1 columns of N/2 2x2 switches are wired as a Benes network:
// the first column splits every block of wires into an upper and a lower
// half-size Benes network, recursively, and the last columns merge them
// again (wiring in mpsoc_pkg::benes_link). A Benes network can connect its
// inputs to its outputs in any permutation without two paths sharing a
// wire, so an established circuit never blocks another one and the delay of
// a message through the fabric has a fixed upper bound.
//
// Circuit switching: every switch keeps its mode in a register, written
// through the configuration port (cfg_we, column cfg_stage, switch cfg_idx,
// mode cfg_mode) in the network clock domain. A path then stays set for as
// long as the communication lasts. After reset all switches are straight.
// Data go through the switches without registers: a word offered at an
// input with valid reaches its output(s) in the same cycle and is taken
// when the ready that returns along the path is high.
//
// The Benes topology and 2x2 switches follow the design; the configuration
// register port and the combinational valid/ready path are this
// implementation's choices.
module benes_network
  import mpsoc_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = MSG_W,
  localparam int unsigned S  = 2 * $clog2(N) - 1,
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned IW = (N > 2) ? $clog2(N / 2) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration port
  input  logic          cfg_we,
  input  logic [SW-1:0] cfg_stage,
  input  logic [IW-1:0] cfg_idx,
  input  sw_mode_e      cfg_mode,
  // ports
  input  logic [W-1:0]  in_data  [N],
  input  logic          in_valid [N],
  output logic          in_ready [N],
  output logic [W-1:0]  out_data [N],
  output logic          out_valid[N],
  input  logic          out_ready[N]
);
  sw_mode_e mode_q [S][N/2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < S; s++)
        for (int i = 0; i < N / 2; i++) mode_q[s][i] <= SW_STRAIGHT;
    end else if (cfg_we && (32'(cfg_stage) < S)) begin
      mode_q[cfg_stage][cfg_idx] <= cfg_mode;
    end
  end

  // Each column has its own input and output wires; column s+1 takes its
  // inputs from column s through the Benes links.
  for (genvar s = 0; s < S; s++) begin : g_col
    logic [W-1:0] ci_data [N];
    logic         ci_valid[N];
    logic         ci_ready[N];
    logic [W-1:0] co_data [N];
    logic         co_valid[N];
    logic         co_ready[N];

    if (s == 0) begin : g_first
      for (genvar p = 0; p < N; p++) begin : g_wire
        assign ci_data[p]  = in_data[p];
        assign ci_valid[p] = in_valid[p];
        assign in_ready[p] = ci_ready[p];
      end
    end else begin : g_link
      for (genvar p = 0; p < N; p++) begin : g_wire
        localparam int unsigned Q = benes_link(N, s - 1, p);
        assign ci_data[Q]             = g_col[s-1].co_data[p];
        assign ci_valid[Q]            = g_col[s-1].co_valid[p];
        assign g_col[s-1].co_ready[p] = ci_ready[Q];
      end
    end

    if (s == S - 1) begin : g_last
      for (genvar p = 0; p < N; p++) begin : g_wire
        assign out_data[p]  = co_data[p];
        assign out_valid[p] = co_valid[p];
        assign co_ready[p]  = out_ready[p];
      end
    end

    for (genvar i = 0; i < N / 2; i++) begin : g_sw
      logic [W-1:0] sw_idata [2];
      logic         sw_ivalid[2];
      logic         sw_iready[2];
      logic [W-1:0] sw_odata [2];
      logic         sw_ovalid[2];
      logic         sw_oready[2];
      for (genvar b = 0; b < 2; b++) begin : g_pin
        assign sw_idata[b]      = ci_data[2*i+b];
        assign sw_ivalid[b]     = ci_valid[2*i+b];
        assign ci_ready[2*i+b]  = sw_iready[b];
        assign co_data[2*i+b]   = sw_odata[b];
        assign co_valid[2*i+b]  = sw_ovalid[b];
        assign sw_oready[b]     = co_ready[2*i+b];
      end
      benes_switch #(.W(W)) u_sw (
        .mode     (mode_q[s][i]),
        .in_data  (sw_idata),
        .in_valid (sw_ivalid),
        .in_ready (sw_iready),
        .out_data (sw_odata),
        .out_valid(sw_ovalid),
        .out_ready(sw_oready)
      );
    end
  end
endmodule
