`timescale 1ns/1ps
// Non-blocking real-time interconnection network.
//
// Links the PMMs point to point (and by multicast or broadcast) for
// inter-task messages. The network runs on its own clock, asynchronously to
// the PMM clocks. Each network input has a dual-clock message FIFO that a
// PMM fills at its own clock rate and the network empties at the network
// clock rate; each output has one that the network fills and the receiving
// PMM empties. Between them is a Benes fabric of 2x2 switches in circuit
// switching mode: the configuration port sets up the paths once, and a word
// then moves from an input FIFO to its output FIFO(s) in one network clock
// cycle whenever the input FIFO has a word and every destination FIFO has
// room. Because the fabric is non-blocking and every circuit is private,
// the transfer time of a message is bounded independently of the traffic
// of the other tasks.
//
// Ports: per PMM i, tx_* (write side of input FIFO i) and rx_* (read side of
// output FIFO i), both on pmm_clk[i] with pmm_rst_n[i]; the fabric's
// configuration port on net_clk with net_rst_n.
//
// The input FIFOs, the Benes fabric and circuit switching follow the
// design; the output FIFOs, which take words back into the receiving PMM's
// clock domain, and FIFO_DEPTH are this implementation's choices.
module rt_network
  import mpsoc_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned W          = MSG_W,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned S  = 2 * $clog2(N) - 1,
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned IW = (N > 2) ? $clog2(N / 2) : 1
) (
  input  logic          pmm_clk  [N],
  input  logic          pmm_rst_n[N],
  input  logic          tx_valid [N],
  output logic          tx_ready [N],
  input  logic [W-1:0]  tx_data  [N],
  output logic          rx_valid [N],
  input  logic          rx_ready [N],
  output logic [W-1:0]  rx_data  [N],
  input  logic          net_clk,
  input  logic          net_rst_n,
  input  logic          cfg_we,
  input  logic [SW-1:0] cfg_stage,
  input  logic [IW-1:0] cfg_idx,
  input  sw_mode_e      cfg_mode
);
  logic [W-1:0] fi_data [N];
  logic         fi_valid[N];
  logic         fi_ready[N];
  logic [W-1:0] fo_data [N];
  logic         fo_valid[N];
  logic         fo_ready[N];

  for (genvar i = 0; i < N; i++) begin : g_port
    async_fifo #(.W(W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
      .wclk   (pmm_clk[i]),
      .wrst_n (pmm_rst_n[i]),
      .w_valid(tx_valid[i]),
      .w_ready(tx_ready[i]),
      .w_data (tx_data[i]),
      .rclk   (net_clk),
      .rrst_n (net_rst_n),
      .r_valid(fi_valid[i]),
      .r_ready(fi_ready[i]),
      .r_data (fi_data[i])
    );

    async_fifo #(.W(W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
      .wclk   (net_clk),
      .wrst_n (net_rst_n),
      .w_valid(fo_valid[i]),
      .w_ready(fo_ready[i]),
      .w_data (fo_data[i]),
      .rclk   (pmm_clk[i]),
      .rrst_n (pmm_rst_n[i]),
      .r_valid(rx_valid[i]),
      .r_ready(rx_ready[i]),
      .r_data (rx_data[i])
    );
  end

  benes_network #(.N(N), .W(W)) u_fabric (
    .clk      (net_clk),
    .rst_n    (net_rst_n),
    .cfg_we   (cfg_we),
    .cfg_stage(cfg_stage),
    .cfg_idx  (cfg_idx),
    .cfg_mode (cfg_mode),
    .in_data  (fi_data),
    .in_valid (fi_valid),
    .in_ready (fi_ready),
    .out_data (fo_data),
    .out_valid(fo_valid),
    .out_ready(fo_ready)
  );
endmodule
