`timescale 1ns/1ps
// Shared constants, types and wiring functions of the space-sharing MPSoC.
//
// The MPSoC puts every task on its own processor-memory module (PMM) and
// couples the PMMs with a circuit-switched Benes network of 2x2 switches.
// This package holds what several modules agree on: the message width, the
// 2x2 switch modes (straight, cross and the two broadcast modes used for
// multicast), the Benes stage count and the inter-stage wiring, and the
// address map of the PMM's I/O registers.
//
// The Benes network and the 2x2 switch follow the design; the 32-bit message
// word (the width of the 32-bit soft processor), the mode encoding and the
// I/O address map are this implementation's own choices.
package mpsoc_pkg;

  // Message word carried by the network: one 32-bit processor word.
  localparam int unsigned MSG_W = 32;

  // Width of a clock-rate value in MHz (rates 1..255 MHz).
  localparam int unsigned RATE_W = 8;

  // Circuit setting of one 2x2 switch.
  typedef enum logic [1:0] {
    SW_STRAIGHT = 2'd0,  // in0 -> out0, in1 -> out1
    SW_CROSS    = 2'd1,  // in0 -> out1, in1 -> out0
    SW_BCAST0   = 2'd2,  // in0 -> out0 and out1 (broadcast of upper input)
    SW_BCAST1   = 2'd3   // in1 -> out0 and out1 (broadcast of lower input)
  } sw_mode_e;

  // PMM data-bus I/O space: addresses with bit 31 set.
  localparam logic [31:0] IO_BASE       = 32'h8000_0000;
  localparam logic [3:0]  IO_CLK_RATE   = 4'h0;  // R/W: processor clock rate in MHz
  localparam logic [3:0]  IO_MSG_TX     = 4'h1;  // W  : send a message word (stalls when full)
  localparam logic [3:0]  IO_MSG_RX     = 4'h2;  // R  : receive a message word (stalls when empty)
  localparam logic [3:0]  IO_STATUS     = 4'h3;  // R  : bit0 tx full, bit1 rx available

  // Number of switch columns of an N-port Benes network: 2*log2(N)-1.
  function automatic int unsigned benes_stages(input int unsigned n);
    return 2 * $clog2(n) - 1;
  endfunction

  // Position, at the input of column s+1, of the wire that leaves column s
  // at position p. In the input half (s < log2(N)-1) every block of M=N>>s
  // wires is unshuffled: the upper output of switch i feeds the upper
  // sub-network at i, the lower output feeds the lower sub-network at i.
  // In the output half the blocks are shuffled back, the mirror image.
  function automatic int unsigned benes_link(input int unsigned n,
                                             input int unsigned s,
                                             input int unsigned p);
    int unsigned l, m, base, loc, k;
    l = $clog2(n);
    if (s < l - 1) begin
      m    = n >> s;
      base = p & ~(m - 1);
      loc  = p & (m - 1);
      return base + (loc >> 1) + (loc & 1) * (m / 2);
    end else begin
      k    = 2 * l - 2 - (s + 1);
      m    = n >> k;
      base = p & ~(m - 1);
      loc  = p & (m - 1);
      return base + 2 * (loc & (m / 2 - 1)) + ((loc >= m / 2) ? 1 : 0);
    end
  endfunction

endpackage
