`timescale 1ns/1ps
// Individual clock divider of one PMM (or of the network).
//
// The processor program sets the clock rate of its own PMM in MHz, as a
// set_clock_rate(2) or set_clock_rate(40) call does. The divider turns the
// common generator clock of F_GEN_MHZ into a clock of that rate with a
// fractional (phase-accumulator) divider: every generator cycle it adds
// 2*rate to an accumulator and, each time the sum reaches F_GEN_MHZ,
// subtracts F_GEN_MHZ and toggles the output clock. Over time the output
// therefore makes exactly `rate` cycles per microsecond, for any integer
// rate from 1 to F_GEN_MHZ/2, with at most one generator cycle of jitter
// on each edge. The output clock comes straight from a flip-flop.
//
// The rate is handed over from the requesting clock domain with a toggle
// handshake: the requester holds rate_mhz stable and flips rate_tgl; the
// divider synchronises rate_tgl with two flip-flops and loads rate_mhz on
// every change. A rate of 0 or above F_GEN_MHZ/2 is ignored. After reset
// the rate is RESET_RATE_MHZ. clk_en is a one-generator-cycle pulse at
// every rising edge of the output clock, for logic in the generator domain.
//
// Programmable per-PMM division set by software follows the design; the
// phase-accumulator method, the MHz-valued register and the toggle
// handshake are this implementation's choices.
module clock_divider
  import mpsoc_pkg::*;
#(
  parameter int unsigned F_GEN_MHZ      = 200,
  parameter int unsigned RESET_RATE_MHZ = 100,
  localparam int unsigned ACC_W         = $clog2(2 * F_GEN_MHZ + 1)
) (
  input  logic              gen_clk,
  input  logic              rst_n,
  input  logic [RATE_W-1:0] rate_mhz,
  input  logic              rate_tgl,
  output logic              div_clk,
  output logic              clk_en,
  output logic [RATE_W-1:0] cur_rate
);
  logic [2:0]       tgl_sync_q;
  logic [ACC_W-1:0] acc_q;
  logic [ACC_W-1:0] acc_sum;
  logic             wrap;

  always_ff @(posedge gen_clk or negedge rst_n) begin
    if (!rst_n) begin
      tgl_sync_q <= '0;
      cur_rate   <= RATE_W'(RESET_RATE_MHZ);
    end else begin
      tgl_sync_q <= {tgl_sync_q[1:0], rate_tgl};
      if ((tgl_sync_q[2] != tgl_sync_q[1]) && (rate_mhz != '0) &&
          (32'(rate_mhz) <= F_GEN_MHZ / 2))
        cur_rate <= rate_mhz;
    end
  end

  assign acc_sum = acc_q + ACC_W'(2 * 32'(cur_rate));
  assign wrap    = (acc_sum >= ACC_W'(F_GEN_MHZ));

  always_ff @(posedge gen_clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      div_clk <= 1'b0;
      clk_en  <= 1'b0;
    end else begin
      acc_q   <= wrap ? acc_sum - ACC_W'(F_GEN_MHZ) : acc_sum;
      div_clk <= div_clk ^ wrap;
      clk_en  <= wrap && !div_clk;
    end
  end

  initial begin
    assert (RESET_RATE_MHZ >= 1 && RESET_RATE_MHZ <= F_GEN_MHZ / 2)
      else $error("clock_divider: RESET_RATE_MHZ out of range");
  end
endmodule
