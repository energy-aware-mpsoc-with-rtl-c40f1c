`timescale 1ns/1ps
// Behavioural model of the clock generator (a frequency synthesiser such as
// an FPGA clock manager); it is not synthesizable logic.
//
// The generator takes the master oscillator clock and produces the common
// clock that all per-PMM clock dividers divide down. The model measures the
// period of clk_in between two rising edges, waits LOCK_CYCLES input cycles
// and then produces clk_out at clk_in * MULT / DIV with a 50 % duty cycle,
// raising locked at the same time. While rst is high, or before lock,
// clk_out is low and locked is low. It follows the input frequency only at
// lock time, as a real synthesiser that is reset after a frequency change.
//
// That a clock generator feeds all dividers follows the design; the
// multiplication factor (100 MHz oscillator to a 200 MHz generator clock,
// so that the dividers can produce any integer rate up to 100 MHz) is this
// implementation's choice.
module clock_generator #(
  parameter int unsigned MULT        = 2,
  parameter int unsigned DIV         = 1,
  parameter int unsigned LOCK_CYCLES = 8
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out,
  output logic locked
);
  realtime t_last, period_in;
  int unsigned n_edges;

  initial begin
    clk_out   = 1'b0;
    locked    = 1'b0;
    n_edges   = 0;
    t_last    = 0;
    period_in = 0;
  end

  // Measure the input clock and count cycles towards lock.
  always @(posedge clk_in or posedge rst) begin
    if (rst) begin
      n_edges = 0;
      locked  = 1'b0;
    end else begin
      if (n_edges > 0) period_in = $realtime - t_last;
      t_last = $realtime;
      if (n_edges < LOCK_CYCLES) n_edges = n_edges + 1;
      else locked = 1'b1;
    end
  end

  // Synthesise the output clock once locked.
  always begin
    if (locked && period_in > 0) begin
      clk_out = 1'b1;
      #(period_in * DIV / (2.0 * MULT));
      clk_out = 1'b0;
      #(period_in * DIV / (2.0 * MULT));
    end else begin
      clk_out = 1'b0;
      @(posedge locked);
    end
  end
endmodule
