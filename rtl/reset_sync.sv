`timescale 1ns/1ps
// Reset synchroniser: asserts its reset output as soon as the asynchronous
// reset input goes low and releases it two clock edges after the input goes
// high, so every clock domain of the MPSoC leaves reset on its own clock.
// Interface: clk, arst_n (asynchronous, active low) -> rst_n (active low).
// This helper is an implementation choice; the design does not describe
// its reset scheme.
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic [1:0] sync_q;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sync_q <= 2'b00;
    else         sync_q <= {sync_q[0], 1'b1};
  end

  assign rst_n = sync_q[1];
endmodule
