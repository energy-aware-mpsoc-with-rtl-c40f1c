`timescale 1ns/1ps
// Round-robin arbiter: grants one of N requests per cycle, starting the
// search just after the requester granted last, so every requester is
// served within N cycles of asking. Interface: req (N bits) -> gnt
// (one-hot or zero) in the same cycle; the pointer advances on adv.
// A helper of the shared memory, chosen by this implementation.
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic [N-1:0] gnt
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  logic [PW-1:0] last_q;
  logic [PW-1:0] winner;
  logic          found;

  always_comb begin
    found  = 1'b0;
    winner = last_q;
    gnt    = '0;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (32'(last_q) + k) % N;
      if (!found && req[idx]) begin
        found       = 1'b1;
        winner      = PW'(idx);
        gnt[idx]    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            last_q <= PW'(N - 1);
    else if (adv && found) last_q <= winner;
  end
endmodule
