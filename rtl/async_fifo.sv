`timescale 1ns/1ps
// Dual-clock message FIFO at a network port.
//
// Every PMM and the network run on clocks of their own, so a message word
// crosses a clock boundary when it enters the network. The FIFO decouples
// the sender, which writes at the rate of its own clock, from the network,
// which reads at the network clock rate, and absorbs bursts while the two
// rates differ. It is the classic pointer-synchronising design: binary
// read and write pointers one bit wider than the address, converted to Gray
// code and passed to the other clock domain through two flip-flops; full and
// empty are computed on each side from its own pointer and the synchronised
// Gray pointer of the other side.
//
// Write side (wclk): w_valid/w_ready/w_data, a word is written when both
// are high. Read side (rclk): r_valid/r_ready/r_data, r_data shows the
// oldest word while r_valid is high (first-word fall-through from the
// storage array) and is popped when r_ready is high. A written word is seen
// on the read side three read-clock edges later at most.
//
// That a FIFO sits at each network input follows the design; its depth
// (DEPTH, a power of two) and the Gray-pointer scheme are this
// implementation's choices.
module async_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         w_valid,
  output logic         w_ready,
  input  logic [W-1:0] w_data,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         r_valid,
  input  logic         r_ready,
  output logic [W-1:0] r_data
);
  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] wgray_s1, wgray_s2;  // write pointer in read domain
  logic [AW:0] rgray_s1, rgray_s2;  // read pointer in write domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic        do_write;
  logic [AW:0] wbin_next;

  assign w_ready   = (wgray_q != {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
  assign do_write  = w_valid && w_ready;
  assign wbin_next = wbin_q + (AW+1)'(do_write);

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin_q[AW-1:0]] <= w_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      wbin_q   <= wbin_next;
      wgray_q  <= bin2gray(wbin_next);
      rgray_s1 <= rgray_q;
      rgray_s2 <= rgray_s1;
    end
  end

  // ---------------- read domain ----------------
  logic        do_read;
  logic [AW:0] rbin_next;

  assign r_valid   = (rgray_q != wgray_s2);
  assign r_data    = mem[rbin_q[AW-1:0]];
  assign do_read   = r_valid && r_ready;
  assign rbin_next = rbin_q + (AW+1)'(do_read);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      rbin_q   <= rbin_next;
      rgray_q  <= bin2gray(rbin_next);
      wgray_s1 <= wgray_q;
      wgray_s2 <= wgray_s1;
    end
  end

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_fifo: DEPTH must be a power of two of at least 4");
  end
endmodule
