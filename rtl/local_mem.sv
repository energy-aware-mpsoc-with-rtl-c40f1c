`timescale 1ns/1ps
// Local memory of a PMM: the instruction store or the data store.
//
// Each PMM has separate instruction and data memories (Harvard), sized for
// its own task and reachable only by its own processor, which is what gives
// space-sharing its task isolation without a memory management unit. This
// module is one such memory: WORDS 32-bit words with two ports on the PMM
// clock. Port A is the processor's (instruction fetch or data access),
// port B loads the program and initial data and can read back. Each port
// takes en, a byte-write mask be (all zero for a read), a word address and
// write data, and returns the addressed word one clock later. When both
// ports write the same word in one cycle, port A wins.
//
// Harvard split and per-task sizing follow the design; the default size of
// 2048 words (8 KB, half of a 16 KB PMM memory), the two-port organisation
// and the one-cycle read latency are this implementation's choices.
module local_mem #(
  parameter int unsigned WORDS = 2048,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: processor
  input  logic          a_en,
  input  logic [3:0]    a_be,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: loader
  input  logic          b_en,
  input  logic [3:0]    b_be,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      if (b_en && b_be[b] && !(a_en && a_be[b] && a_addr == b_addr))
        mem[b_addr][8*b +: 8] <= b_wdata[8*b +: 8];
      if (a_en && a_be[b])
        mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
    end
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
