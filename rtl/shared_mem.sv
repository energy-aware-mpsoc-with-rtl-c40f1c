`timescale 1ns/1ps
// On-chip shared memory of the MPSoC.
//
// One single-port memory of WORDS 32-bit words that all N requesters (one
// per PMM) can read and write, for data that several tasks use. A
// round-robin arbiter serves one request per clock, so a requester waits at
// most N-1 cycles while the others all ask: a bounded access time, as real
// time needs. Per requester i: req, byte mask be (zero for a read), word
// address addr, wdata; gnt is high in the cycle the request is taken (the
// requester keeps req until then), and for a read rvalid and rdata follow
// one clock after gnt. All ports share the clock clk.
//
// That the chip has an on-chip shared memory follows the design; its size,
// the arbitration and the port protocol are this implementation's choices.
module shared_mem #(
  parameter int unsigned N     = 8,
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req  [N],
  input  logic [3:0]    be   [N],
  input  logic [AW-1:0] addr [N],
  input  logic [31:0]   wdata[N],
  output logic          gnt  [N],
  output logic          rvalid[N],
  output logic [31:0]   rdata
);
  logic [31:0]   mem [WORDS];
  logic [N-1:0]  req_v, gnt_v;
  logic          any;
  logic [3:0]    sel_be;
  logic [AW-1:0] sel_addr;
  logic [31:0]   sel_wdata;

  for (genvar i = 0; i < N; i++) begin : g_req
    assign req_v[i] = req[i];
    assign gnt[i]   = gnt_v[i];
  end

  rr_arbiter #(.N(N)) u_arb (
    .clk  (clk),
    .rst_n(rst_n),
    .req  (req_v),
    .adv  (1'b1),
    .gnt  (gnt_v)
  );

  always_comb begin
    any       = 1'b0;
    sel_be    = '0;
    sel_addr  = '0;
    sel_wdata = '0;
    for (int i = 0; i < N; i++) begin
      if (gnt_v[i]) begin
        any       = 1'b1;
        sel_be    = be[i];
        sel_addr  = addr[i];
        sel_wdata = wdata[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++)
      if (any && sel_be[b]) mem[sel_addr][8*b +: 8] <= sel_wdata[8*b +: 8];
    if (any && sel_be == 4'b0000) rdata <= mem[sel_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) rvalid[i] <= 1'b0;
    end else begin
      for (int i = 0; i < N; i++) rvalid[i] <= gnt_v[i] && (be[i] == 4'b0000);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_v));
endmodule
