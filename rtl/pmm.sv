`timescale 1ns/1ps
// Processor-memory module (PMM) without its processor.
//
// In space-sharing every task runs on a PMM of its own. This module is all
// of a PMM except the soft-core processor, whose instruction and data buses
// are its ports: the local instruction memory, the local data memory, the
// processor's clock-rate register and the processor's end of the message
// link to the interconnection network. Everything runs on the PMM's own
// clock, the output of its clock divider.
//
// Instruction bus: i_req with byte address i_addr; i_rdata is valid
// (i_rvalid) one clock later. Data bus: d_req, byte mask d_be (zero for a
// read), byte address d_addr, d_wdata; read data come back one clock later
// with d_rvalid. Addresses with bit 31 clear go to the data memory (word
// address wraps at its size). Addresses with bit 31 set are I/O registers
// selected by d_addr[5:2]:
//   0 CLK_RATE  R/W  clock rate of this PMM in MHz (bits 7:0)
//   1 MSG_TX    W    send one message word into the network
//   2 MSG_RX    R    take one received message word
//   3 STATUS    R    bit0: send FIFO full, bit1: received word waiting
// A send while the FIFO is full or a receive while nothing waits raises
// d_stall in that cycle and does nothing: the processor holds the request
// until d_stall falls (blocking send and receive). A write to CLK_RATE
// flips rate_tgl with rate_mhz held, which the clock divider picks up a
// few generator cycles later. Loader port: ld_sel picks the instruction (0)
// or data (1) memory, otherwise as the data bus, for the memories only.
//
// Local Harvard memories, the software-set clock rate and message passing
// through the network follow the design; the address map, the blocking
// send and receive and the loader port are this implementation's choices.
module pmm
  import mpsoc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS     = 2048,
  parameter int unsigned DMEM_WORDS     = 2048,
  parameter int unsigned RESET_RATE_MHZ = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor instruction bus
  input  logic              i_req,
  input  logic [31:0]       i_addr,
  output logic [31:0]       i_rdata,
  output logic              i_rvalid,
  // processor data bus
  input  logic              d_req,
  input  logic [3:0]        d_be,
  input  logic [31:0]       d_addr,
  input  logic [31:0]       d_wdata,
  output logic [31:0]       d_rdata,
  output logic              d_rvalid,
  output logic              d_stall,
  // program loader
  input  logic              ld_req,
  input  logic              ld_sel,
  input  logic [3:0]        ld_be,
  input  logic [31:0]       ld_addr,
  input  logic [31:0]       ld_wdata,
  output logic [31:0]       ld_rdata,
  output logic              ld_rvalid,
  // clock-rate request to the clock divider
  output logic [RATE_W-1:0] rate_mhz,
  output logic              rate_tgl,
  // message link, send and receive side of the network FIFOs
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [MSG_W-1:0]  tx_data,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  logic [MSG_W-1:0]  rx_data
);
  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  // ---------------- address decode ----------------
  logic       is_io;
  logic [3:0] io_sel;
  logic       is_wr;
  logic       dmem_en, io_acc;

  assign is_io  = d_addr[31];
  assign io_sel = d_addr[5:2];
  assign is_wr  = (d_be != 4'b0000);

  assign tx_valid = d_req && is_io && is_wr && (io_sel == IO_MSG_TX);
  assign tx_data  = d_wdata;
  assign rx_ready = d_req && is_io && !is_wr && (io_sel == IO_MSG_RX);
  assign d_stall  = (tx_valid && !tx_ready) || (rx_ready && !rx_valid);

  assign dmem_en = d_req && !is_io;
  assign io_acc  = d_req && is_io && !d_stall;

  // ---------------- memories ----------------
  logic [31:0] dmem_rdata, ld_irdata, ld_drdata;
  logic        ld_sel_q;

  local_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk    (clk),
    .a_en   (i_req),
    .a_be   (4'b0000),
    .a_addr (i_addr[IAW+1:2]),
    .a_wdata(32'h0),
    .a_rdata(i_rdata),
    .b_en   (ld_req && !ld_sel),
    .b_be   (ld_be),
    .b_addr (ld_addr[IAW+1:2]),
    .b_wdata(ld_wdata),
    .b_rdata(ld_irdata)
  );

  local_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk    (clk),
    .a_en   (dmem_en),
    .a_be   (d_be),
    .a_addr (d_addr[DAW+1:2]),
    .a_wdata(d_wdata),
    .a_rdata(dmem_rdata),
    .b_en   (ld_req && ld_sel),
    .b_be   (ld_be),
    .b_addr (ld_addr[DAW+1:2]),
    .b_wdata(ld_wdata),
    .b_rdata(ld_drdata)
  );

  // ---------------- I/O registers ----------------
  logic [31:0] io_rdata_q;
  logic        io_rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rate_mhz   <= RATE_W'(RESET_RATE_MHZ);
      rate_tgl   <= 1'b0;
      io_rdata_q <= '0;
      io_rd_q    <= 1'b0;
      i_rvalid   <= 1'b0;
      d_rvalid   <= 1'b0;
      ld_rvalid  <= 1'b0;
      ld_sel_q   <= 1'b0;
    end else begin
      i_rvalid  <= i_req;
      d_rvalid  <= (dmem_en || io_acc) && !is_wr;
      io_rd_q   <= io_acc;
      ld_rvalid <= ld_req && (ld_be == 4'b0000);
      ld_sel_q  <= ld_sel;
      if (io_acc && is_wr && io_sel == IO_CLK_RATE) begin
        rate_mhz <= d_wdata[RATE_W-1:0];
        rate_tgl <= !rate_tgl;
      end
      if (io_acc && !is_wr) begin
        unique case (io_sel)
          IO_CLK_RATE: io_rdata_q <= 32'(rate_mhz);
          IO_MSG_RX:   io_rdata_q <= rx_data;
          IO_STATUS:   io_rdata_q <= {30'd0, rx_valid, !tx_ready};
          default:     io_rdata_q <= '0;
        endcase
      end
    end
  end

  assign d_rdata  = io_rd_q ? io_rdata_q : dmem_rdata;
  assign ld_rdata = ld_sel_q ? ld_drdata : ld_irdata;

  // A processor must hold a stalled request unchanged.
  property p_stall_hold;
    @(posedge clk) disable iff (!rst_n)
      (d_req && d_stall) |=> (d_req && $stable(d_addr) && $stable(d_be));
  endproperty
  a_stall_hold: assume property (p_stall_hold);
endmodule
