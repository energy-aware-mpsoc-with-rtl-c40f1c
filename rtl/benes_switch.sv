`timescale 1ns/1ps
// 2x2 circuit switch, the building element of the Benes network.
//
// The switch holds no data: it connects its two inputs to its two outputs as
// its mode says, so a message word passes through in the same cycle. The
// modes are straight, cross and broadcast of either input to both outputs;
// the broadcast modes give the network its multicast and broadcast paths.
// Each path carries a data word with a valid bit forward and a ready bit
// backward. In a broadcast mode the source is ready only when both
// destinations are ready, and each destination sees valid only when the
// other one is ready too, so a multicast word is taken by all its receivers
// in the same cycle or by none of them. An input that a broadcast mode
// leaves unconnected sees ready low: it has no circuit.
//
// Straight/cross/broadcast follow the design; the valid/ready flow control
// and the mode encoding are this implementation's choices.
module benes_switch
  import mpsoc_pkg::*;
#(
  parameter int unsigned W = MSG_W
) (
  input  sw_mode_e       mode,
  input  logic [W-1:0]   in_data  [2],
  input  logic           in_valid [2],
  output logic           in_ready [2],
  output logic [W-1:0]   out_data [2],
  output logic           out_valid[2],
  input  logic           out_ready[2]
);
  // Forward direction: data and valid.
  always_comb begin
    unique case (mode)
      SW_STRAIGHT: begin
        out_data[0] = in_data[0];  out_valid[0] = in_valid[0];
        out_data[1] = in_data[1];  out_valid[1] = in_valid[1];
      end
      SW_CROSS: begin
        out_data[0] = in_data[1];  out_valid[0] = in_valid[1];
        out_data[1] = in_data[0];  out_valid[1] = in_valid[0];
      end
      SW_BCAST0: begin
        out_data[0] = in_data[0];  out_valid[0] = in_valid[0] & out_ready[1];
        out_data[1] = in_data[0];  out_valid[1] = in_valid[0] & out_ready[0];
      end
      default: begin  // SW_BCAST1
        out_data[0] = in_data[1];  out_valid[0] = in_valid[1] & out_ready[1];
        out_data[1] = in_data[1];  out_valid[1] = in_valid[1] & out_ready[0];
      end
    endcase
  end

  // Backward direction: ready.
  always_comb begin
    unique case (mode)
      SW_STRAIGHT: begin
        in_ready[0] = out_ready[0];
        in_ready[1] = out_ready[1];
      end
      SW_CROSS: begin
        in_ready[0] = out_ready[1];
        in_ready[1] = out_ready[0];
      end
      SW_BCAST0: begin
        in_ready[0] = out_ready[0] & out_ready[1];
        in_ready[1] = 1'b0;
      end
      default: begin  // SW_BCAST1
        in_ready[0] = 1'b0;
        in_ready[1] = out_ready[0] & out_ready[1];
      end
    endcase
  end
endmodule
