`timescale 1ns/1ps
// Self-checking test of the 2x2 switch: every mode with random data, valid
// and ready, against a table of what each mode connects.
module tb_benes_switch;
  import mpsoc_pkg::*;
  localparam int W = 32;
  int checks = 0, failures = 0;

  sw_mode_e   mode;
  logic [W-1:0] in_data[2], out_data[2];
  logic in_valid[2], in_ready[2], out_valid[2], out_ready[2];

  benes_switch #(.W(W)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (mode %0d)", what, mode);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int src0, src1;
      mode = sw_mode_e'(t % 4);
      for (int b = 0; b < 2; b++) begin
        in_data[b]   = $urandom;
        in_valid[b]  = 1'($urandom);
        out_ready[b] = 1'($urandom);
      end
      // expected source of each output
      src0 = (mode == SW_STRAIGHT || mode == SW_BCAST0) ? 0 : 1;
      src1 = (mode == SW_CROSS    || mode == SW_BCAST0) ? 0 : 1;
      #1;
      check(out_data[0] == in_data[src0], "out0 data");
      check(out_data[1] == in_data[src1], "out1 data");
      if (src0 != src1) begin
        check(out_valid[0] == in_valid[src0] && out_valid[1] == in_valid[src1], "valid");
      end else begin
        // broadcast: each branch valid only when the other branch is ready
        check(out_valid[0] == (in_valid[src0] && out_ready[1]), "bcast valid0");
        check(out_valid[1] == (in_valid[src0] && out_ready[0]), "bcast valid1");
      end
      for (int b = 0; b < 2; b++) begin
        logic exp_r;
        exp_r = 1'b1;
        if (src0 != b && src1 != b) exp_r = 1'b0;
        if (src0 == b) exp_r &= out_ready[0];
        if (src1 == b) exp_r &= out_ready[1];
        check(in_ready[b] == exp_r, "in_ready");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
