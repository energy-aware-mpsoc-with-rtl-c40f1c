`timescale 1ns/1ps
// Self-checking test of a PMM local memory: random reads and byte-masked
// writes on both ports against a reference array, read data one clock
// after the request, and port A winning a same-word write collision.
module tb_local_mem;
  localparam int WORDS = 256;
  localparam int AW = $clog2(WORDS);
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic a_en, b_en;
  logic [3:0] a_be, b_be;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;

  local_mem #(.WORDS(WORDS)) dut (.*);

  logic [31:0] ref_mem [WORDS];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d, input logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_a, exp_b;
    bit rd_a, rd_b;
    a_en = 0; b_en = 0; a_be = 0; b_be = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise through port B
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      b_en = 1; b_be = 4'hF; b_addr = AW'(i); b_wdata = $urandom; ref_mem[i] = b_wdata;
    end
    @(negedge clk); b_en = 0;
    rd_a = 0; rd_b = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (rd_a) check(a_rdata == exp_a, $sformatf("port A read, t=%0d", t));
      if (rd_b) check(b_rdata == exp_b, $sformatf("port B read, t=%0d", t));
      a_en = 1'($urandom); b_en = 1'($urandom);
      a_be = ($urandom_range(1, 0) != 0) ? 4'h0 : 4'($urandom);
      b_be = ($urandom_range(1, 0) != 0) ? 4'h0 : 4'($urandom);
      a_addr = AW'($urandom_range(15, 0)); b_addr = AW'($urandom_range(15, 0));
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = ref_mem[a_addr]; exp_b = ref_mem[b_addr];
      rd_a = a_en; rd_b = b_en;
      if (b_en) ref_mem[b_addr] = merge(ref_mem[b_addr], b_wdata, b_be);
      if (a_en) ref_mem[a_addr] = merge(ref_mem[a_addr], a_wdata, a_be);
    end
    @(negedge clk);
    a_en = 0; b_en = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); a_en = 1; a_be = 0; a_addr = AW'(i);
      @(negedge clk); a_en = 0;
      check(a_rdata == ref_mem[i], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
