// tb_puf_sequencer -- checks the lockstep sequencer cycle by cycle: the four
// adds of a query with their operands, capture strobes and phases, the Srp
// write and the latency from start to the write, that a start while busy is
// ignored, and the alternation of the two aging vectors with per-core masks.
`timescale 1ps/1ps
module tb_puf_sequencer;
  import puf_pkg::*;

  localparam int W = 32;

  logic clk = 0, rst_n, start, age_en;
  logic [W-1:0] chal_a, chal_b, age_mask0, age_mask1;
  logic [W-1:0] op_a0, op_b0, op_a1, op_b1;
  logic cin0, cin1, capture, srp_we, alu_add, busy, aging;
  puf_phase_e phase;
  int checks = 0, failures = 0;

  puf_sequencer #(.WIDTH(W)) dut (.*);

  always #500 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Check the operands seen by both cores after the current edge.
  task automatic expect_ops(input logic [W-1:0] a0, b0, input logic c0,
                            input logic [W-1:0] a1, b1, input logic c1,
                            input string what);
    check(op_a0 == a0 && op_b0 == b0 && cin0 == c0, {what, " core0"});
    check(op_a1 == a1 && op_b1 == b1 && cin1 == c1, {what, " core1"});
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, m0, m1;
    int adds, cyc;
    rst_n = 0; start = 0; age_en = 0; chal_a = '0; chal_b = '0;
    age_mask0 = '0; age_mask1 = '0;
    @(posedge clk); #1 rst_n = 1;
    check(!busy && !capture && !srp_we, "idle after reset");

    for (int q = 0; q < 20; q++) begin
      a = $urandom; b = $urandom;
      chal_a = a; chal_b = b; start = 1;
      @(posedge clk); #1;                    // start sampled
      start = 0; chal_a = $urandom; chal_b = $urandom;
      adds = alu_add;
      expect_ops('0, '0, 0, '0, '0, 0, "INIT_LO");
      check(busy && !capture, "INIT_LO strobes");
      @(posedge clk); #1;
      adds += alu_add;
      expect_ops(a, b, 0, a, b, 0, "EVAL_RISE");
      check(capture && phase == PH_RISE, "EVAL_RISE capture");
      start = 1;                              // ignored while busy
      @(posedge clk); #1;
      start = 0;
      adds += alu_add;
      expect_ops('0, '1, 0, '0, '1, 0, "INIT_HI");
      check(!capture, "INIT_HI no capture");
      @(posedge clk); #1;
      adds += alu_add;
      expect_ops(a, b, 0, a, b, 0, "EVAL_FALL");
      check(capture && phase == PH_FALL, "EVAL_FALL capture");
      @(posedge clk); #1;
      adds += alu_add;
      check(srp_we && !capture, "WRITE strobe 5 cycles after start");
      check(adds == 4, $sformatf("four adds per query, saw %0d", adds));
      @(posedge clk); #1;
      check(!busy && !srp_we, "back to idle");
    end

    // Aging mode.
    m0 = 32'h0000_0005; m1 = 32'h8000_0100;
    age_mask0 = m0; age_mask1 = m1; age_en = 1;
    cyc = 0;
    for (int n = 0; n < 10; n++) begin
      @(posedge clk); #1;
      expect_ops('1, '0, 1, '1, '0, 1, "aging vector 1");
      check(aging && busy, "aging flag");
      @(posedge clk); #1;
      expect_ops('0, m0, 0, '0, m1, 0, "aging vector 2");
      if (n == 5) start = 1;                  // ignored while aging
      if (n == 6) start = 0;
      cyc += 2;
    end
    age_en = 0;
    @(posedge clk); #1;
    check(!aging && !busy && !capture, "aging ends");
    expect_ops('0, '0, 0, '0, '0, 0, "idle operands after aging");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
