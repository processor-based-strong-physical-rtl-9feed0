// tb_two_core_puf_full -- one complete operation of the two-core PUF with all
// parameters at their defaults (32-bit datapath, nominal identical gate
// delays, ideal arbiters): plain queries, a two-query XOR-obfuscated response
// and a short aging run. With identical cores every race is a tie, so the
// response bits themselves are not predicted here; checked are the adder
// results, the query latency (srp_valid five cycles after the edge that
// samples start, with four adds), the Srp valid protocol in both modes,
// that repeated identical queries give identical responses, and the aging
// vectors seen at the adder outputs.
`timescale 1ps/1ps
module tb_two_core_puf_full;

  localparam int W      = 32;
  localparam int PERIOD = 2000;

  logic clk = 0, rst_n, start, xor_en, age_en;
  logic [W-1:0] challenge_a, challenge_b, age_mask0, age_mask1;
  logic busy, aging, srp_valid;
  logic [W-1:0] srp, alu_sum0, alu_sum1;

  two_core_puf dut (.*);

  always #(PERIOD / 2) clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(PERIOD * 2000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic query(input logic [W-1:0] a, input logic [W-1:0] b, output int lat);
    challenge_a = a; challenge_b = b; start = 1;
    @(posedge clk); #1;
    start = 0; lat = 0;
    while (busy) begin
      @(posedge clk); #1;
      lat++;
    end
  endtask

  initial begin
    int lat;
    logic [W-1:0] a, b, r;
    rst_n = 0; start = 0; xor_en = 0; age_en = 0;
    challenge_a = '0; challenge_b = '0; age_mask0 = '0; age_mask1 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!srp_valid && !busy, "idle after reset");

    for (int q = 0; q < 10; q++) begin
      a = $urandom; b = $urandom;
      query(a, b, lat);
      check(lat == 5, $sformatf("latency %0d", lat));
      check(srp_valid, "srp_valid");
      check(alu_sum0 == a + b && alu_sum1 == a + b, "adder results");
      r = srp;
      query(a, b, lat);
      check(srp == r, "repeatable");
    end

    xor_en = 1;
    query($urandom, $urandom, lat);
    check(!srp_valid, "XOR: first half only");
    query($urandom, $urandom, lat);
    check(srp_valid, "XOR: both halves");
    xor_en = 0;

    age_mask0 = 32'h0000_0005; age_mask1 = 32'h0001_0000; age_en = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 8; n++) begin
      check(aging, "aging flag");
      #(PERIOD - 2);
      if (n % 2 == 0) check(alu_sum0 == '0 && alu_sum1 == '0, "vector 1");
      else check(alu_sum0 == age_mask0 && alu_sum1 == age_mask1, "vector 2");
      @(posedge clk); #1;
    end
    age_en = 0;
    repeat (2) @(posedge clk);
    #1 check(!busy && !aging, "idle after aging");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
