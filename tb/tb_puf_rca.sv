// tb_puf_rca -- checks the ripple-carry adder: random additions against the
// integer sum, the gate states under the two aging input vectors (every full
// adder in state 5; then masked full adders in state 2 and the others in
// state 0), and the worst-case carry ripple time with nominal delays
// (WIDTH-1 stages of NAND2 + NAND3, then XOR2 on the last sum bit).
`timescale 1ps/1ps
module tb_puf_rca;
  import puf_pkg::*;

  localparam int W = 32;

  logic [W-1:0] a, b, sum;
  logic cin, cout;
  fa_gates_t [W-1:0] gates;
  int checks = 0, failures = 0;

  puf_rca #(.WIDTH(W)) dut (.a, .b, .cin, .sum, .cout, .gates);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  time  t_edge, t_last;
  logic msb_q = 1'b0;
  always @(sum) begin
    if (sum[W-1] != msb_q) t_last = $time;
    msb_q = sum[W-1];
  end

  initial begin
    logic [W:0] exp;
    logic [W-1:0] mask;
    for (int n = 0; n < 300; n++) begin
      a   = $urandom;
      b   = $urandom;
      cin = 1'($urandom);
      if (n < 4) begin a = '1; b = W'(n & 1); end
      #2000;
      exp = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      check({cout, sum} == exp, $sformatf("%h + %h + %0d = %h", a, b, cin, {cout, sum}));
    end

    // Aging vector 1: A = all ones, B = 0, C0 = 1 -> state 5 everywhere.
    a = '1; b = '0; cin = 1'b1;
    #2000;
    for (int i = 0; i < W; i++)
      check(gates[i] == 5'b10101, $sformatf("vector 1 FA %0d gates %b", i, gates[i]));
    // Aging vector 2: A = 0, B = mask, C0 = 0.
    mask = 32'h0000_0005;
    a = '0; b = mask; cin = 1'b0;
    #2000;
    for (int i = 0; i < W; i++)
      check(gates[i] == (mask[i] ? 5'b11110 : 5'b00110),
            $sformatf("vector 2 FA %0d gates %b", i, gates[i]));

    // Worst-case ripple: A = all ones, B = 0, C0 0 -> 1.
    a = '1; b = '0; cin = 1'b0;
    #2000;
    t_edge = $time;
    cin = 1'b1;
    #2000;
    // Carry reaches FA W-1 after (W-1) x (NAND2 + NAND3), then XOR2.
    check(t_last - t_edge == time'((W - 1) * 20 + 20),
          $sformatf("ripple time %0t, expected %0d", t_last - t_edge, (W - 1) * 20 + 20));
    check(sum == '0 && cout == 1'b1, "ripple result");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
