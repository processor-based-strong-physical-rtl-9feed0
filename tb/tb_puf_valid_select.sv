// tb_puf_valid_select -- checks the valid-output MUX and temporary register:
// random sum/arbiter/phase patterns with and without capture against a
// bit-by-bit reference, plus a full two-phase query in which every bit must
// be loaded in exactly one phase.
`timescale 1ps/1ps
module tb_puf_valid_select;
  import puf_pkg::*;

  localparam int W = 32;

  logic clk = 0, rst_n, capture;
  puf_phase_e phase;
  logic [W-1:0] sum, arb, resp, model;
  int checks = 0, failures = 0;

  puf_valid_select #(.WIDTH(W)) dut (.clk, .rst_n, .capture, .phase, .sum, .arb, .resp);

  always #500 clk = ~clk;

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

  initial begin
    logic [W-1:0] a_rise, a_fall, s;
    rst_n = 0; capture = 0; phase = PH_RISE; sum = '0; arb = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1;
    model = '0;
    check(resp == '0, "reset value");
    for (int n = 0; n < 400; n++) begin
      capture = 1'($urandom);
      phase   = puf_phase_e'($urandom & 1);
      sum     = $urandom;
      arb     = $urandom;
      @(posedge clk);
      if (capture)
        for (int i = 0; i < W; i++)
          if ((phase == PH_RISE && sum[i]) || (phase == PH_FALL && !sum[i]))
            model[i] = arb[i];
      #1;
      check(resp == model, $sformatf("cycle %0d resp %h model %h", n, resp, model));
    end

    // A whole query: the same final sum in both phases; every bit ends with
    // the arbiter value of the phase in which it made a single transition.
    s = $urandom; a_rise = $urandom; a_fall = $urandom;
    capture = 1; phase = PH_RISE; sum = s; arb = a_rise;
    @(posedge clk); #1;
    phase = PH_FALL; arb = a_fall;
    @(posedge clk); #1;
    capture = 0;
    check(resp == ((a_rise & s) | (a_fall & ~s)), "two-phase query");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
