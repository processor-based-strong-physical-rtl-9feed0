// tb_puf_srp -- checks the Srp output register: full writes in plain mode,
// lower-then-upper half writes in XOR mode with `valid` only after the
// second half, no change without a write strobe, and restart at the lower
// half after a plain write.
`timescale 1ps/1ps
module tb_puf_srp;

  localparam int W = 32;

  logic clk = 0, rst_n, we, xor_mode, valid;
  logic [W-1:0] resp, srp;
  logic [W/2-1:0] obf;
  int checks = 0, failures = 0;

  puf_srp #(.WIDTH(W)) dut (.clk, .rst_n, .we, .xor_mode, .resp, .obf, .srp, .valid);

  always #500 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write(input logic xm, input logic [W-1:0] r, input logic [W/2-1:0] o);
    we = 1; xor_mode = xm; resp = r; obf = o;
    @(posedge clk); #1;
    we = 0; resp = $urandom; obf = 16'($urandom);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] r;
    logic [W/2-1:0] lo, hi;
    rst_n = 0; we = 0; xor_mode = 0; resp = '0; obf = '0;
    @(posedge clk); #1 rst_n = 1;
    check(srp == '0 && !valid, "reset");
    for (int n = 0; n < 50; n++) begin
      r = $urandom;
      write(0, r, 16'($urandom));
      check(srp == r && valid, $sformatf("plain write %0d", n));
      @(posedge clk); #1;
      check(srp == r && valid, "holds without write");
    end
    for (int n = 0; n < 50; n++) begin
      r  = srp;
      lo = 16'($urandom); hi = 16'($urandom);
      write(1, $urandom, lo);
      check(!valid, "xor: not valid after first half");
      check(srp[15:0] == lo && srp[31:16] == r[31:16], "xor: lower half");
      write(1, $urandom, hi);
      check(valid && srp == {hi, lo}, $sformatf("xor: full %h", srp));
    end
    // Half-written, then a plain write, then XOR mode starts at the lower half.
    write(1, '0, 16'h1234);
    r = $urandom;
    write(0, r, '0);
    check(valid && srp == r, "plain write after half");
    write(1, '0, 16'hBEEF);
    check(!valid && srp == {r[31:16], 16'hBEEF}, "restart at lower half");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
