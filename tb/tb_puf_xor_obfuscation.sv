// tb_puf_xor_obfuscation -- checks that output bit i is response bit i XOR
// response bit i + WIDTH/2, for one-hot and random responses, at WIDTH 32
// and 64.
`timescale 1ps/1ps
module tb_puf_xor_obfuscation;

  logic [31:0] r32;
  logic [15:0] o32;
  logic [63:0] r64;
  logic [31:0] o64;
  int checks = 0, failures = 0;

  puf_xor_obfuscation #(.WIDTH(32)) dut32 (.resp(r32), .obf(o32));
  puf_xor_obfuscation #(.WIDTH(64)) dut64 (.resp(r64), .obf(o64));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // One-hot: bit k lands on output bit k mod 16.
    for (int k = 0; k < 32; k++) begin
      r32 = 32'b1 << k;
      #1;
      check(o32 == (16'b1 << (k % 16)), $sformatf("one-hot %0d -> %h", k, o32));
    end
    for (int n = 0; n < 200; n++) begin
      logic [31:0] e64;
      logic [15:0] e32;
      r32 = $urandom;
      r64 = {$urandom, $urandom};
      #1;
      for (int i = 0; i < 16; i++) e32[i] = r32[i] != r32[i + 16];
      for (int i = 0; i < 32; i++) e64[i] = r64[i] != r64[i + 32];
      check(o32 == e32, $sformatf("32-bit %h -> %h", r32, o32));
      check(o64 == e64, $sformatf("64-bit %h -> %h", r64, o64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
