// tb_puf_full_adder -- checks the gate-level full adder against the full-adder
// truth table with all five internal gate outputs (states 0..7), then checks
// the gate delays: a change on A must reach the sum after XOR1 + XOR2 and the
// carry after XOR1 + NAND2 + NAND3 (carry-propagate case).
`timescale 1ps/1ps
module tb_puf_full_adder;
  import puf_pkg::*;

  localparam fa_delay_t DLY = '{xor1: 8'd30, xor2: 8'd20, nand1: 8'd7,
                                nand2: 8'd11, nand3: 8'd13};

  logic a, b, cin, s, cout;
  fa_gates_t gates;
  int checks = 0, failures = 0;

  puf_full_adder #(.DLY(DLY)) dut (.a, .b, .cin, .s, .cout, .gates);

  // Expected gate outputs per state {A,B,Cin}: XOR1 XOR2 NAND1 NAND2 NAND3.
  localparam logic [4:0] TABLE [8] = '{
    5'b00110, 5'b01110, 5'b11110, 5'b10101,
    5'b11110, 5'b10101, 5'b00011, 5'b01011
  };

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
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
    for (int st = 0; st < 8; st++) begin
      {a, b, cin} = 3'(st);
      #200;
      check(gates == TABLE[st], $sformatf("state %0d gates %b", st, gates));
      check(s == (a ^ b ^ cin), $sformatf("state %0d sum", st));
      check(cout == ((a & b) | (a & cin) | (b & cin)), $sformatf("state %0d carry", st));
    end

    // Delay: from {0,0,1} (s=1, c=0) raise A -> s falls after 30+20,
    // carry rises after 30+11+13 = 54.
    {a, b, cin} = 3'b001;
    #200;
    a = 1'b1;
    #49;
    check(s == 1'b1, "sum changed before XOR1+XOR2 delay");
    #1;
    check(s == 1'b0, "sum not changed at XOR1+XOR2 delay");
    #3;
    check(cout == 1'b0, "carry changed before XOR1+NAND2+NAND3 delay");
    #1;
    check(cout == 1'b1, "carry not changed at XOR1+NAND2+NAND3 delay");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
