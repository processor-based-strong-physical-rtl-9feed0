// puf_full_adder -- the i-th full adder of a core's ripple-carry adder, at gate
// level.
//
// Five gates, wired as in the published full-adder schematic:
//   XOR1  = A ^ B                 XOR2 = XOR1 ^ Cin   (sum, also to arbiter i)
//   NAND1 = ~(A & B)              NAND2 = ~(XOR1 & Cin)
//   NAND3 = ~(NAND1 & NAND2)      (carry out)
// The carry chain runs through NAND2/NAND3 only; XOR1, XOR2 and NAND1 sit off
// the carry chain, which is why intentional aging targets them.
//
// Every gate has its own transport delay from the DLY parameter (ps). The
// delays matter only in an event-driven timing simulation, where they stand for
// the gate's process-variation and aging state; synthesis ignores them and the
// block is then a plain full adder. The gate outputs are brought out on `gates`
// so that the stress (output high) time of every gate can be observed.
// Purely combinational; no clock.
`timescale 1ps/1ps
module puf_full_adder
  import puf_pkg::*;
#(
  parameter fa_delay_t DLY = FA_DELAY_NOMINAL
) (
  input  logic      a,
  input  logic      b,
  input  logic      cin,
  output logic      s,
  output logic      cout,
  output fa_gates_t gates
);

  logic x1, x2, n1, n2, n3;

  assign #(DLY.xor1)  x1 = a ^ b;
  assign #(DLY.xor2)  x2 = x1 ^ cin;
  assign #(DLY.nand1) n1 = ~(a & b);
  assign #(DLY.nand2) n2 = ~(x1 & cin);
  assign #(DLY.nand3) n3 = ~(n1 & n2);

  assign s     = x2;
  assign cout  = n3;
  assign gates = '{xor1: x1, xor2: x2, nand1: n1, nand2: n2, nand3: n3};

endmodule
