// puf_rca -- WIDTH-bit ripple-carry adder: the adder inside one core's ALU,
// used by the two-core PUF as a challenge-dependent delay line.
//
// A chain of puf_full_adder cells; cin is the initial carry C0 and carry i
// feeds full adder i+1. Sum bit i goes both to the core's result and to
// arbiter i. DLY gives each full adder its own gate delays, so two instances
// with different DLY values behave like the adders of two cores on one die in
// a timing simulation. `gates` exposes the five gate outputs of every full
// adder (XOR1, XOR2, NAND1, NAND2, NAND3) for observing the aging stress
// pattern.
// Purely combinational; the sum settles within WIDTH carry stages.
`timescale 1ps/1ps
module puf_rca
  import puf_pkg::*;
#(
  parameter int unsigned WIDTH = PUF_WIDTH,
  parameter fa_delay_t [WIDTH-1:0] DLY = {WIDTH{FA_DELAY_NOMINAL}}
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output fa_gates_t [WIDTH-1:0] gates
);

  logic [WIDTH:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    puf_full_adder #(.DLY(DLY[i])) u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .s    (sum[i]),
      .cout (c[i+1]),
      .gates(gates[i])
    );
  end

  assign cout = c[WIDTH];

endmodule
