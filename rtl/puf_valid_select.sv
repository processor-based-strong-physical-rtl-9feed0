// puf_valid_select -- keeps only the valid arbiter decisions of a PUF query
// in the temporary response register.
//
// An adder output bit can move 0->1, 1->0, 0->1->0, 1->0->1 or not at all
// during one add; only a single transition gives a meaningful race. Each query
// first initialises the sum to all zeros and adds the challenge (rise phase),
// then initialises it to all ones and adds the same challenge again (fall
// phase). Per bit, a 2:1 MUX in front of the temporary register chooses
//   rise phase: the arbiter output if the final sum bit S_i = 1 (0->1 seen),
//   fall phase: the arbiter output if S_i = 0 (1->0 seen),
// and otherwise the register's own value. Since S_i is the same in both
// phases, every bit is loaded in exactly one of them.
// Interface: `capture` is high for the clock cycle of an evaluating add; the
// register loads on the rising clk edge at the end of that cycle, when sum and
// arbiter outputs have settled. Reset (active low, synchronous) clears the
// register; the reset value is this design's choice.
`timescale 1ps/1ps
module puf_valid_select
  import puf_pkg::*;
#(
  parameter int unsigned WIDTH = PUF_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             capture,
  input  puf_phase_e       phase,
  input  logic [WIDTH-1:0] sum,
  input  logic [WIDTH-1:0] arb,
  output logic [WIDTH-1:0] resp
);

  logic [WIDTH-1:0] sel;

  // MUX control: S_i in the rise phase, ~S_i in the fall phase.
  assign sel = (phase == PH_RISE) ? sum : ~sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resp <= '0;
    end else if (capture) begin
      for (int i = 0; i < WIDTH; i++) begin
        resp[i] <= sel[i] ? arb[i] : resp[i];
      end
    end
  end

endmodule
