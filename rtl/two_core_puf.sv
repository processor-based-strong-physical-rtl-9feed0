// two_core_puf -- a strong PUF made from the ALU adders of two identical
// processor cores.
//
// Both cores add the same challenge operands in the same clock cycle. Because
// of process variation the sum bit i of one core's ripple-carry adder settles
// slightly earlier than that of the other; arbiter i (one per bit) records
// which core won. Carry propagation makes the racing paths depend on the
// operands, so the 2^(2*WIDTH) operand pairs give an exponential challenge
// space (a strong PUF) at the cost of only WIDTH arbiters, MUXes and flops.
//
// Structure:
//   puf_sequencer        issues the four-add query (zero init, A+B, all-one
//                        init, A+B) to both adders in lockstep, or the two
//                        aging vectors in aging mode
//   puf_rca x2           Core0 / Core1 adders (gate-level, per-gate delays
//                        DLY_CORE0 / DLY_CORE1 for timing simulation)
//   puf_arbiter x WIDTH  dual-trigger latches, 1 = Core0 first
//   puf_valid_select     MUX + temporary register keeping single-transition
//                        (valid) decisions only
//   puf_xor_obfuscation  optional bit i XOR bit i+WIDTH/2
//   puf_srp              Srp output register
// The adder sums also go to the cores' result registers; those belong to the
// rest of the cores and are brought out as alu_sum0 / alu_sum1.
//
// Interface and timing: pulse `start` for one cycle with challenge_a/_b while
// `busy` is low; `srp_valid` rises on the fifth clock edge after the one
// that samples `start` (plain mode), with the
// WIDTH-bit response in `srp`. With `xor_en` high each query yields WIDTH/2
// obfuscated bits; the second query completes `srp`. Holding `age_en` high
// (while idle) alternates the aging vectors; age_mask0/1 choose the full
// adders of each core to age. The clock period must exceed the slowest adder
// settling time plus the arbiter decision. Synchronous active-low reset.
// The response convention (bit = 1 when Core0 is faster), the hardware
// sequencing of the query and the per-core aging masks are this design's
// choices; the datapath follows the published two-core PUF.
`timescale 1ps/1ps
module two_core_puf
  import puf_pkg::*;
#(
  parameter int unsigned WIDTH = PUF_WIDTH,
  parameter fa_delay_t [WIDTH-1:0] DLY_CORE0 = {WIDTH{FA_DELAY_NOMINAL}},
  parameter fa_delay_t [WIDTH-1:0] DLY_CORE1 = {WIDTH{FA_DELAY_NOMINAL}},
  parameter int unsigned T_META = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] challenge_a,
  input  logic [WIDTH-1:0] challenge_b,
  input  logic             xor_en,
  input  logic             age_en,
  input  logic [WIDTH-1:0] age_mask0,
  input  logic [WIDTH-1:0] age_mask1,
  output logic             busy,
  output logic             aging,
  output logic [WIDTH-1:0] srp,
  output logic             srp_valid,
  output logic [WIDTH-1:0] alu_sum0,
  output logic [WIDTH-1:0] alu_sum1
);

  logic [WIDTH-1:0]   op_a0, op_b0, op_a1, op_b1;
  logic               cin0, cin1;
  logic               capture, srp_we, alu_add;
  puf_phase_e         phase;
  logic [WIDTH-1:0]   sum0, sum1, arb, resp;
  logic [WIDTH/2-1:0] obf;
  logic               cout0, cout1;
  fa_gates_t [WIDTH-1:0] gates0, gates1;

  puf_sequencer #(.WIDTH(WIDTH)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .chal_a   (challenge_a),
    .chal_b   (challenge_b),
    .age_en   (age_en),
    .age_mask0(age_mask0),
    .age_mask1(age_mask1),
    .op_a0    (op_a0),
    .op_b0    (op_b0),
    .cin0     (cin0),
    .op_a1    (op_a1),
    .op_b1    (op_b1),
    .cin1     (cin1),
    .capture  (capture),
    .phase    (phase),
    .srp_we   (srp_we),
    .alu_add  (alu_add),
    .busy     (busy),
    .aging    (aging)
  );

  puf_rca #(.WIDTH(WIDTH), .DLY(DLY_CORE0)) u_core0_adder (
    .a    (op_a0),
    .b    (op_b0),
    .cin  (cin0),
    .sum  (sum0),
    .cout (cout0),
    .gates(gates0)
  );

  puf_rca #(.WIDTH(WIDTH), .DLY(DLY_CORE1)) u_core1_adder (
    .a    (op_a1),
    .b    (op_b1),
    .cin  (cin1),
    .sum  (sum1),
    .cout (cout1),
    .gates(gates1)
  );

  for (genvar i = 0; i < WIDTH; i++) begin : g_arb
    puf_arbiter #(.T_META(T_META)) u_arb (
      .from_core0(sum0[i]),
      .from_core1(sum1[i]),
      .win0      (arb[i])
    );
  end

  puf_valid_select #(.WIDTH(WIDTH)) u_sel (
    .clk    (clk),
    .rst_n  (rst_n),
    .capture(capture),
    .phase  (phase),
    .sum    (sum0),
    .arb    (arb),
    .resp   (resp)
  );

  puf_xor_obfuscation #(.WIDTH(WIDTH)) u_xor (
    .resp(resp),
    .obf (obf)
  );

  puf_srp #(.WIDTH(WIDTH)) u_srp (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (srp_we),
    .xor_mode(xor_en),
    .resp    (resp),
    .obf     (obf),
    .srp     (srp),
    .valid   (srp_valid)
  );

  assign alu_sum0 = sum0;
  assign alu_sum1 = sum1;

  // The carry outs and gate observation taps of the adders have no consumer
  // inside the PUF; the carry out belongs to the cores' ALU flags.
  logic unused;
  assign unused = ^{cout0, cout1, gates0, gates1, alu_add};

endmodule
