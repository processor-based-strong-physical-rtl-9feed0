// puf_sequencer -- drives the ALU adders of Core0 and Core1 in lockstep, for
// PUF queries and for intentional aging.
//
// Query: the two cores must execute the same add sequence in the same cycles.
// This block issues it as hardware: after `start` (challenge operands A, B
// sampled with it) the adders of both cores see, one add per cycle,
//   INIT_LO   0 + 0           sum and carries all 0
//   EVAL_RISE A + B           arbiters race on 0->1 edges; capture, rise phase
//   INIT_HI   0 + 0xFF..F     sum all 1, carries all 0
//   EVAL_FALL A + B           arbiters race on 1->0 edges; capture, fall phase
//   WRITE     (adders idle)   srp_we: response goes to the Srp register
// and then returns to IDLE. That is the add/addi order of the published
// challenge program; running it from a state machine rather than from the
// cores' instruction streams is this design's choice. `capture` and `phase`
// are valid during the evaluating cycle; the capture register samples at its
// end. `srp_we` is high in the fifth cycle after the edge that samples
// `start`, so Srp is written on the fifth edge after it; four of those
// cycles are adds (`alu_add` high).
//
// Aging: while `age_en` is high (and no query runs) the two aging input
// vectors alternate every cycle, for each core c:
//   vector 1: A = all ones, B = 0, C0 = 1     every full adder in state 5
//   vector 2: A = 0, B = age_mask_c, C0 = 0   masked full adders in state 2,
//                                             the others in state 0
// This holds XOR1 and NAND1 of the masked full adders high all the time while
// the other gates toggle. Giving each core its own mask lets one aging pass
// serve both cores; a zero mask leaves that core's XOR1 at 50% duty.
// Operands are registered: they change on the rising clk edge that enters a
// state. Synchronous active-low reset to IDLE with all-zero operands.
`timescale 1ps/1ps
module puf_sequencer
  import puf_pkg::*;
#(
  parameter int unsigned WIDTH = PUF_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  // query request
  input  logic             start,
  input  logic [WIDTH-1:0] chal_a,
  input  logic [WIDTH-1:0] chal_b,
  // aging request
  input  logic             age_en,
  input  logic [WIDTH-1:0] age_mask0,
  input  logic [WIDTH-1:0] age_mask1,
  // adder operands of Core0 and Core1
  output logic [WIDTH-1:0] op_a0,
  output logic [WIDTH-1:0] op_b0,
  output logic             cin0,
  output logic [WIDTH-1:0] op_a1,
  output logic [WIDTH-1:0] op_b1,
  output logic             cin1,
  // to the capture register and Srp
  output logic             capture,
  output puf_phase_e       phase,
  output logic             srp_we,
  // status
  output logic             alu_add,
  output logic             busy,
  output logic             aging
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_INIT_LO,
    S_EVAL_RISE,
    S_INIT_HI,
    S_EVAL_FALL,
    S_WRITE,
    S_AGE_V1,
    S_AGE_V2
  } state_e;

  typedef struct packed {
    logic [WIDTH-1:0] a;
    logic [WIDTH-1:0] b;
    logic             cin;
  } operands_t;

  state_e           state, state_n;
  logic [WIDTH-1:0] ch_a, ch_b;
  operands_t        ops0, ops1, ops0_n, ops1_n;

  always_comb begin
    state_n = state;
    ops0_n  = ops0;
    ops1_n  = ops1;
    unique case (state)
      S_IDLE: begin
        if (start) begin
          state_n = S_INIT_LO;
          ops0_n  = '{a: '0, b: '0, cin: 1'b0};
        end else if (age_en) begin
          state_n = S_AGE_V1;
          ops0_n  = '{a: '1, b: '0, cin: 1'b1};
        end
        ops1_n = ops0_n;
      end
      S_INIT_LO: begin
        state_n = S_EVAL_RISE;
        ops0_n  = '{a: ch_a, b: ch_b, cin: 1'b0};
        ops1_n  = ops0_n;
      end
      S_EVAL_RISE: begin
        state_n = S_INIT_HI;
        ops0_n  = '{a: '0, b: '1, cin: 1'b0};
        ops1_n  = ops0_n;
      end
      S_INIT_HI: begin
        state_n = S_EVAL_FALL;
        ops0_n  = '{a: ch_a, b: ch_b, cin: 1'b0};
        ops1_n  = ops0_n;
      end
      S_EVAL_FALL: begin
        state_n = S_WRITE;
      end
      S_WRITE: begin
        state_n = S_IDLE;
      end
      S_AGE_V1: begin
        state_n = S_AGE_V2;
        ops0_n  = '{a: '0, b: age_mask0, cin: 1'b0};
        ops1_n  = '{a: '0, b: age_mask1, cin: 1'b0};
      end
      S_AGE_V2: begin
        if (age_en) begin
          state_n = S_AGE_V1;
          ops0_n  = '{a: '1, b: '0, cin: 1'b1};
          ops1_n  = ops0_n;
        end else begin
          state_n = S_IDLE;
          ops0_n  = '{a: '0, b: '0, cin: 1'b0};
          ops1_n  = ops0_n;
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ops0  <= '0;
      ops1  <= '0;
      ch_a  <= '0;
      ch_b  <= '0;
    end else begin
      state <= state_n;
      ops0  <= ops0_n;
      ops1  <= ops1_n;
      if (state == S_IDLE && start) begin
        ch_a <= chal_a;
        ch_b <= chal_b;
      end
    end
  end

  assign op_a0 = ops0.a;
  assign op_b0 = ops0.b;
  assign cin0  = ops0.cin;
  assign op_a1 = ops1.a;
  assign op_b1 = ops1.b;
  assign cin1  = ops1.cin;

  assign capture = (state == S_EVAL_RISE) || (state == S_EVAL_FALL);
  assign phase   = (state == S_EVAL_FALL) ? PH_FALL : PH_RISE;
  assign srp_we  = (state == S_WRITE);
  assign alu_add = (state == S_INIT_LO) || (state == S_EVAL_RISE) ||
                   (state == S_INIT_HI) || (state == S_EVAL_FALL);
  assign busy    = (state != S_IDLE);
  assign aging   = (state == S_AGE_V1) || (state == S_AGE_V2);

  // The same challenge must reach both cores in the same cycle.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_AGE_V1 && state != S_AGE_V2) |-> (ops0 == ops1));

endmodule
