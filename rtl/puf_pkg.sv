// puf_pkg -- types and constants shared by the two-core PUF.
//
// The two-core PUF compares the ripple-carry adders of two identical processor
// cores. Each full adder is five gates (XOR1, XOR2, NAND1, NAND2, NAND3); the
// per-gate delay record fa_delay_t lets a simulation give every gate of every
// core its own propagation delay (process variation, intentional aging). The
// delay unit is the picosecond. The 32-bit datapath width is the one of the
// proof-of-concept processor; the nominal gate delays are this design's own
// round numbers, since no nominal delays are published for it.
`timescale 1ps/1ps
package puf_pkg;

  // Datapath width of the base processor (32-bit ALU, 32 arbiters).
  localparam int unsigned PUF_WIDTH = 32;

  // Per-gate delays of one full adder, in picoseconds.
  typedef struct packed {
    logic [7:0] xor1;
    logic [7:0] xor2;
    logic [7:0] nand1;
    logic [7:0] nand2;
    logic [7:0] nand3;
  } fa_delay_t;

  // Nominal delays used when no variation is applied (assumed values).
  localparam fa_delay_t FA_DELAY_NOMINAL = '{xor1: 8'd20, xor2: 8'd20,
                                             nand1: 8'd10, nand2: 8'd10,
                                             nand3: 8'd10};

  // Gate outputs of one full adder: XOR1, XOR2, NAND1, NAND2, NAND3.
  typedef struct packed {
    logic xor1;
    logic xor2;
    logic nand1;
    logic nand2;
    logic nand3;
  } fa_gates_t;

  // Phase of a PUF query: the rise phase follows the all-zero initialisation
  // (captures 0->1 transitions), the fall phase follows the all-one
  // initialisation (captures 1->0 transitions).
  typedef enum logic {
    PH_RISE = 1'b0,
    PH_FALL = 1'b1
  } puf_phase_e;

endpackage
