// puf_arbiter -- BEHAVIOURAL MODEL of one PUF arbiter, a dual-trigger latch.
// Not synthesizable logic: an arbiter resolves a race between two analog edges
// and is a full-custom cell on silicon.
//
// Sum bit i of Core0 drives the data side and sum bit i of Core1 the trigger
// side, as in the published arbiter drawing (D from Core0, clock from Core1).
// The latch triggers on both edges of the Core1 signal so that rising (0->1)
// and falling (1->0) races are both captured. On a trigger it records whether
// the Core0 signal had already reached the new level:
//   win0 = 1  -> Core0's transition arrived first (its delay line is faster)
//   win0 = 0  -> Core1's transition arrived first
// Normalising both edge directions to "1 = Core0 first" is this model's
// choice; it makes the response bit mean the same thing in both query phases.
//
// Metastability: if the two transitions arrive within T_META ps of each other
// the outcome is random. T_META = 0 gives an ideal arbiter. Intermediate
// fluctuations re-trigger the latch; the valid-output selection downstream
// keeps only results of single transitions. The output is stable from the
// later of the two transitions until the next transition on either input.
`timescale 1ps/1ps
module puf_arbiter #(
  parameter int unsigned T_META = 0
) (
  input  logic from_core0,
  input  logic from_core1,
  output logic win0
);

  time  t_core0, t_core1;   // time of the latest transition of each input
  logic seen0, seen1;       // an input has moved since time 0

  initial begin
    win0  = 1'b0;
    seen0 = 1'b0;
    seen1 = 1'b0;
    t_core0 = 0;
    t_core1 = 0;
  end

  // Trigger on either edge of the Core1 signal.
  always @(from_core1) begin
    t_core1 = $time;
    seen1   = 1'b1;
    if (T_META != 0 && seen0 && ($time - t_core0) < time'(T_META))
      win0 = 1'($urandom);
    else
      win0 = (from_core0 == from_core1);
  end

  // A Core0 transition just after the trigger, inside the window, makes the
  // latch metastable as well.
  always @(from_core0) begin
    t_core0 = $time;
    seen0   = 1'b1;
    if (T_META != 0 && seen1 && ($time - t_core1) < time'(T_META))
      win0 = 1'($urandom);
  end

endmodule
