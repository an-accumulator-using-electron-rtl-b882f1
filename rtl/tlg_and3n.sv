// tlg_and3n: threshold-logic 3-input AND with the middle input complemented, A & ~B & C, weights
// [1,-1,1], threshold 2 (sgn{A - B + C - 2}).
//
// A single tlg_gate node with fixed weights; input a drives x[0].
// Weights and threshold follow the source design. The accumulator stage uses two of
// these for the add terms B&~C&S1 and ~B&C&S1.
//
// Interface: a, b, c inputs, y output. Timing: combinational.
module tlg_and3n (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  tlg_gate #(
    .N    (3),
    .W    ('{0: 1, 1: -1, 2: 1, default: 0}),
    .THETA(2)
  ) u_node (
    .x({c, b, a}),
    .y(y)
  );

endmodule
