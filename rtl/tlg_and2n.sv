// tlg_and2n: threshold-logic 2-input AND with the second input complemented, A & ~B, weights [1,-1],
// threshold 1 (sgn{A - B - 1}). Obtained from the plain AND by writing
// ~B = 1 - B, which turns B's weight negative and lowers the threshold by one.
//
// A single tlg_gate node with fixed weights; input a drives x[0].
// Weights and threshold follow the source design. The accumulator stage uses this
// gate for ~B&S4, ~A(i+1)&S7, ~A(i-1)&S8, and the JK flip-flop uses it for
// J&~Q.
//
// Interface: a, b inputs, y output. Timing: combinational.
module tlg_and2n (
  input  logic a,
  input  logic b,
  output logic y
);

  tlg_gate #(
    .N    (2),
    .W    ('{0: 1, 1: -1, default: 0}),
    .THETA(1)
  ) u_node (
    .x({b, a}),
    .y(y)
  );

endmodule
