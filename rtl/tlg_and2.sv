// tlg_and2: threshold-logic 2-input AND, weights [1,1], threshold 2 (AND(A,B) = sgn{A + B - 2}).
//
// A single tlg_gate node with fixed weights; input a drives x[0].
// The weights and threshold follow the source design; both inputs are plain literals.
//
// Interface: a, b inputs, y output. Timing: combinational.
module tlg_and2 (
  input  logic a,
  input  logic b,
  output logic y
);

  tlg_gate #(
    .N    (2),
    .W    ('{0: 1, 1: 1, default: 0}),
    .THETA(2)
  ) u_node (
    .x({b, a}),
    .y(y)
  );

endmodule
