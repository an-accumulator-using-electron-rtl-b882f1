// tlg_or3: threshold-logic 3-input OR, weights [1,1,1], threshold 1 (sgn{A + B + C - 1}).
//
// A single tlg_gate node with fixed weights; input a drives x[0].
// Weights and threshold follow the source design. The accumulator stage uses it
// for the carry OR in its gate-level form (TLG_MERGED = 0).
//
// Interface: a, b, c inputs, y output. Timing: combinational.
module tlg_or3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  tlg_gate #(
    .N    (3),
    .W    ('{0: 1, 1: 1, 2: 1, default: 0}),
    .THETA(1)
  ) u_node (
    .x({c, b, a}),
    .y(y)
  );

endmodule
