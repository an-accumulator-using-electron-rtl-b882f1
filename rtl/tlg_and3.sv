// tlg_and3: threshold-logic 3-input AND, weights [1,1,1], threshold 3 (sgn{A + B + C - 3}).
//
// A single tlg_gate node with fixed weights; input a drives x[0].
// Weights and threshold follow the source design. The accumulator stage
// uses it in its gate-level form (TLG_MERGED = 0) for the add terms, with a
// threshold inverter on the complemented input.
//
// Interface: a, b, c inputs, y output. Timing: combinational.
module tlg_and3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  tlg_gate #(
    .N    (3),
    .W    ('{0: 1, 1: 1, 2: 1, default: 0}),
    .THETA(3)
  ) u_node (
    .x({c, b, a}),
    .y(y)
  );

endmodule
