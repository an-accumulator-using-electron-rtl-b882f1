// tlg_maj3: threshold-logic 3-input majority, AB + BC + CA, weights [1,1,1], threshold 2
// (sgn{A + B + C - 2}). One threshold node replaces the three ANDs and one OR
// of the gate-level form.
//
// A single tlg_gate node with fixed weights; input a drives x[0].
// Weights and threshold follow the source design. It is the full-adder carry of
// each accumulator stage.
//
// Interface: a, b, c inputs, y output. Timing: combinational.
module tlg_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  tlg_gate #(
    .N    (3),
    .W    ('{0: 1, 1: 1, 2: 1, default: 0}),
    .THETA(2)
  ) u_node (
    .x({c, b, a}),
    .y(y)
  );

endmodule
