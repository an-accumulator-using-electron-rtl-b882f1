// tlg_or9: threshold-logic 9-input OR, all weights 1, threshold 1 (sgn{sum X_i - 1}).
//
// A single tlg_gate node with fixed weights; x[k] is input X(k+1).
// Weights and threshold follow the source design. It merges the nine K terms of an
// accumulator stage.
//
// Interface: x[8:0] inputs, y output. Timing: combinational.
module tlg_or9 (
  input  logic [8:0] x,
  output logic       y
);

  tlg_gate #(
    .N    (9),
    .W    ('{default: 1}),
    .THETA(1)
  ) u_node (
    .x(x),
    .y(y)
  );

endmodule
