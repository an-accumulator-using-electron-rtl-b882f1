// tlg_or8: threshold-logic 8-input OR, all weights 1, threshold 1 (sgn{sum X_i - 1}).
//
// A single tlg_gate node with fixed weights; x[k] is input X(k+1).
// Weights and threshold follow the source design. It merges the eight J terms of an
// accumulator stage.
//
// Interface: x[7:0] inputs, y output. Timing: combinational.
module tlg_or8 (
  input  logic [7:0] x,
  output logic       y
);

  tlg_gate #(
    .N    (8),
    .W    ('{default: 1}),
    .THETA(1)
  ) u_node (
    .x(x),
    .y(y)
  );

endmodule
