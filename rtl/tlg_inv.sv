// tlg_inv: threshold-logic Inverter, weight [-1], threshold 0 (sgn{-A}).
//
// A single tlg_gate node with fixed weights; input a drives x[0].
// The source design specifies the inverter only through its circuit element values;
// the threshold vector [-1; 0] is this design's, derived with the
// threshold-logic rule that the complement of [w; t] is [-w; 1-t], applied to the buffer [1; 1].
//
// Interface: a inputs, y output. Timing: combinational.
module tlg_inv (
  input  logic a,
  output logic y
);

  tlg_gate #(
    .N    (1),
    .W    ('{0: -1, default: 0}),
    .THETA(0)
  ) u_node (
    .x(a),
    .y(y)
  );

endmodule
