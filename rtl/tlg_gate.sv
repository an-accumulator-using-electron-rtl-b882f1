// tlg_gate: generic linear threshold logic gate (TLG).
//
// The output is 1 when the weighted sum of the inputs reaches the threshold:
//     y = 1  if  sum_k W[k] * x[k] >= THETA,   else 0.
// Weights are signed integers. A positive weight models an input coupled to
// the tunnel junction's upper node, a negative weight one coupled to its
// lower node; a complemented literal ~x is obtained by a weight of -w and a
// threshold lowered by w (since ~x = 1 - x). Only the logic function of the
// single-electron circuit is modelled: the capacitor network, bias source
// and junction that realise it are analog and not described here.
//
// Interface: x[N-1:0] inputs, x[k] carries weight W[k]; y output. W is
// sized for the widest gate (TLG_MAX_INPUTS); entries from N upward are unused.
// Timing: purely combinational, no clock.
//
// The defaults are the five-input worked example [4,3,3,1,1; 7], which
// realises x1x2 + x1x3 + x2x3x4 + x2x3x5 (x1 on x[0]). The sign rule
// (sum >= THETA gives 1) follows the source design; the integer encoding of the
// weights is this design's choice.
module tlg_gate
  import tlg_pkg::TLG_MAX_INPUTS;
#(
  parameter int unsigned N                 = 5,
  parameter int          W [TLG_MAX_INPUTS] = '{0: 4, 1: 3, 2: 3, 3: 1, 4: 1, default: 0},
  parameter int          THETA             = 7
) (
  input  logic [N-1:0] x,
  output logic         y
);

  int sum;

  always_comb begin
    sum = 0;
    for (int k = 0; k < N; k++) begin
      if (x[k]) sum += W[k];
    end
    y = (sum >= THETA);
  end

endmodule
