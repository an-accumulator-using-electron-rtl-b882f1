// jk_ff: JK flip-flop whose next state is computed by threshold gates.
//
// Next-state function Q+ = J&~Q | ~K&Q, built from two threshold nodes as in
// the source design:
//   P  = sgn{ J - Q - 1 }            (tlg_and2n, the J&~Q term)
//   Q+ = sgn{ -K + 2P + Q - 1 }      (weights K:-1, P:2, Q:1, threshold 1)
// J=K=0 holds, J=1,K=0 sets, J=0,K=1 clears and J=K=1 toggles.
//
// In the source circuit a third node ANDs the clock pulse with Q so that the
// state is only passed on during the positive pulse. Here that sampling is an
// edge-triggered register that loads Q+ on the rising clock edge; that and
// the asynchronous active-low reset are this design's choices (the source
// circuit has no reset). Q_n is produced by a threshold inverter.
//
// Interface: clk, rst_n, j, k inputs; q, q_n outputs.
// Timing: q changes one clock edge after j/k are applied.
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_n
);

  logic p;       // J & ~Q
  logic q_next;  // Q(t+1)

  tlg_and2n u_p (
    .a(j),
    .b(q),
    .y(p)
  );

  // x[0] = K (weight -1), x[1] = P (weight 2), x[2] = Q (weight 1)
  tlg_gate #(
    .N    (3),
    .W    ('{0: -1, 1: 2, 2: 1, default: 0}),
    .THETA(1)
  ) u_next (
    .x({q, p, k}),
    .y(q_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= q_next;
  end

  tlg_inv u_qn (
    .a(q),
    .y(q_n)
  );

endmodule
