// accumulator: N-bit threshold-logic accumulator register (top level).
//
// N acc_stage slices are cascaded; stage 1 is the least significant,
// rightmost bit and a[0] holds A_1. One selection line S1..S9 chooses the
// micro-operation performed at the next rising clock edge:
//   S1 A <- A + B + c_in    S2 A <- 0        S3 A <- ~A
//   S4 A <- A & B           S5 A <- A | B    S6 A <- A ^ B
//   S7 shift right: A_i <- A(i+1), A_N <- sr_in
//   S8 shift left:  A_i <- A(i-1), A_1 <- sl_in
//   S9 A <- A + 1
// With no line raised the register holds. The lines must be mutually
// exclusive; an assertion checks that at most one is high.
//
// Stage interconnect (all ripple, combinational): the add carry C, the
// increment carry E (E_1 = S9) and the zero chain Z (Z_1 = 1) pass from stage
// i to stage i+1. z is 1 whenever the register holds zero; c_out is C(N+1),
// the add carry out of the present state and B; e_out is E(N+1), high while
// incrementing an all-ones register. S1..S8 and the clock go to every stage.
// This wiring, including serial input A(N+1) for right shift and A_0 for
// left shift, follows the source design's 4-bit cascade. The reset is this
// design's addition. TLG_MERGED is passed to every stage: 1 builds the
// stages from merged threshold nodes, 0 in the literal gate-level form (see
// acc_stage); the function is the same.
//
// Interface: clk, rst_n (asynchronous, active low), sel[9:1] = S9..S1,
// b[N-1:0], c_in, sr_in, sl_in; outputs a[N-1:0], z, c_out, e_out.
// Timing: one micro-operation per clock; results appear one edge after the
// selection line is raised. The carry, increment and zero chains ripple
// through all N stages within the clock period.
module accumulator
  import tlg_pkg::*;
#(
  parameter int unsigned N              = ACC_BITS,
  parameter bit          TLG_MERGED = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  acc_sel_t     sel,
  input  logic [N-1:0] b,
  input  logic         c_in,
  input  logic         sr_in,
  input  logic         sl_in,
  output logic [N-1:0] a,
  output logic         z,
  output logic         c_out,
  output logic         e_out
);

  logic [N:0]   c;     // c[i] = C(i+1)
  logic [N:0]   e;     // e[i] = E(i+1)
  logic [N:0]   zc;    // zc[i] = Z(i+1)
  logic [N+1:0] ax;    // ax[i] = A_i, with ax[0] = A_0 and ax[N+1] = A(N+1)

  assign c[0]    = c_in;
  assign e[0]    = sel[9];
  assign zc[0]   = 1'b1;
  assign ax[0]   = sl_in;
  assign ax[N+1] = sr_in;
  assign ax[N:1] = a;

  for (genvar i = 0; i < N; i++) begin : g_stage
    acc_stage #(
      .TLG_MERGED(TLG_MERGED)
    ) u_stage (
      .clk    (clk),
      .rst_n  (rst_n),
      .sel    (sel[8:1]),
      .b      (b[i]),
      .c_in   (c[i]),
      .e_in   (e[i]),
      .z_in   (zc[i]),
      .a_left (ax[i+2]),
      .a_right(ax[i]),
      .a      (a[i]),
      .c_out  (c[i+1]),
      .e_out  (e[i+1]),
      .z_out  (zc[i+1])
    );
  end

  assign z     = zc[N];
  assign c_out = c[N];
  assign e_out = e[N];

  // The selection lines are mutually exclusive.
  a_sel_onehot0 : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel))
    else $error("accumulator: more than one selection line raised: %b", sel);

endmodule
