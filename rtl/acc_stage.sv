// acc_stage: one bit-slice (stage i) of the threshold-logic accumulator.
//
// Each stage holds one bit A_i in a JK flip-flop. Because the selection
// lines S1..S8 are mutually exclusive, the J and K inputs are simply the OR
// of one small product term per micro-operation, the increment carry E_i
// being the last term of each:
//   J = B~C S1 | ~BC S1 | S3 | B S5 | B S6 | A(i+1) S7 | A(i-1) S8 | E_i
//   K = B~C S1 | ~BC S1 | S2 | S3 | ~B S4 | B S6 | ~A(i+1) S7 | ~A(i-1) S8 | E_i
// J collects eight terms in an 8-input threshold OR and K nine terms in a
// 9-input threshold OR. Add toggles A_i when B xor C (full-adder sum), clear
// resets through K, complement toggles, AND clears when ~B, OR sets when B,
// XOR toggles when B, the shifts copy a neighbour, increment toggles on E_i.
//
// The stage also forms three ripple signals for its left neighbour:
//   C(i+1) = A B + B C + C A   (add carry)
//   E(i+1) = A E               (increment carry)
//   Z(i+1) = Z ~A              (zero-detect chain, from the flip-flop's ~Q)
// The equations, gate types and weights are the source design's. The
// TLG_MERGED parameter chooses how the terms with a complemented literal and
// the carry are realised; both choices compute the same function:
//   1 (default) merged threshold nodes, as the source design does for
//     threshold logic: A&~B and A&~B&C as single nodes with a negative
//     weight, the carry as one majority node;
//   0 the literal gate-level stage diagram: threshold inverters feeding
//     plain 2- and 3-input ANDs, and the carry as three ANDs and a 3-input OR.
// S9 is not an input: it enters the first stage only, as E_1.
//
// Interface: sel[8:1] = S8..S1, b = B_i, c_in = C_i, e_in = E_i, z_in = Z_i,
// a_left = A(i+1), a_right = A(i-1); outputs a = A_i, c_out, e_out, z_out.
// Timing: A_i loads on the rising clock edge; c_out, e_out and z_out are
// combinational from the present state and the stage inputs.
module acc_stage #(
  parameter bit TLG_MERGED = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [8:1] sel,
  input  logic       b,
  input  logic       c_in,
  input  logic       e_in,
  input  logic       z_in,
  input  logic       a_left,
  input  logic       a_right,
  output logic       a,
  output logic       c_out,
  output logic       e_out,
  output logic       z_out
);

  logic add_1, add_2;   // B~C S1, ~BC S1
  logic or_t, xor_t;    // B S5, B S6
  logic shr_j, shr_k;   // A(i+1) S7, ~A(i+1) S7
  logic shl_j, shl_k;   // A(i-1) S8, ~A(i-1) S8
  logic and_k;          // ~B S4
  logic j, k;
  logic a_n;            // ~A_i from the flip-flop

  // ---- micro-operation product terms -------------------------------------
  tlg_and2  u_or   (.a(b),      .b(sel[5]),                .y(or_t));
  tlg_and2  u_xor  (.a(b),      .b(sel[6]),                .y(xor_t));
  tlg_and2  u_shrj (.a(a_left), .b(sel[7]),                .y(shr_j));
  tlg_and2  u_shlj (.a(a_right),.b(sel[8]),                .y(shl_j));

  generate
    if (TLG_MERGED) begin : g_terms_tlg
      tlg_and3n u_add1 (.a(b),      .b(c_in),    .c(sel[1]), .y(add_1));
      tlg_and3n u_add2 (.a(c_in),   .b(b),       .c(sel[1]), .y(add_2));
      tlg_and2n u_andk (.a(sel[4]), .b(b),                     .y(and_k));
      tlg_and2n u_shrk (.a(sel[7]), .b(a_left),                .y(shr_k));
      tlg_and2n u_shlk (.a(sel[8]), .b(a_right),               .y(shl_k));
    end else begin : g_terms_gates
      logic b_n, c_n, al_n, ar_n;
      tlg_inv   u_bn   (.a(b),       .y(b_n));
      tlg_inv   u_cn   (.a(c_in),    .y(c_n));
      tlg_inv   u_aln  (.a(a_left),  .y(al_n));
      tlg_inv   u_arn  (.a(a_right), .y(ar_n));
      tlg_and3  u_add1 (.a(b),      .b(c_n),     .c(sel[1]), .y(add_1));
      tlg_and3  u_add2 (.a(b_n),    .b(c_in),    .c(sel[1]), .y(add_2));
      tlg_and2  u_andk (.a(sel[4]), .b(b_n),                   .y(and_k));
      tlg_and2  u_shrk (.a(sel[7]), .b(al_n),                  .y(shr_k));
      tlg_and2  u_shlk (.a(sel[8]), .b(ar_n),                  .y(shl_k));
    end
  endgenerate

  // ---- J and K merge -------------------------------------------------------
  tlg_or8 u_j (
    .x({e_in, shl_j, shr_j, xor_t, or_t, sel[3], add_2, add_1}),
    .y(j)
  );

  tlg_or9 u_k (
    .x({e_in, shl_k, shr_k, xor_t, and_k, sel[3], sel[2], add_2, add_1}),
    .y(k)
  );

  // ---- storage -------------------------------------------------------------
  jk_ff u_ff (
    .clk  (clk),
    .rst_n(rst_n),
    .j    (j),
    .k    (k),
    .q    (a),
    .q_n  (a_n)
  );

  // ---- ripple outputs ------------------------------------------------------
  generate
    if (TLG_MERGED) begin : g_carry_tlg
      tlg_maj3 u_carry (.a(a), .b(b), .c(c_in), .y(c_out));
    end else begin : g_carry_gates
      logic ab, bc, ca;
      tlg_and2 u_ab (.a(a),    .b(b),    .y(ab));
      tlg_and2 u_bc (.a(b),    .b(c_in), .y(bc));
      tlg_and2 u_ca (.a(c_in), .b(a),    .y(ca));
      tlg_or3  u_or (.a(ab),   .b(bc),   .c(ca), .y(c_out));
    end
  endgenerate

  tlg_and2 u_inc  (.a(a),    .b(e_in), .y(e_out));
  tlg_and2 u_zero (.a(z_in), .b(a_n),  .y(z_out));

endmodule
