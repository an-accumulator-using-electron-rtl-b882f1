// tlg_pkg: types and constants shared by the threshold-logic accumulator.
//
// The accumulator is steered by nine mutually exclusive selection lines
// S1..S9. They are carried as a packed 9-bit vector indexed 9..1 so that
// bit k is S_k, exactly as the micro-operation table numbers them. The
// enum below names each line for testbenches and for readable code; the
// "check for zero" row of that table is a permanent output (Z), not a
// selection line, so it has no code here.
//
// ACC_BITS is the register width of the worked 4-bit example (four cascaded
// stages). Everything else in the design derives from it through parameters.
package tlg_pkg;

  localparam int unsigned ACC_BITS = 4;

  // Widest threshold node the weight vector of tlg_gate can describe.
  localparam int unsigned TLG_MAX_INPUTS = 16;

  // Selection vector: sel[k] is S_k, k = 1..9.
  typedef logic [9:1] acc_sel_t;

  typedef enum int unsigned {
    OP_NONE  = 0,  // no line raised: register holds
    OP_ADD   = 1,  // S1: A <- A + B (+ input carry)
    OP_CLEAR = 2,  // S2: A <- 0
    OP_COMPL = 3,  // S3: A <- ~A
    OP_AND   = 4,  // S4: A <- A & B
    OP_OR    = 5,  // S5: A <- A | B
    OP_XOR   = 6,  // S6: A <- A ^ B
    OP_SHR   = 7,  // S7: A <- shr A (towards stage 1)
    OP_SHL   = 8,  // S8: A <- shl A (towards stage n)
    OP_INC   = 9   // S9: A <- A + 1
  } acc_op_e;

  // One-hot selection vector that raises exactly the line of `op`.
  function automatic acc_sel_t op_to_sel(acc_op_e op);
    acc_sel_t s;
    s = '0;
    if (op != OP_NONE) s[op] = 1'b1;
    return s;
  endfunction

endpackage
