// tb_acc_stage: self-check of one accumulator stage.
//
// Two stages are driven in parallel with the same inputs: one built from
// merged threshold nodes (default) and one in the gate-level form with
// inverters, plain ANDs and an AND/OR carry (TLG_MERGED = 0). Part 1
// replays the single-stage input/output cases of the reference table (add
// 0+1+1 gives sum 0 carry 1, clear, complement, the AND/OR/XOR truth tables,
// shift-in of a 1 from either neighbour). Part 2 applies 600 random cycles:
// one of S1..S8 or, with no line raised, the increment carry E_i. Before each
// edge the ripple outputs C(i+1) = maj(A,B,C), E(i+1) = A&E and
// Z(i+1) = Z&~A are checked; after the edge A_i is compared with a model of
// the micro-operation. Every micro-operation must have been exercised.
module tb_acc_stage;
  import tlg_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [8:1] sel = '0;
  logic       b = 0, c_in = 0, e_in = 0, z_in = 0, a_left = 0, a_right = 0;
  logic       a_m, c_m, e_m, z_m;   // merged-node stage
  logic       a_g, c_g, e_g, z_g;   // gate-level stage
  int checks = 0, failures = 0;
  int seen [10];

  acc_stage dut_m (
    .clk(clk), .rst_n(rst_n), .sel(sel), .b(b), .c_in(c_in), .e_in(e_in), .z_in(z_in),
    .a_left(a_left), .a_right(a_right), .a(a_m), .c_out(c_m), .e_out(e_m), .z_out(z_m)
  );

  acc_stage #(.TLG_MERGED(1'b0)) dut_g (
    .clk(clk), .rst_n(rst_n), .sel(sel), .b(b), .c_in(c_in), .e_in(e_in), .z_in(z_in),
    .a_left(a_left), .a_right(a_right), .a(a_g), .c_out(c_g), .e_out(e_g), .z_out(z_g)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic next_a(acc_op_e op, logic a, logic bb, logic c, logic e,
                                  logic al, logic ar);
    case (op)
      OP_ADD:   return a ^ bb ^ c;
      OP_CLEAR: return 1'b0;
      OP_COMPL: return ~a;
      OP_AND:   return a & bb;
      OP_OR:    return a | bb;
      OP_XOR:   return a ^ bb;
      OP_SHR:   return al;
      OP_SHL:   return ar;
      OP_INC:   return a ^ e;       // stage view of S9: the carry E_i
      default:  return a;
    endcase
  endfunction

  function automatic void check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b expected=%b", what, got, exp);
    end
  endfunction

  // Force the stored bit to `v` with a set/reset through S5/S2.
  task automatic load(logic v);
    @(negedge clk);
    sel = '0; e_in = 0;
    if (v) begin b = 1'b1; sel[5] = 1'b1; end
    else   begin sel[2] = 1'b1; end
    @(posedge clk);
    #1;
    sel = '0;
  endtask

  // One micro-operation from the present state; checks ripple outputs and result.
  task automatic step(acc_op_e op, logic bb, logic c, logic e, logic z, logic al, logic ar);
    logic a0, exp;
    @(negedge clk);
    a0 = a_m;
    sel = '0;
    if (op != OP_INC && op != OP_NONE) sel[op] = 1'b1;
    b = bb; c_in = c; e_in = (op == OP_INC) ? e : 1'b0; z_in = z; a_left = al; a_right = ar;
    #1;
    check("c_out (merged)", c_m, (a0 & bb) | (bb & c) | (c & a0));
    check("c_out (gates)",    c_g, (a0 & bb) | (bb & c) | (c & a0));
    check("e_out (merged)", e_m, a0 & e_in);
    check("z_out (merged)", z_m, z & ~a0);
    check("e_out (gates)",  e_g, a0 & e_in);
    check("z_out (gates)",  z_g, z & ~a0);
    exp = next_a(op, a0, bb, c, e_in, al, ar);
    seen[op]++;
    @(posedge clk);
    #1;
    check($sformatf("A after op %0d (merged)", op), a_m, exp);
    check($sformatf("A after op %0d (gates)", op), a_g, exp);
  endtask

  initial begin
    seen = '{default: 0};
    repeat (2) @(posedge clk);
    #1;
    check("reset", a_m, 1'b0);
    rst_n = 1'b1;

    // ---- Part 1: the reference single-stage cases -------------------------
    load(0); step(OP_ADD, 1, 1, 0, 1, 0, 0);                 // 0+1+1: sum 0
    check("add case sum", a_m, 1'b0);
    load(1); step(OP_CLEAR, 0, 0, 0, 1, 0, 0);
    check("clear case", a_m, 1'b0);
    load(0); step(OP_COMPL, 0, 0, 0, 1, 0, 0);
    check("complement 0", a_m, 1'b1);
    step(OP_COMPL, 0, 0, 0, 1, 0, 0);
    check("complement 1", a_m, 1'b0);
    for (int v = 0; v < 4; v++) begin
      load(v[1]); step(OP_AND, v[0], 0, 0, 1, 0, 0);
      check("AND table", a_m, v[1] & v[0]);
      load(v[1]); step(OP_OR,  v[0], 0, 0, 1, 0, 0);
      check("OR table",  a_m, v[1] | v[0]);
      load(v[1]); step(OP_XOR, v[0], 0, 0, 1, 0, 0);
      check("XOR table", a_m, v[1] ^ v[0]);
    end
    for (int v = 0; v < 2; v++) begin
      load(v[0]); step(OP_SHR, 0, 0, 0, 1, 1, 0);
      check("shift-right in 1", a_m, 1'b1);
      load(v[0]); step(OP_SHL, 0, 0, 0, 1, 0, 1);
      check("shift-left in 1", a_m, 1'b1);
    end

    // ---- Part 2: random cycles ---------------------------------------------
    for (int n = 0; n < 600; n++) begin
      acc_op_e op;
      op = acc_op_e'($urandom_range(1, 9));
      step(op, 1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom),
           1'($urandom), 1'($urandom));
    end
    for (int o = 1; o <= 9; o++) begin
      checks++;
      if (seen[o] == 0) begin failures++; $display("FAIL op %0d never exercised", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
