// tb_accumulator: end-to-end self-check of the accumulator at its default
// size (four stages, merged threshold nodes).
//
// A reference model on plain integers predicts the register after every
// micro-operation and, before each edge, the zero flag, the add carry out of
// the last stage and the increment carry out. The sequence opens with fixed
// cases (increment 1001 -> 1010, an add with carry out, increment of 1111
// wrapping to 0000, both shifts with a serial 1, clear to zero), then runs
// 1500 random micro-operations, with a no-operation cycle mixed in. Each
// mechanism must occur at least once: every one of S1..S9, a hold cycle, an
// add with carry out, an add with carry in, an increment overflow, zero flag
// high and low, and a 1 shifted in from each serial input. The register is
// also checked to change exactly one clock edge after the line is raised.
module tb_accumulator;
  import tlg_pkg::*;

  localparam int unsigned N = ACC_BITS;

  logic         clk = 1'b0, rst_n = 1'b0;
  acc_sel_t     sel = '0;
  logic [N-1:0] b = '0;
  logic         c_in = 1'b0, sr_in = 1'b0, sl_in = 1'b0;
  logic [N-1:0] a;
  logic         z, c_out, e_out;

  logic [N-1:0] model;
  int checks = 0, failures = 0;
  int seen_op [10];
  int n_carry_out = 0, n_carry_in = 0, n_inc_ovf = 0, n_zero = 0, n_nonzero = 0;
  int n_sr_one = 0, n_sl_one = 0;

  accumulator dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .b(b), .c_in(c_in), .sr_in(sr_in),
    .sl_in(sl_in), .a(a), .z(z), .c_out(c_out), .e_out(e_out)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b expected=%b", what, got, exp);
    end
  endfunction

  task automatic op(acc_op_e o, logic [N-1:0] bb, logic ci, logic sr, logic sl);
    logic [N:0]   sum;
    logic [N-1:0] exp;
    @(negedge clk);
    sel = op_to_sel(o); b = bb; c_in = ci; sr_in = sr; sl_in = sl;
    #1;
    // combinational flags from the present state
    sum = {1'b0, model} + {1'b0, bb} + (N+1)'(ci);
    check("zero flag", N'(z), N'(model == '0));
    check("add carry out", N'(c_out), N'(sum[N]));
    check("increment carry out", N'(e_out), N'(o == OP_INC && model == '1));
    if (model == '0) n_zero++; else n_nonzero++;
    case (o)
      OP_ADD:   begin exp = sum[N-1:0]; if (sum[N]) n_carry_out++; if (ci) n_carry_in++; end
      OP_CLEAR: exp = '0;
      OP_COMPL: exp = ~model;
      OP_AND:   exp = model & bb;
      OP_OR:    exp = model | bb;
      OP_XOR:   exp = model ^ bb;
      OP_SHR:   begin exp = {sr, model[N-1:1]}; if (sr) n_sr_one++; end
      OP_SHL:   begin exp = {model[N-2:0], sl}; if (sl) n_sl_one++; end
      OP_INC:   begin exp = model + 1'b1; if (model == '1) n_inc_ovf++; end
      default:  exp = model;
    endcase
    seen_op[o]++;
    // nothing may change before the edge
    check($sformatf("register before edge, op %0d", o), a, model);
    @(posedge clk);
    #1;
    model = exp;
    check($sformatf("register after op %0d", o), a, model);
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL %s never happened", what); end
    else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    seen_op = '{default: 0};
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    check("reset", a, '0);
    rst_n = 1'b1;

    // fixed cases
    op(OP_OR,    N'(9),  0, 0, 0);            // load 1001
    op(OP_INC,   '0,     0, 0, 0);            // 1001 -> 1010
    check("increment 1001", a, N'(10));
    op(OP_ADD,   N'(7),  1, 0, 0);            // 1010 + 0111 + 1
    op(OP_ADD,   '1,     1, 0, 0);            // carry out of the last stage
    op(OP_CLEAR, '0,     0, 0, 0);
    op(OP_COMPL, '0,     0, 0, 0);            // all ones
    op(OP_INC,   '0,     0, 0, 0);            // wraps to zero, increment carry out
    op(OP_SHR,   '0,     0, 1, 0);            // 1 enters at the top
    op(OP_SHL,   '0,     0, 0, 1);            // 1 enters at the bottom
    op(OP_NONE,  '1,     1, 1, 1);            // hold

    // random micro-operations
    for (int n = 0; n < 1500; n++) begin
      acc_op_e o;
      o = acc_op_e'($urandom_range(0, 9));
      op(o, N'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    end

    $display("mechanism counts:");
    need("S1 add",                seen_op[OP_ADD]);
    need("S2 clear",              seen_op[OP_CLEAR]);
    need("S3 complement",         seen_op[OP_COMPL]);
    need("S4 AND",                seen_op[OP_AND]);
    need("S5 OR",                 seen_op[OP_OR]);
    need("S6 XOR",                seen_op[OP_XOR]);
    need("S7 shift right",        seen_op[OP_SHR]);
    need("S8 shift left",         seen_op[OP_SHL]);
    need("S9 increment",          seen_op[OP_INC]);
    need("hold (no line)",        seen_op[OP_NONE]);
    need("add carry out",         n_carry_out);
    need("add with carry in",     n_carry_in);
    need("increment overflow",    n_inc_ovf);
    need("zero flag high",        n_zero);
    need("zero flag low",         n_nonzero);
    need("serial 1 in, right",    n_sr_one);
    need("serial 1 in, left",     n_sl_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
