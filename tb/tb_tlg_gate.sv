// tb_tlg_gate: self-check of the generic threshold node.
//
// Three instances: the default five-input node [4,3,3,1,1; 7], checked
// exhaustively against x1x2 + x1x3 + x2x3x4 + x2x3x5; a node with negative
// weights [2,-1,1,-2; 0]; and a 12-input node [1..12; 30]. The last two are
// checked against a weighted sum computed here for every input combination.
module tb_tlg_gate;
  logic [4:0]  x5;
  logic [3:0]  x4;
  logic [11:0] x12;
  logic        y5, y4, y12;
  int checks = 0, failures = 0;

  tlg_gate dut_default (.x(x5), .y(y5));

  tlg_gate #(
    .N(4), .W('{0: 2, 1: -1, 2: 1, 3: -2, default: 0}), .THETA(0)
  ) dut_neg (.x(x4), .y(y4));

  tlg_gate #(
    .N(12),
    .W('{0: 1, 1: 2, 2: 3, 3: 4, 4: 5, 5: 6, 6: 7, 7: 8, 8: 9, 9: 10, 10: 11, 11: 12,
         default: 0}),
    .THETA(30)
  ) dut_wide (.x(x12), .y(y12));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic exp;
      x5 = i[4:0];
      #1;
      exp = (x5[0] & x5[1]) | (x5[0] & x5[2]) | (x5[1] & x5[2] & x5[3]) |
            (x5[1] & x5[2] & x5[4]);
      checks++;
      if (y5 !== exp) begin
        failures++;
        $display("FAIL default x=%b y=%b exp=%b", x5, y5, exp);
      end
    end
    for (int i = 0; i < 16; i++) begin
      int s;
      x4 = i[3:0];
      #1;
      s = 2 * x4[0] - x4[1] + x4[2] - 2 * x4[3];
      checks++;
      if (y4 !== (s >= 0)) begin
        failures++;
        $display("FAIL neg x=%b y=%b sum=%0d", x4, y4, s);
      end
    end
    for (int i = 0; i < 4096; i++) begin
      int s;
      x12 = i[11:0];
      #1;
      s = 0;
      for (int k = 0; k < 12; k++) s += x12[k] * (k + 1);
      checks++;
      if (y12 !== (s >= 30)) begin
        failures++;
        $display("FAIL wide x=%b y=%b sum=%0d", x12, y12, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
