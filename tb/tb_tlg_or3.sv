// tb_tlg_or3: exhaustive self-check of tlg_or3.
//
// Applies all 8 input combinations and compares y with the Boolean
// expression a | b | c, evaluated here independently of the threshold node.
module tb_tlg_or3;
  logic a;
  logic b;
  logic c;
  logic y;
  int checks = 0, failures = 0;

  tlg_or3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [2:0] v;
      logic exp;
      v = i[2:0];
      a = v[0];
      b = v[1];
      c = v[2];
      #1;
      exp = a | b | c;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL inputs=%b y=%b expected=%b", v, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
