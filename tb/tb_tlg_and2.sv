// tb_tlg_and2: exhaustive self-check of tlg_and2.
//
// Applies all 4 input combinations and compares y with the Boolean
// expression a & b, evaluated here independently of the threshold node.
module tb_tlg_and2;
  logic a;
  logic b;
  logic y;
  int checks = 0, failures = 0;

  tlg_and2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] v;
      logic exp;
      v = i[1:0];
      a = v[0];
      b = v[1];
      #1;
      exp = a & b;
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
