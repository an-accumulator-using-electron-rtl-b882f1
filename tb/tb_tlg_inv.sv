// tb_tlg_inv: exhaustive self-check of tlg_inv.
//
// Applies all 2 input combinations and compares y with the Boolean
// expression ~a, evaluated here independently of the threshold node.
module tb_tlg_inv;
  logic a;
  logic y;
  int checks = 0, failures = 0;

  tlg_inv dut (.a(a), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      logic [0:0] v;
      logic exp;
      v = i[0:0];
      a = v[0];
      #1;
      exp = ~a;
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
