// tb_tlg_or9: exhaustive self-check of tlg_or9.
//
// Applies all 512 input combinations and compares y with the reduction OR
// of the inputs.
module tb_tlg_or9;
  logic [8:0] x;
  logic y;
  int checks = 0, failures = 0;

  tlg_or9 dut (.x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      x = i[8:0];
      #1;
      checks++;
      if (y !== (|x)) begin
        failures++;
        $display("FAIL x=%b y=%b", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
