// tb_tlg_or8: exhaustive self-check of tlg_or8.
//
// Applies all 256 input combinations and compares y with the reduction OR
// of the inputs.
module tb_tlg_or8;
  logic [7:0] x;
  logic y;
  int checks = 0, failures = 0;

  tlg_or8 dut (.x(x), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = i[7:0];
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
