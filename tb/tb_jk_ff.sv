// tb_jk_ff: self-check of the threshold-logic JK flip-flop.
//
// Resets, then applies random J/K pairs for 400 clock edges. A reference
// model of the JK truth table (hold, reset, set, toggle) predicts q after
// every edge; q_n is checked to be its complement. Each of the four J/K
// cases is counted and must occur.
module tb_jk_ff;
  logic clk = 1'b0, rst_n = 1'b0;
  logic j = 1'b0, k = 1'b0;
  logic q, q_n;
  logic model;
  int checks = 0, failures = 0;
  int seen [4];

  jk_ff dut (.clk(clk), .rst_n(rst_n), .j(j), .k(k), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '{default: 0};
    model = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset q=%b", q); end
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      j = 1'($urandom_range(0, 1));
      k = 1'($urandom_range(0, 1));
      seen[{j, k}]++;
      case ({j, k})
        2'b00: model = model;
        2'b01: model = 1'b0;
        2'b10: model = 1'b1;
        2'b11: model = ~model;
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++;
        $display("FAIL j=%b k=%b q=%b q_n=%b expected=%b", j, k, q, q_n, model);
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL J/K case %0d never applied", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
