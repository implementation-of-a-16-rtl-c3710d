// tb_half_adder: exhaustive test of half_adder against a + b.
module tb_half_adder;
  logic a, b, s, c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if (2'(s) + 2'({c, 1'b0}) != 2'(a) + 2'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> s=%b c=%b", a, b, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
