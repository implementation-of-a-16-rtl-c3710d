// tb_full_adder: exhaustive test of full_adder against a + b + ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      @(posedge clk);
      checks++;
      if ({co, s} != 2'(a) + 2'(b) + 2'(ci)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> s=%b co=%b", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
