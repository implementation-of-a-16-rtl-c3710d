// tb_approx_compressor_5_2: exhaustive test of the approximate 5:2
// compressor. For each of the 32 input patterns it checks s + 2c against
// min(popcount, 3). It also counts the patterns where the output is exact and
// where it is one or two low, and expects 26, 5 and 1.
module tb_approx_compressor_5_2;
  logic [4:0] x;
  logic s, c;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int n_exact = 0, n_low1 = 0, n_low2 = 0;

  approx_compressor_5_2 dut (.x(x), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int ones, want, got;
      x = 5'(v);
      @(posedge clk);
      ones = $countones(x);
      want = (ones > 3) ? 3 : ones;
      got  = int'(s) + 2 * int'(c);
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL x=%b -> s=%b c=%b (want %0d)", x, s, c, want);
      end
      case (ones - got)
        0: n_exact++;
        1: n_low1++;
        2: n_low2++;
        default: ;
      endcase
    end
    checks++;
    if (n_exact != 26 || n_low1 != 5 || n_low2 != 1) begin
      failures++;
      $display("FAIL error profile exact=%0d low1=%0d low2=%0d", n_exact, n_low1, n_low2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
