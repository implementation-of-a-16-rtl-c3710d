// tb_final_adder: tests stage 4 at N = 16. Random bits in the stage-3
// layout (at most three per column) go in. The output must equal the sum of
// all input bits, each weighted by 2**column, modulo 2**(2N). Densities run
// from empty to all ones, so that the two carries of every column ripple.
module tb_final_adder;
  import amul_pkg::*;

  localparam int N = 16;
  localparam int W = stage_width(N, NUM_STAGES);

  logic [W-1:0]   bits_in;
  logic [2*N-1:0] product;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  final_adder dut (.bits_in(bits_in), .product(product));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [2*N+3:0] want;
      int pct, p;
      pct = (t == 0) ? 0 : (t == 1) ? 100 : int'($urandom_range(100));
      for (int i = 0; i < W; i++) bits_in[i] = ($urandom_range(99) < pct);
      @(posedge clk);
      want = '0; p = 0;
      for (int c = 0; c < 2*N; c++)
        for (int r = 0; r < stage_height(N, NUM_STAGES, c); r++) begin
          if (bits_in[p]) want += (2*N+4)'(1) << c;
          p++;
        end
      checks++;
      if (product !== want[2*N-1:0]) begin
        failures++;
        $display("FAIL got %h want %h", product, want[2*N-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
