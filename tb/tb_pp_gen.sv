// tb_pp_gen: checks the partial-product generator at N = 16. For random and
// corner operands it walks the packed output column by column (column c holds
// min(c+1, 2N-1-c) bits, row ascending) and compares each bit with a[c-i] & b[i].
module tb_pp_gen;
  localparam int N = 16;
  logic [N-1:0]   a, b;
  logic [N*N-1:0] cols;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .cols(cols));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    int p = 0;
    a = x; b = y;
    @(posedge clk);
    for (int c = 0; c < 2*N-1; c++)
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N) begin
          checks++;
          if (cols[p] !== (x[c-i] & y[i])) begin
            failures++;
            $display("FAIL a=%h b=%h column %0d row %0d", x, y, c, i);
          end
          p++;
        end
    checks++;
    if (p != N*N) begin failures++; $display("FAIL bit count %0d", p); end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check(16'h8001, 16'h0001);
    for (int k = 0; k < 200; k++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
