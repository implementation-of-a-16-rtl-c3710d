// tb_approx_mult16: end-to-end test of the approximate multiplier at its
// default size (16 x 16).
//
// Drives operand pairs and compares the product with the reference model in
// amul_ref_pkg, bit for bit. It also checks these properties against the
// exact product a*b:
//   - the product never exceeds a*b, since every approximation lowers the sum
//   - multiplying by 0, 1 or a power of two is exact, since no column then
//     holds more than one partial-product one
// It drives corner cases and the operand pair 30000 x 20000, then random pairs.
// It counts the results that came out exact and those the compressors
// changed, and fails if either never happened. It reports the mean and the
// largest relative error. A clock only paces the stimulus and drives the
// watchdog.
module tb_approx_mult16;
  import amul_ref_pkg::*;

  localparam int N        = 16;
  localparam int NRANDOM  = 20000;
  localparam int WATCHDOG = 200000;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] product;
  logic           clk = 1'b0;

  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0;
  real err_sum = 0.0, err_max = 0.0;
  int  n_nonzero = 0;

  approx_mult16 dut (.a(a), .b(b), .product(product));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  amul_ref model = new(N);

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y, input bit want_exact);
    logic [2*N-1:0] exact, expect_v;
    a = x; b = y;
    @(posedge clk);
    exact    = (2*N)'(x) * (2*N)'(y);
    expect_v = model.multiply(64'(x), 64'(y))[2*N-1:0];
    checks++;
    if (product !== expect_v) begin
      failures++;
      $display("MISMATCH %0d * %0d: got %0d, model %0d", x, y, product, expect_v);
    end
    checks++;
    if (product > exact) begin
      failures++;
      $display("ABOVE EXACT %0d * %0d: got %0d, exact %0d", x, y, product, exact);
    end
    if (want_exact) begin
      checks++;
      if (product !== exact) begin
        failures++;
        $display("NOT EXACT %0d * %0d: got %0d, exact %0d", x, y, product, exact);
      end
    end
    if (product == exact) n_exact++; else n_approx++;
    if (exact != 0) begin
      real e = (real'(exact) - real'(product)) / real'(exact);
      err_sum += e; n_nonzero++;
      if (e > err_max) err_max = e;
    end
  endtask

  initial begin
    a = '0; b = '0;
    // corner cases
    apply('0, '0, 1);
    apply('1, '0, 1);
    apply('0, '1, 1);
    apply(16'd1, '1, 1);
    apply('1, 16'd1, 1);
    for (int k = 0; k < N; k++) begin
      apply(16'(1) << k, 16'($urandom), 1);
      apply(16'($urandom), 16'(1) << k, 1);
    end
    apply('1, '1, 0);
    // operand pair shown in the design's published simulation
    apply(16'd30000, 16'd20000, 0);
    $display("30000 * 20000 = %0d (exact 600000000)", product);
    for (int i = 0; i < NRANDOM; i++) apply(16'($urandom), 16'($urandom), 0);

    $display("exact results: %0d, approximated results: %0d", n_exact, n_approx);
    $display("mean relative error %e, largest %e", err_sum / n_nonzero, err_max);
    checks++;
    if (n_exact == 0)  begin failures++; $display("no exact result seen"); end
    checks++;
    if (n_approx == 0) begin failures++; $display("no approximated result seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
