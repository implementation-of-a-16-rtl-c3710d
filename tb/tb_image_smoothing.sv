// tb_image_smoothing: image smoothing on the approximate multiplier, the kind
// of error-tolerant application the design is meant for.
//
// The test generates a 32 x 32 image of 8-bit pixels: smooth gradients plus
// pseudo-random texture. It filters the image with a 3 x 3 Gaussian kernel
// (sigma = 1, normalised). Each pixel-by-weight product runs through
// approx_mult16 at its default size. The pixel is the multiplicand, and the
// weight is a 0.16 fixed-point fraction: 4923 at the corners, 8116 at the
// edges, 13381 at the centre, summing to 65537. For each
// output pixel the test keeps the sum of the approximate products and the
// sum of the exact ones. Every product is checked bit for bit against the
// reference model and must not exceed the exact product. At the end the test
// reports the PSNR of the approximate image against the exact one and
// requires at least 40 dB.
module tb_image_smoothing;
  import amul_ref_pkg::*;

  localparam int W = 32;
  localparam int H = 32;
  localparam real MIN_PSNR = 40.0;

  logic [15:0] a, b;
  logic [31:0] product;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int n_prod_approx = 0;

  approx_mult16 dut (.a(a), .b(b), .product(product));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  amul_ref model = new(16);
  logic [7:0] img [H][W];

  task automatic mul(input logic [15:0] x, input logic [15:0] y,
                     output logic [31:0] approx, output logic [31:0] exact);
    logic [31:0] want;
    a = x; b = y;
    @(posedge clk);
    approx = product;
    exact  = 32'(x) * 32'(y);
    want   = model.multiply(64'(x), 64'(y))[31:0];
    checks++;
    if (approx !== want || approx > exact) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d, model %0d, exact %0d", x, y, approx, want, exact);
    end
    if (approx != exact) n_prod_approx++;
  endtask

  initial begin
    real se, psnr;
    int kern [3][3];
    kern = '{'{4923, 8116, 4923}, '{8116, 13381, 8116}, '{4923, 8116, 4923}};
    a = '0; b = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = 8'((x * 5 + y * 3 + int'($urandom_range(40))) % 256);

    se = 0.0;
    for (int y = 1; y < H-1; y++)
      for (int x = 1; x < W-1; x++) begin
        logic [31:0] pa, pe, acc_a, acc_e;
        int out_a, out_e;
        acc_a = '0; acc_e = '0;
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++) begin
            mul(16'(img[y+dy-1][x+dx-1]), 16'(kern[dy][dx]), pa, pe);
            acc_a += pa; acc_e += pe;
          end
        out_a = int'(acc_a >> 16);
        out_e = int'(acc_e >> 16);
        se += real'((out_a - out_e) * (out_a - out_e));
      end
    se = se / real'((W-2) * (H-2));
    psnr = (se == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / se);
    $display("smoothed %0dx%0d image: %0d of %0d products approximated, PSNR %0.2f dB",
             W-2, H-2, n_prod_approx, (W-2)*(H-2)*9, psnr);
    checks++;
    if (psnr < MIN_PSNR) begin failures++; $display("FAIL PSNR below %0.1f dB", MIN_PSNR); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
