// tb_reduction_stage: tests stages 1, 2 and 3 of the reduction tree at
// N = 16, each on its own. Every stage is fed random bits in its input
// layout. The bits have a chosen density, so that compressors see four or
// five ones often. The outputs are compared bit for bit with one step of
// the reference model in amul_ref_pkg. The test also checks that each stage
// never raises the weighted sum of its bits and keeps it whenever no
// compressor could have saturated. The column heights the reference produces
// must match the widths the RTL declares. It counts the vectors where a
// stage changed the sum and fails if stage 1 never did.
module tb_reduction_stage;
  import amul_pkg::*;
  import amul_ref_pkg::*;

  localparam int N  = 16;
  localparam int W0 = stage_width(N, 0);
  localparam int W1 = stage_width(N, 1);
  localparam int W2 = stage_width(N, 2);
  localparam int W3 = stage_width(N, 3);

  logic [W0-1:0] in1;
  logic [W1-1:0] out1, in2;
  logic [W2-1:0] out2, in3;
  logic [W3-1:0] out3;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int n_lossy [4];

  reduction_stage #(.N(N), .STAGE(1)) u_st1 (.bits_in(in1), .bits_out(out1));
  reduction_stage #(.N(N), .STAGE(2)) u_st2 (.bits_in(in2), .bits_out(out2));
  reduction_stage #(.N(N), .STAGE(3)) u_st3 (.bits_in(in3), .bits_out(out3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  amul_ref model = new(N);

  function automatic bit [1023:0] rand_bits(int w, int pct);
    bit [1023:0] v = '0;
    for (int i = 0; i < w; i++) v[i] = ($urandom_range(99) < pct);
    return v;
  endfunction

  // compare one stage's output with the model run on the same input
  task automatic compare(int st, bit [1023:0] vin, bit [1023:0] vout, int wout, bit must_keep);
    int hin [RC];
    bit [127:0] sum_in, sum_out;
    for (int c = 0; c < RC; c++) hin[c] = (c < 2*N) ? stage_height(N, st-1, c) : 0;
    model.load_packed(vin, hin);
    sum_in = model.total();
    model.stage(st);
    checks++;
    if (model.packed_bits() != vout) begin
      failures++;
      $display("FAIL stage %0d output differs from model", st);
    end
    checks++;
    begin
      int w = 0;
      for (int c = 0; c < RC; c++) w += model.h[c];
      if (w != wout) begin failures++; $display("FAIL stage %0d width %0d vs %0d", st, w, wout); end
    end
    sum_out = model.total();
    checks++;
    if (sum_out > sum_in) begin failures++; $display("FAIL stage %0d raised the sum", st); end
    if (sum_out != sum_in) n_lossy[st]++;
    if (must_keep) begin
      checks++;
      if (sum_out != sum_in) begin failures++; $display("FAIL stage %0d lost value on a sparse input", st); end
    end
  endtask

  initial begin
    bit [1023:0] v1, v2, v3;
    for (int k = 0; k < 4; k++) n_lossy[k] = 0;
    in1 = '0; in2 = '0; in3 = '0;
    for (int t = 0; t < 600; t++) begin
      int pct;
      pct = (t < 30) ? 0 : (t < 60) ? 100 : 10 + (t % 9) * 10;
      v1 = rand_bits(W0, pct); v2 = rand_bits(W1, pct); v3 = rand_bits(W2, pct);
      in1 = v1[W0-1:0]; in2 = v2[W1-1:0]; in3 = v3[W2-1:0];
      @(posedge clk);
      compare(1, v1, 1024'(out1), W1, 1'b0);
      compare(2, v2, 1024'(out2), W2, 1'b0);
      compare(3, v3, 1024'(out3), W3, 1'b0);
      // sparse input: at most three ones anywhere, so nothing may be lost
      if (t < 30) begin
        for (int j = 0; j < 3; j++) v1[$urandom_range(W0-1)] = 1'b1;
        in1 = v1[W0-1:0];
        @(posedge clk);
        compare(1, v1, 1024'(out1), W1, 1'b1);
      end
    end
    $display("stages that lost value: stage1 %0d, stage2 %0d, stage3 %0d vectors",
             n_lossy[1], n_lossy[2], n_lossy[3]);
    checks++;
    if (n_lossy[1] == 0) begin failures++; $display("FAIL stage 1 never saturated a compressor"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
