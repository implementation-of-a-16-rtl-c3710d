// final_adder: stage 4, the carry-propagate adder that turns the at most
// three bits per column left by stage 3 into the 2N-bit product.
//
// Column c adds its bits b0, b1 and b2 (missing bits are zero) and the two
// carries that column c-1 sends up. A first full adder sums b0..b2. A second
// one sums that result with the two incoming carries and gives product[c].
// Both full adders send their carries to column c+1. Five inputs can reach
// at most 1 + 2*2, so the stage is exact. Each full adder is two half adders
// and an OR gate. The carries out of the top column are always zero, because
// the reduction only ever lowers the total, so they are left unused.
//
// Half adders in stage four follow the document. Pairing them into full
// adders, so that the sum comes out exact, is this design's choice. Combinational,
// a ripple path of 2N columns.
module final_adder
  import amul_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [stage_width(N, NUM_STAGES)-1:0] bits_in,
  output logic [2*N-1:0]                        product
);
  logic [2*N:0] cy_a;  // carry of each column's first full adder
  logic [2*N:0] cy_b;  // carry of each column's second full adder

  assign cy_a[0] = 1'b0;
  assign cy_b[0] = 1'b0;

  for (genvar c = 0; c < 2*N; c++) begin : g_col
    localparam int H   = stage_height(N, NUM_STAGES, c);
    localparam int OFF = stage_offset(N, NUM_STAGES, c);
    logic [FINAL_ROWS-1:0] b;
    logic s1, t1, t2, c1a, c1b, c2a, c2b;

    if (H > FINAL_ROWS) begin : g_too_tall
      $error("final_adder: column %0d holds %0d bits, more than %0d", c, H, FINAL_ROWS);
    end
    for (genvar r = 0; r < FINAL_ROWS; r++) begin : g_bit
      if (r < H) begin : g_used
        assign b[r] = bits_in[OFF + r];
      end else begin : g_zero
        assign b[r] = 1'b0;
      end
    end

    // b0 + b1 + b2 -> s1 + 2*cy_a[c+1]
    half_adder u_ha1 (.a(b[0]), .b(b[1]),     .s(t1),         .c(c1a));
    half_adder u_ha2 (.a(t1),   .b(b[2]),     .s(s1),         .c(c1b));
    assign cy_a[c+1] = c1a | c1b;
    // s1 + cy_a[c] + cy_b[c] -> product[c] + 2*cy_b[c+1]
    half_adder u_ha3 (.a(s1),   .b(cy_a[c]),  .s(t2),         .c(c2a));
    half_adder u_ha4 (.a(t2),   .b(cy_b[c]),  .s(product[c]), .c(c2b));
    assign cy_b[c+1] = c2a | c2b;
  end
endmodule
