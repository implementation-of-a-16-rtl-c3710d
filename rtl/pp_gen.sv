// pp_gen: partial-product generator of the N x N unsigned multiplier.
//
// Forms the N*N bits a[j] & b[i] (row i, weight 2**(i+j)) and packs them by
// column for stage 1 of the reduction tree. Column c = i + j holds its bits in
// ascending row order i. Columns follow each other LSB first, at the offsets
// amul_pkg::stage_offset(N, 0, c). Combinational.
//
// The AND array of 16 rows of 16 bits follows the document. The unsigned
// operands and the column packing are this design's choice.
module pp_gen
  import amul_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N*N-1:0] cols
);
  for (genvar c = 0; c < 2*N-1; c++) begin : g_col
    localparam int OFF  = stage_offset(N, 0, c);
    localparam int IMIN = (c < N) ? 0 : c - N + 1;
    localparam int IMAX = (c < N) ? c : N - 1;
    for (genvar i = IMIN; i <= IMAX; i++) begin : g_row
      assign cols[OFF + i - IMIN] = a[c-i] & b[i];
    end
  end
endmodule
