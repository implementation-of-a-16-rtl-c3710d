// reduction_stage: one level (stage 1, 2 or 3) of the partial-product
// reduction tree.
//
// bits_in is the packed column layout that stage STAGE-1 leaves. bits_out is
// the layout this stage leaves (see amul_pkg for the packing order). For each
// column the package's schedule gives how many approximate 5:2 compressors,
// full adders and half adders to place. The cells take consecutive bits from
// the bottom of the column: compressors first, then full adders, then half
// adders. The remaining bits pass through. Each cell's sum stays in the column
// and its carry goes to the next column up.
//
// Stage 1 uses compressors only, one per full group of five bits, as the
// document describes. Stages 2 and 3 mix compressors and adders to reach the
// target heights set in amul_pkg, which are this design's choice.
// Combinational, no clock.
module reduction_stage
  import amul_pkg::*;
#(
  parameter int N     = 16,
  parameter int STAGE = 1
) (
  input  logic [stage_width(N, STAGE-1)-1:0] bits_in,
  output logic [stage_width(N, STAGE)-1:0]   bits_out
);
  for (genvar c = 0; c < 2*N; c++) begin : g_col
    localparam int HIN  = stage_height(N, STAGE-1, c);
    localparam int OIN  = stage_offset(N, STAGE-1, c);
    localparam int OOUT = stage_offset(N, STAGE, c);
    localparam int NC   = sched(N, STAGE, c, F_NCMP);
    localparam int NF   = sched(N, STAGE, c, F_NFA);
    localparam int NH   = sched(N, STAGE, c, F_NHA);
    localparam int NP   = HIN - 5*NC - 3*NF - 2*NH;
    // where this column's carries land in the next column
    localparam int ONXT = (c + 1 < 2*N) ? stage_offset(N, STAGE, c+1) + stage_own(N, STAGE, c+1) : 0;

    for (genvar k = 0; k < NC; k++) begin : g_cmp
      approx_compressor_5_2 u_cmp (
        .x (bits_in[OIN + 5*k +: 5]),
        .s (bits_out[OOUT + k]),
        .c (bits_out[ONXT + k])
      );
    end
    for (genvar k = 0; k < NF; k++) begin : g_fa
      full_adder u_fa (
        .a  (bits_in[OIN + 5*NC + 3*k]),
        .b  (bits_in[OIN + 5*NC + 3*k + 1]),
        .ci (bits_in[OIN + 5*NC + 3*k + 2]),
        .s  (bits_out[OOUT + NC + k]),
        .co (bits_out[ONXT + NC + k])
      );
    end
    for (genvar k = 0; k < NH; k++) begin : g_ha
      half_adder u_ha (
        .a (bits_in[OIN + 5*NC + 3*NF + 2*k]),
        .b (bits_in[OIN + 5*NC + 3*NF + 2*k + 1]),
        .s (bits_out[OOUT + NC + NF + k]),
        .c (bits_out[ONXT + NC + NF + k])
      );
    end
    for (genvar k = 0; k < NP; k++) begin : g_pass
      assign bits_out[OOUT + NC + NF + NH + k] = bits_in[OIN + 5*NC + 3*NF + 2*NH + k];
    end
  end
endmodule
