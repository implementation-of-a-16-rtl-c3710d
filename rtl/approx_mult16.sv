// approx_mult16: 16 x 16 unsigned approximate multiplier built on
// approximate 5:2 compressors.
//
// Datapath, all combinational:
//   pp_gen              N x N AND array, packed by column
//   reduction_stage 1   approximate 5:2 compressors on every full group of five bits
//   reduction_stage 2   compressors, full and half adders, columns down to <= 5 bits
//   reduction_stage 3   compressors, full and half adders, columns down to <= 3 bits
//   final_adder         stage 4: ripple adder of half-adder pairs -> 2N-bit product
// The only inexact cell is the compressor, whose output saturates at 3. So
// product <= a*b always holds, and the result is exact whenever no compressor
// sees four or more ones.
//
// Interface: a, b (N bits each) -> product (2N bits), no clock and no
// latency. The four-stage structure and the 16-bit operands follow the
// document. The compressor function, the cell placement in stages 2 and 3 and
// the form of stage 4 are this design's choices (see amul_pkg and the modules).
module approx_mult16
  import amul_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] product
);
  logic [stage_width(N, 0)-1:0] pp;
  logic [stage_width(N, 1)-1:0] st1;
  logic [stage_width(N, 2)-1:0] st2;
  logic [stage_width(N, 3)-1:0] st3;

  pp_gen          #(.N(N))             u_pp  (.a(a), .b(b), .cols(pp));
  reduction_stage #(.N(N), .STAGE(1))  u_st1 (.bits_in(pp),  .bits_out(st1));
  reduction_stage #(.N(N), .STAGE(2))  u_st2 (.bits_in(st1), .bits_out(st2));
  reduction_stage #(.N(N), .STAGE(3))  u_st3 (.bits_in(st2), .bits_out(st3));
  final_adder     #(.N(N))             u_fin (.bits_in(st3), .product(product));
endmodule
