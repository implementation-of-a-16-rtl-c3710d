// approx_compressor_5_2: approximate 5:2 compressor.
//
// Takes five bits of one column and returns a sum s (same weight) and a
// carry c (next column). It has no carry-in and no carry-out chain, so
// s + 2*c can only reach 3. The design makes it the saturated count:
//   s + 2*c = min(popcount(x), 3)
// which is exact for up to three ones, one low for four ones and two low
// for five. In a partial-product column each bit is one with probability
// 1/4, so about 1.6 % of compressions are inexact, and the error is never
// positive.
//
// Circuit: a full adder on x[0..2] gives (s1, c1). If c1 = 0 the count is
// s1 + x[3] + x[4] <= 3, so s is their parity and c their majority. If c1 = 1
// the count is at least 2, so c = 1 and s = 1 when any of s1, x[3], x[4] is set.
// The 2:1 mux on c1 picks s.
//
// Five inputs, two outputs, gates and a mux follow the document. The
// saturating function and this circuit are this design's own choices.
// Combinational.
module approx_compressor_5_2 (
  input  logic [4:0] x,
  output logic       s,
  output logic       c
);
  logic s1, c1;
  logic par, any;

  full_adder u_fa (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1), .co(c1));

  assign par = s1 ^ x[3] ^ x[4];
  assign any = s1 | x[3] | x[4];
  assign s   = c1 ? any : par;
  assign c   = c1 | (s1 & x[3]) | (s1 & x[4]) | (x[3] & x[4]);
endmodule
