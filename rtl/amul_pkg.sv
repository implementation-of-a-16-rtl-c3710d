// amul_pkg: shared constants and elaboration-time schedule of the approximate
// multiplier's partial-product reduction tree.
//
// The tree works on columns of equal-weight bits. Column c of an N x N
// product starts with pp_height(N, c) partial-product bits. Three reduction
// stages then shrink the columns and a final adder (stage 4) turns what is
// left into the 2N-bit product:
//   stage 1  every full group of five bits in a column goes to an approximate
//            5:2 compressor; the leftover bits pass through unchanged.
//   stage 2  each column, taken from the LSB up and counting the carries the
//            column below sends into it, is brought to at most STAGE2_TARGET
//            bits. A compressor is used while at least three bits must still
//            go, a full adder while two must go, and a half adder for the
//            last one.
//   stage 3  the same rule with STAGE3_TARGET, leaving at most three rows.
// The top column (2N-1) is never reduced, so no carry leaves the product.
//
// Every stage packs its bits column by column, LSB column first. Inside a
// column the order is: compressor sums, full-adder sums, half-adder sums,
// bits passed through, and then the carries from the column below
// (compressor carries, full-adder carries, half-adder carries). The
// reduction_stage, pp_gen and final_adder modules all read and write this
// layout, and sched() gives its sizes and offsets as constants.
//
// Using only full groups of five in stage 1 follows the document. The
// greedy rule and the target heights of stages 2 and 3 are this design's
// own choice. They are the smallest targets that three stages reach for N = 16.
package amul_pkg;

  localparam int MAX_COLS      = 128;  // supports N up to 64
  localparam int NUM_STAGES    = 3;    // reduction stages ahead of the final adder
  localparam int STAGE2_TARGET = 5;
  localparam int STAGE3_TARGET = 3;
  localparam int FINAL_ROWS    = 3;    // rows the final adder accepts per column

  typedef enum int {
    F_HEIGHT,   // bits in column c after stage s (s = 0: partial products)
    F_OFFSET,   // position of column c's first bit in stage s's packed vector
    F_WIDTH,    // total bits in stage s's packed vector
    F_NCMP,     // 5:2 compressors stage s places in column c
    F_NFA,      // full adders stage s places in column c
    F_NHA       // half adders stage s places in column c
  } sched_field_e;

  // Number of partial-product bits of weight 2**c in an n x n product.
  function automatic int pp_height(int n, int c);
    if (c < 0 || c > 2*n-2) return 0;
    return (c < n) ? c + 1 : 2*n - 1 - c;
  endfunction

  // Replays the reduction schedule up to stage s and returns one field.
  function automatic int sched(int n, int s, int c, sched_field_e f);
    int h  [MAX_COLS];
    int hn [MAX_COLS];
    int r5 [MAX_COLS];
    int rf [MAX_COLS];
    int rh [MAX_COLS];
    int n5, nf, nh, excess, avail, k, sum;
    for (int i = 0; i < MAX_COLS; i++) begin
      h[i] = pp_height(n, i);
      hn[i] = 0; r5[i] = 0; rf[i] = 0; rh[i] = 0;
    end
    for (int st = 1; st <= s; st++) begin
      k = 0;  // carries entering column i from column i-1
      for (int i = 0; i < 2*n; i++) begin
        n5 = 0; nf = 0; nh = 0;
        if (i == 2*n-1) begin
          // top column: nothing may carry out of the product
        end else if (st == 1) begin
          n5 = h[i] / 5;
        end else begin
          avail  = h[i];
          excess = h[i] + k - ((st == 2) ? STAGE2_TARGET : STAGE3_TARGET);
          while (excess > 0 && avail >= 2) begin
            if (excess >= 3 && avail >= 5) begin
              n5++; avail -= 5; excess -= 4;
            end else if (excess >= 2 && avail >= 3) begin
              nf++; avail -= 3; excess -= 2;
            end else begin
              nh++; avail -= 2; excess -= 1;
            end
          end
        end
        hn[i] = h[i] - 4*n5 - 2*nf - nh + k;
        r5[i] = n5; rf[i] = nf; rh[i] = nh;
        k = n5 + nf + nh;
      end
      for (int i = 0; i < 2*n; i++) h[i] = hn[i];
    end
    case (f)
      F_HEIGHT: return h[c];
      F_NCMP:   return r5[c];
      F_NFA:    return rf[c];
      F_NHA:    return rh[c];
      F_OFFSET: begin
        sum = 0;
        for (int i = 0; i < c; i++) sum += h[i];
        return sum;
      end
      default: begin  // F_WIDTH
        sum = 0;
        for (int i = 0; i < 2*n; i++) sum += h[i];
        return sum;
      end
    endcase
  endfunction

  function automatic int stage_height(int n, int s, int c);
    return sched(n, s, c, F_HEIGHT);
  endfunction

  function automatic int stage_offset(int n, int s, int c);
    return sched(n, s, c, F_OFFSET);
  endfunction

  function automatic int stage_width(int n, int s);
    return sched(n, s, 0, F_WIDTH);
  endfunction

  // Bits stage s keeps in column c: cell sums plus bits passed through.
  function automatic int stage_own(int n, int s, int c);
    return sched(n, s-1, c, F_HEIGHT) - 4*sched(n, s, c, F_NCMP)
           - 2*sched(n, s, c, F_NFA) - sched(n, s, c, F_NHA);
  endfunction

endpackage
