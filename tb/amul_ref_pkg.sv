// amul_ref_pkg: reference model of the approximate multiplier for the
// testbenches. It is written apart from the RTL. It keeps each column as a
// list of bits and decides the cells of a stage while it walks the column,
// instead of reading a precomputed schedule. The rules it applies:
//   compressor  s + 2c = min(number of ones, 3)
//   stage 1     one compressor per full group of five bits
//   stages 2/3  bring the column (its bits plus the carries arriving from
//               the column below) to 5 resp. 3 bits: compressor while at least
//               3 bits must go, full adder while 2 must go, else a half adder
//   final       exact sum of every bit weighted by its column
// The top column is never reduced.
package amul_ref_pkg;

  localparam int RC = 128;   // columns
  localparam int RH = 64;    // bits per column

  class amul_ref;
    int n;
    bit col [RC][RH];
    int h   [RC];

    function new(int n_);
      n = n_;
      for (int c = 0; c < RC; c++) h[c] = 0;
    endfunction

    // partial products of a*b, row i ascending inside each column
    function void load_pp(bit [63:0] a, bit [63:0] b);
      for (int c = 0; c < RC; c++) h[c] = 0;
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          col[i+j][h[i+j]] = a[j] & b[i];
          h[i+j]++;
        end
    endfunction

    // load a packed vector, given the column heights
    function void load_packed(bit [1023:0] v, int heights [RC]);
      int p = 0;
      for (int c = 0; c < RC; c++) begin
        h[c] = heights[c];
        for (int r = 0; r < h[c]; r++) begin
          col[c][r] = v[p];
          p++;
        end
      end
    endfunction

    function bit [1023:0] packed_bits();
      bit [1023:0] v = '0;
      int p = 0;
      for (int c = 0; c < RC; c++)
        for (int r = 0; r < h[c]; r++) begin
          v[p] = col[c][r];
          p++;
        end
      return v;
    endfunction

    function void stage(int st);
      bit own  [RH];
      bit cin  [RH];   // carries arriving from the column below
      bit cout [RH];   // carries this column sends up
      int n_own, n_cin, n_cout, pos, excess, cnt, tgt;
      n_cin = 0;
      tgt = (st == 2) ? 5 : 3;
      for (int c = 0; c < 2*n; c++) begin
        n_own = 0; n_cout = 0; pos = 0;
        excess = h[c] + n_cin - tgt;
        while (c != 2*n-1) begin
          if (st == 1) begin
            if (h[c] - pos < 5) break;
            cnt = 5;
          end else begin
            if (excess <= 0 || h[c] - pos < 2) break;
            if (excess >= 3 && h[c] - pos >= 5)      cnt = 5;
            else if (excess >= 2 && h[c] - pos >= 3) cnt = 3;
            else                                     cnt = 2;
            excess -= cnt - 1;
          end
          begin
            int ones = 0;
            for (int k = 0; k < cnt; k++) ones += int'(col[c][pos+k]);
            if (ones > 3) ones = 3;         // only the 5:2 compressor can see >3
            own[n_own]   = ones[0]; n_own++;
            cout[n_cout] = ones[1]; n_cout++;
          end
          pos += cnt;
        end
        for (int k = pos; k < h[c]; k++) begin own[n_own] = col[c][k]; n_own++; end
        for (int k = 0; k < n_cin; k++)  begin own[n_own] = cin[k];    n_own++; end
        h[c] = n_own;
        for (int k = 0; k < n_own; k++)  col[c][k] = own[k];
        for (int k = 0; k < n_cout; k++) cin[k] = cout[k];
        n_cin = n_cout;
      end
    endfunction

    function bit [127:0] total();
      bit [127:0] t = '0;
      for (int c = 0; c < 2*n; c++)
        for (int r = 0; r < h[c]; r++)
          if (col[c][r]) t += (128'd1 << c);
      return t;
    endfunction

    function bit [127:0] multiply(bit [63:0] a, bit [63:0] b);
      load_pp(a, b);
      stage(1); stage(2); stage(3);
      return total();
    endfunction
  endclass

endpackage
