// px_approx_mult: accuracy-configurable W x W multiplier.
//
// The multiplier forms the W x W array of partial-product bits a[k] & b[i]
// and reduces it column by column. In exact mode (approx = 0) every column is
// added exactly, so p = a * b (unsigned, 2W bits). In approximate mode
// (approx = 1) the bits of each of the APX_COLS least significant columns are
// taken four at a time through an approximate 4:2 compressor
//     sum   = (x1 ^ x2) | (x3 ^ x4)      (weight of the column)
//     carry = (x1 & x2) | (x3 & x4)      (weight of the next column)
// which is exact except when both pairs are non-zero in the same way; the 0..3
// bits left over in a column and every more significant column are added
// exactly. Only the low columns are approximated, so the error stays small
// relative to the product.
//
// The architecture picks the fourth approximate multiplier of its reference
// [10]: a Dadda multiplier whose reduction uses 4:2 compressors that switch
// between an exact and an approximate mode. The compressor equations, the
// number of approximate columns (W/2) and writing the exact remainder of the
// reduction as one sum (left to synthesis to build as a tree) are this
// design's own choices.
//
// Purely combinational. Unsigned operands; for two's-complement operands the
// low W bits of p equal the low W bits of the signed product in exact mode.
module px_approx_mult #(
  parameter int unsigned W        = 16,
  parameter int unsigned APX_COLS = W / 2
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           approx,
  output logic [2*W-1:0] p
);

  localparam int unsigned PW = 2 * W + 2;

  // pp[i][k] = b[i] & a[k], weight i + k.
  logic [W-1:0][W-1:0] pp;
  always_comb
    for (int i = 0; i < W; i++)
      pp[i] = b[i] ? a : '0;

  always_comb begin
    logic [PW-1:0] acc;
    logic [W-1:0]  col;   // bits of one column, index = row
    int            n;     // bits in that column
    int            lo;    // first row contributing to that column
    int            q;     // bits already taken by compressors
    logic          cs, cc; // compressor sum and carry
    acc = '0;
    col = '0;
    n   = 0;
    lo  = 0;
    q   = 0;
    cs  = 1'b0;
    cc  = 1'b0;
    for (int j = 0; j < 2 * W - 1; j++) begin
      lo  = (j < int'(W)) ? 0 : j - int'(W) + 1;
      n   = (j < int'(W)) ? j + 1 : 2 * int'(W) - 1 - j;
      col = '0;
      for (int r = 0; r < W; r++)
        if (r < n) col[r] = pp[lo + r][j - lo - r];
      q = 0;
      if (approx && j < int'(APX_COLS)) begin
        for (int g = 0; g + 4 <= W; g += 4)
          if (g + 4 <= n) begin
            cs  = (col[g] ^ col[g+1]) | (col[g+2] ^ col[g+3]);
            cc  = (col[g] & col[g+1]) | (col[g+2] & col[g+3]);
            acc = acc + (PW'(cs) << j) + (PW'(cc) << (j + 1));
            q = g + 4;
          end
      end
      for (int r = 0; r < W; r++)
        if (r >= q && r < n) acc = acc + (PW'(col[r]) << j);
    end
    p = acc[2*W-1:0];
  end

endmodule
