// rfab: Reduced Flexible Array Block, a 4 x 4-bit slice of an array multiplier.
//
// The block is a grid of 16 cells. Cell (s,t) sits in column s (0 = left) and
// row t (0 = top). It forms the partial-product bit a[s] & b[3-t] and adds it
// to one carry and one sum input with a full adder. Carries ripple to the
// right along a row. Sums pass diagonally to the cell one column right and
// one row down. The weight of cell (s,t) is s + 3 - t, so the right neighbour
// weighs one more and the diagonal neighbour the same. When blocks are tiled,
// the multiplicand's low bits are on the left and the multiplier's high bits
// on the top row. The low product bits leave through the bottom edge. The
// high half leaves through the right edge as a carry vector and a sum vector.
// The original FAB adds those two in the right-most column. The reduced
// block drops that adder and leaves the addition to the surrounding logic.
//
// Two's complement follows the Baugh-Wooley scheme. When signed_mode is set,
// a partial product is inverted (NAND instead of AND) in the block's column 3
// if sign_col is set, or in row 0 if sign_row is set, but not where both hold.
// The correction constants enter through the array's edge inputs.
// Bit-level choices here are this design's own: only the 4 x 4 size,
// the signed/unsigned support and the missing partial-product adder are
// given.
//
// Edges: top_s[s] feeds cell (s,0); left_c[t] and left_s[t] (t >= 1) feed cell
// (0,t); bot_s[s] comes from cell (s,3); right_c[t] and right_s[t] (t <= 2)
// come from cell (3,t). The diagonal sum of the bottom-right cell is bot_s[3].
// Purely combinational.
module rfab (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       signed_mode,
  input  logic       sign_col,
  input  logic       sign_row,
  input  logic [3:0] top_s,
  input  logic [3:0] left_c,
  input  logic [3:1] left_s,
  output logic [3:0] bot_s,
  output logic [3:0] right_c,
  output logic [2:0] right_s
);

  // One generate scope per cell; each holds its own sum and carry nets.
  for (genvar t = 0; t < 4; t++) begin : g_row
    for (genvar s = 0; s < 4; s++) begin : g_col
      logic pp, sin, cin, sum, cout;
      if (s == 3 && t == 0) begin : g_pp
        assign pp = (a[s] & b[3-t]) ^ (signed_mode & (sign_col ^ sign_row));
      end else if (s == 3) begin : g_pp
        assign pp = (a[s] & b[3-t]) ^ (signed_mode & sign_col);
      end else if (t == 0) begin : g_pp
        assign pp = (a[s] & b[3-t]) ^ (signed_mode & sign_row);
      end else begin : g_pp
        assign pp = a[s] & b[3-t];
      end
      if (t == 0) begin : g_sin
        assign sin = top_s[s];
      end else if (s == 0) begin : g_sin
        assign sin = left_s[t];
      end else begin : g_sin
        assign sin = g_row[t-1].g_col[s-1].sum;
      end
      if (s == 0) begin : g_cin
        assign cin = left_c[t];
      end else begin : g_cin
        assign cin = g_row[t].g_col[s-1].cout;
      end
      assign sum  = pp ^ sin ^ cin;
      assign cout = (pp & sin) | (pp & cin) | (sin & cin);
    end
  end

  for (genvar s = 0; s < 4; s++) begin : g_bot
    assign bot_s[s] = g_row[3].g_col[s].sum;
  end
  for (genvar t = 0; t < 4; t++) begin : g_right
    assign right_c[t] = g_row[t].g_col[3].cout;
    if (t < 3) begin : g_s
      assign right_s[t] = g_row[t].g_col[3].sum;
    end
  end

endmodule
