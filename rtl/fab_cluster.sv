// fab_cluster: a K x L array of RFABs, the arithmetic core that DigiFAB reuses
// on every tile of a larger multiplier.
//
// FAB (i,j) sits in column i (0 = left) and row j (0 = top). It gets the
// multiplicand digit a[4i +: 4] and the multiplier digit b[4(L-1-j) +: 4], so
// the tile's most significant multiplier digit is on the top row. Within the
// array each block takes its left-edge carries and sums from its left
// neighbour and its top-edge sums from the block above. The top-left cell of a
// block takes the diagonal sum from the bottom-right cell of the block above
// and to the left. The cluster's own edges therefore match those of a single
// RFAB scaled up. There are 4K sums on the top and bottom edges. The left and
// right edges carry 4L carries and 4L-1 sums. The sum of the bottom-right
// cell leaves only through bot_s[4K-1].
// This gives the 4K-bit top and (8L-1)-bit right edges that DigiFAB
// stores between cycles. The same array with K = M and L = N, plus a final
// adder on the right edge, is the fully parallel FAB multiplier.
//
// sign_col marks the tile holding the multiplicand's sign digit (it is then
// in FAB column K-1); sign_row marks the tile holding the multiplier's sign
// digit (FAB row 0). Purely combinational; K and L default to the 4 x 4
// cluster the design is evaluated with.
module fab_cluster #(
  parameter int unsigned K = 4,  // FAB columns (multiplicand digits)
  parameter int unsigned L = 4   // FAB rows (multiplier digits)
) (
  input  logic [4*K-1:0] a,
  input  logic [4*L-1:0] b,
  input  logic           signed_mode,
  input  logic           sign_col,
  input  logic           sign_row,
  input  logic [4*K-1:0] top_s,
  input  logic [4*L-1:0] left_c,
  input  logic [4*L-1:1] left_s,
  output logic [4*K-1:0] bot_s,
  output logic [4*L-1:0] right_c,
  output logic [4*L-2:0] right_s
);

  for (genvar j = 0; j < L; j++) begin : g_row
    for (genvar i = 0; i < K; i++) begin : g_col
      logic [3:0] f_top_s, f_left_c, f_bot_s, f_right_c;
      logic [3:1] f_left_s;
      logic [2:0] f_right_s;

      // top edge
      if (j == 0) begin : g_top
        assign f_top_s = top_s[4*i +: 4];
      end else begin : g_top
        assign f_top_s[3:1] = g_row[j-1].g_col[i].f_bot_s[2:0];
        if (i == 0) begin : g_corner
          assign f_top_s[0] = left_s[4*j];
        end else begin : g_corner
          assign f_top_s[0] = g_row[j-1].g_col[i-1].f_bot_s[3];
        end
      end

      // left edge
      if (i == 0) begin : g_left
        assign f_left_c = left_c[4*j +: 4];
        assign f_left_s = left_s[4*j+1 +: 3];
      end else begin : g_left
        assign f_left_c = g_row[j].g_col[i-1].f_right_c;
        assign f_left_s = g_row[j].g_col[i-1].f_right_s;
      end

      rfab u_rfab (
        .a          (a[4*i +: 4]),
        .b          (b[4*(L-1-j) +: 4]),
        .signed_mode(signed_mode),
        .sign_col   (sign_col && i == K - 1),
        .sign_row   (sign_row && j == 0),
        .top_s      (f_top_s),
        .left_c     (f_left_c),
        .left_s     (f_left_s),
        .bot_s      (f_bot_s),
        .right_c    (f_right_c),
        .right_s    (f_right_s)
      );

      if (j == L - 1) begin : g_bot
        assign bot_s[4*i +: 4] = f_bot_s;
      end
      if (i == K - 1) begin : g_right
        assign right_c[4*j +: 4]   = f_right_c;
        assign right_s[4*j +: 3]   = f_right_s;
        if (j < L - 1) begin : g_corner
          assign right_s[4*j+3] = f_bot_s[3];
        end
      end
    end
  end

endmodule
