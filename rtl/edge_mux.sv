// edge_mux: multiplexers on the FAB cluster's top and left edges.
//
// Inside the large MxN array, a tile's top edge is the bottom edge of the
// tile above. Its left edge is the right edge of the tile to its left. The
// top-left cell's diagonal input comes from the bottom-right corner of the
// tile above and to the left. DigiFAB holds these values in the top, right
// and mux registers. On the first tile row or the first tile column, the
// edge lies on the array's own boundary instead. There the input is zero,
// except for the Baugh-Wooley correction bits in signed mode. With
// n = 4M* and m = 4N* the corrections are 2^(m-1) and 2^(n-1), and the flip
// of product bit n+m-1 is done in the final adder. Cell (u,v) of the whole
// array (u from the left, v from the top) has weight u + m - 1 - v. So
// 2^(m-1) enters as the carry into cell (0,0). 2^(n-1) enters on the top
// edge at u = n - m if n >= m, else on the left edge at v = m - n.
// The corrections and their placement are this design's own; the inputs that
// are merely taken from the registers follow the structure the design
// describes.
//
// Inputs col/row are the tile coordinates and mstar/nstar the padded digit
// counts M* and N*. Purely combinational.
module edge_mux #(
  parameter int unsigned K  = 4,  // FAB columns in the cluster
  parameter int unsigned L  = 4,  // FAB rows in the cluster
  parameter int unsigned CW = 3,  // width of col
  parameter int unsigned RW = 2,  // width of row
  parameter int unsigned DW = 5   // width of mstar / nstar
) (
  input  logic           signed_mode,
  input  logic [CW-1:0]  col,
  input  logic [RW-1:0]  row,
  input  logic [DW-1:0]  mstar,
  input  logic [DW-1:0]  nstar,
  // register side
  input  logic [4*K-1:0] top_q,    // bottom-edge sums of the tile above
  input  logic [4*L-1:0] right_c,  // right-edge carries of the tile to the left
  input  logic [4*L-2:0] right_s,  // right-edge sums of the tile to the left
  input  logic           mux_q,    // corner sum of the tile above-left
  // cluster side
  output logic [4*K-1:0] top_s,
  output logic [4*L-1:0] left_c,
  output logic [4*L-1:1] left_s
);

  // n - m, the offset of the 2^(n-1) correction from cell (0,0)
  int signed diff;
  int unsigned u0, v0;  // array coordinates of the tile's top-left cell

  always_comb begin
    diff = 4 * int'(mstar) - 4 * int'(nstar);
    u0   = 4 * K * int'(col);
    v0   = 4 * L * int'(row);

    // top edge, cells u0+1 .. u0+4K-1
    for (int k = 1; k < 4 * K; k++) begin
      if (row == '0) top_s[k] = signed_mode && diff > 0 && int'(u0) + k == diff;
      else           top_s[k] = top_q[k-1];
    end

    // top-left cell
    if (col == '0)      top_s[0] = signed_mode && diff <= 0 && int'(v0) == -diff;
    else if (row == '0) top_s[0] = signed_mode && diff > 0 && int'(u0) == diff;
    else                top_s[0] = mux_q;

    // left edge, cell rows v0 .. v0+4L-1
    for (int t = 0; t < 4 * L; t++) begin
      if (col == '0) left_c[t] = signed_mode && v0 + t == 0;
      else           left_c[t] = right_c[t];
    end
    for (int t = 1; t < 4 * L; t++) begin
      if (col == '0) left_s[t] = signed_mode && diff <= 0 && int'(v0) + t == -diff;
      else           left_s[t] = right_s[t-1];
    end
  end

endmodule
