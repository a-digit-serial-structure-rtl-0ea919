// final_adder: the carry-propagate adder used in DigiFAB's extra pass.
//
// After the last tile column, the right registers hold the high half of the
// product in carry-save form, one tile row per entry. Entry r holds 4L
// carries and 4L-1 sums. The mux register of row r holds one more sum bit,
// the top bit of that row's sum vector. In the array the right edge runs from
// high weight at the top to low weight at the bottom, so both vectors are
// bit-reversed here. The adder then forms a 4L-bit slice of the product:
// carries + sums + carry-in. The carry-out is kept in a flip-flop for the
// next slice. Slices are therefore taken from the bottom tile row upward. On
// the first slice (first = 1) the carry-in is zero. In signed mode, flip_msb
// inverts the slice's top bit on the top tile row. This is the Baugh-Wooley
// correction 2^(n+m-1) taken modulo 2^(n+m).
//
// The original FAB has this adder in every right-most block. The
// reduced block drops it. Placing one shared 4L-bit adder on the register
// outputs, visited once per tile row in the extra pass, is this design's own.
//
// Timing: slice is combinational; the carry flip-flop loads on en.
module final_adder #(
  parameter int unsigned L = 4  // FAB rows in the cluster
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           first,
  input  logic           flip_msb,
  input  logic [4*L-1:0] right_c,  // carries, index = cell row (top = 0)
  input  logic [4*L-2:0] right_s,  // sums, index = cell row (top = 0)
  input  logic           corner,   // sum bit from the mux register
  output logic [4*L-1:0] slice
);

  logic           carry_q;
  logic [4*L-1:0] cvec, svec;
  logic [4*L:0]   total;

  always_comb begin
    for (int t = 0; t < 4 * L; t++) cvec[4*L-1-t] = right_c[t];
    for (int t = 0; t < 4 * L - 1; t++) svec[4*L-2-t] = right_s[t];
    svec[4*L-1] = corner;
    total = {1'b0, cvec} + {1'b0, svec} + {{(4*L){1'b0}}, (first ? 1'b0 : carry_q)};
    slice = total[4*L-1:0];
    slice[4*L-1] = total[4*L-1] ^ flip_msb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= total[4*L];
  end

endmodule
