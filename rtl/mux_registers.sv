// mux_registers: one bit per tile row, holding a tile's corner sum.
//
// The diagonal sum of a tile's bottom-right cell belongs to the top-left
// cell of the tile one row down and one column right. Tiles are visited
// column by column. So that bit has to wait about one whole tile-column pass.
// Entry r holds the corner of tile (c-1,r-1) while the cluster works on
// tile (c,r). In the same cycle the entry is overwritten with the corner of
// tile (c,r-1), which the top register holds at that moment. The
// entry is read before it is written. In the extra pass, entry r supplies the
// top bit of tile row r's sum vector. One bit and N*/L levels follow the
// published DigiFAB register budget. The read-before-write reuse of one entry is this
// design's own. Entries are not reset: each is written before it is read.
//
// Timing: write on the rising edge when we is set; q is combinational.
module mux_registers #(
  parameter int unsigned L    = 4,  // FAB rows in the cluster
  parameter int unsigned NMAX = 8,  // largest multiplier, in 4-bit digits
  localparam int unsigned DEPTH = (NMAX + L - 1) / L,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic          d,
  output logic          q
);

  logic [DEPTH-1:0] bits;

  always_ff @(posedge clk) begin
    if (we) bits[addr] <= d;
  end

  assign q = bits[addr];

endmodule
