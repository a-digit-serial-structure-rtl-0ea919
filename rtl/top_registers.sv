// top_registers: the 4K-bit register above the FAB cluster.
//
// Each cycle in which the cluster works on a tile, the tile's bottom-edge sums
// are loaded here. On the next cycle the cluster works on the tile directly
// below in the same tile column and takes these bits back in on its top
// edge, shifted one cell column to the right. Bit 4K-1 is the bottom-right
// corner sum, which is passed on to the mux registers. One level is enough
// because tiles are visited column by column, top to bottom. The width and
// single level follow the published DigiFAB register budget; the clear is
// this design's own.
//
// Timing: q follows d one clock after en; clr (synchronous) wins over en.
// Asynchronous active-low reset clears the register.
module top_registers #(
  parameter int unsigned K = 4  // FAB columns in the cluster
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           en,
  input  logic [4*K-1:0] d,
  output logic [4*K-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end

endmodule
