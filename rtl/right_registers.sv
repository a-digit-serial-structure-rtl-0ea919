// right_registers: one (8L-1)-bit entry per tile row, to the right of the
// FAB cluster.
//
// When the cluster works on tile (c,r), its right-edge outputs are 4L carries
// and 4L-1 diagonal sums. They are written into entry r. The cluster reads
// them back on its left edge when it reaches tile (c+1,r), one tile column
// later. They are also the input of the final adder in the extra pass. The
// read is combinational and sees the value from before any write in the same
// cycle, so one entry can be read and rewritten on the same clock. The depth
// is ceil(NMAX/L) levels: N*/L levels for the largest multiplier built in.
// Width and depth follow the published DigiFAB register budget. The entries are not
// reset: every entry is written before it is read.
//
// Timing: write on the rising edge when we is set; read data is combinational.
module right_registers #(
  parameter int unsigned L    = 4,  // FAB rows in the cluster
  parameter int unsigned NMAX = 8,  // largest multiplier, in 4-bit digits
  localparam int unsigned DEPTH = (NMAX + L - 1) / L,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  logic [4*L-1:0] wc,
  input  logic [4*L-2:0] ws,
  input  logic [AW-1:0]  raddr,
  output logic [4*L-1:0] rc,
  output logic [4*L-2:0] rs
);

  typedef struct packed {
    logic [4*L-1:0] carry;
    logic [4*L-2:0] sum;
  } entry_t;

  entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= '{carry: wc, sum: ws};
  end

  assign rc = mem[raddr].carry;
  assign rs = mem[raddr].sum;

endmodule
