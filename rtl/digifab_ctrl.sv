// digifab_ctrl: sequencer of the DigiFAB multiplier.
//
// On start (accepted only while idle) it latches the tile counts
// ncols = ceil(M/K) and nrows = ceil(N/L). The padded sizes are then
// M* = ncols*K and N* = nrows*L digits. It then walks the tiles of the
// M* x N* FAB array column first: tile (0,0), (0,1), ... (0,nrows-1), (1,0),
// and so on, one tile per clock. After the last tile column it runs one extra
// pass of nrows cycles. That pass visits the tile rows from the bottom up and
// completes the high product half in the final adder. A multiplication
// therefore takes (ceil(M/K)+1) * ceil(N/L) clock cycles, the count the
// published design gives. busy is high for exactly that many cycles, and
// done pulses in the cycle after the last one. The bottom-up order of the
// extra pass and the start/busy/done handshake are this design's own. An
// out-of-range M or N is clamped to 1..MMAX / 1..NMAX.
//
// Outputs: phase and the tile coordinates (col,row) drive the edge
// multiplexers and the register enables; mstar/nstar are M* and N*, which
// are multiples of K and L, so their low bits are constant by construction.
module digifab_ctrl
  import digifab_pkg::*;
#(
  parameter int unsigned K    = 4,  // FAB columns in the cluster
  parameter int unsigned L    = 4,  // FAB rows in the cluster
  parameter int unsigned MMAX = 8,  // largest multiplicand, in digits
  parameter int unsigned NMAX = 8,  // largest multiplier, in digits
  localparam int unsigned MW = $clog2(MMAX + 1),
  localparam int unsigned NW = $clog2(NMAX + 1),
  localparam int unsigned CMAX = (MMAX + K - 1) / K,  // tile columns, at most
  localparam int unsigned RMAX = (NMAX + L - 1) / L,  // tile rows, at most
  localparam int unsigned CW = (CMAX > 1) ? $clog2(CMAX) : 1,
  localparam int unsigned RW = (RMAX > 1) ? $clog2(RMAX) : 1,
  localparam int unsigned DW = $clog2(((CMAX * K > RMAX * L) ? CMAX * K : RMAX * L) + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [MW-1:0] m_digits,
  input  logic [NW-1:0] n_digits,
  output phase_e        phase,
  output logic [CW-1:0] col,
  output logic [RW-1:0] row,
  output logic [DW-1:0] mstar,
  output logic [DW-1:0] nstar,
  output logic          accept,   // start taken this cycle
  output logic          busy,
  output logic          done
);

  logic [CW:0]   ncols;
  logic [RW:0]   nrows;
  logic [CW:0]   ncols_d;
  logic [RW:0]   nrows_d;

  always_comb begin
    int unsigned m, n;
    m = int'(m_digits);
    n = int'(n_digits);
    if (m < 1) m = 1;
    if (m > MMAX) m = MMAX;
    if (n < 1) n = 1;
    if (n > NMAX) n = NMAX;
    ncols_d = (CW + 1)'(ceil_div(m, K));
    nrows_d = (RW + 1)'(ceil_div(n, L));
  end

  assign accept = start && phase == PH_IDLE;
  assign busy   = phase != PH_IDLE;
  assign mstar  = DW'(int'(ncols) * K);
  assign nstar  = DW'(int'(nrows) * L);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      col   <= '0;
      row   <= '0;
      ncols <= (CW + 1)'(1);
      nrows <= (RW + 1)'(1);
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          if (start) begin
            ncols <= ncols_d;
            nrows <= nrows_d;
            col   <= '0;
            row   <= '0;
            phase <= PH_TILE;
          end
        end
        PH_TILE: begin
          if ((RW + 1)'(row) == nrows - 1'b1) begin
            if ((CW + 1)'(col) == ncols - 1'b1) begin
              row   <= RW'(nrows - 1'b1);
              phase <= PH_FINAL;
            end else begin
              row <= '0;
              col <= col + 1'b1;
            end
          end else begin
            row <= row + 1'b1;
          end
        end
        PH_FINAL: begin
          if (row == '0) begin
            phase <= PH_IDLE;
            done  <= 1'b1;
          end else begin
            row <= row - 1'b1;
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
