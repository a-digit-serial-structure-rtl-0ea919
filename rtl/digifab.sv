// digifab: DigiFAB, a digit-serial multiplier built from one K x L cluster of
// reduced flexible array blocks (RFABs).
//
// A fully parallel 4M x 4N multiplier would need an M x N array of 4 x 4 FAB
// blocks. DigiFAB keeps only a K x L cluster. It pads the array to
// M* x N* = ceil(M/K)*K x ceil(N/L)*L blocks, cuts it into K x L tiles, and
// maps the cluster onto one tile per clock, column by column. Values that
// would cross a tile boundary in the full array are held instead:
//   - the top register: the 4K bottom-edge sums, for the tile below (next clock);
//   - the right registers: per tile row, the 4L carries and 4L-1 sums of the
//     right edge, for the same tile row in the next tile column;
//   - the mux registers: per tile row, the corner sum that crosses diagonally.
// The bottom edge of each column's last tile gives 4K final low product bits.
// After the last column, the right registers hold the high product half in
// carry-save form. One extra pass of N*/L cycles adds it up, bottom tile row
// first. The total is (ceil(M/K)+1)*ceil(N/L) cycles, e.g. 6 cycles for
// 32 x 32 bits on the default 4 x 4 cluster.
//
// Operation: while idle, pulse start with m_digits = M (1..MMAX),
// n_digits = N (1..NMAX), signed_mode and the operands in the low 4M bits
// of a and the low 4N bits of b. The operands are latched and extended to
// M*, N* digits (sign-extended in signed mode). busy stays high during the
// computation. done pulses for one cycle when product holds a*b, zero- or
// sign-extended to the full output width. It then stays valid until the
// next start. Reset is asynchronous, active low.
//
// The structure (cluster, top/right/mux registers, column-first tiling, extra
// pass, cycle count, register sizes) follows the published DigiFAB design. The
// bit-level array, the Baugh-Wooley sign handling, the final adder and the
// operand/handshake interface are this design's own choices.
module digifab
  import digifab_pkg::*;
#(
  parameter int unsigned K    = 4,  // FAB columns in the cluster
  parameter int unsigned L    = 4,  // FAB rows in the cluster
  parameter int unsigned MMAX = 8,  // largest multiplicand, in 4-bit digits
  parameter int unsigned NMAX = 8,  // largest multiplier, in 4-bit digits
  localparam int unsigned MW = $clog2(MMAX + 1),
  localparam int unsigned NW = $clog2(NMAX + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       signed_mode,
  input  logic [MW-1:0]              m_digits,
  input  logic [NW-1:0]              n_digits,
  input  logic [4*MMAX-1:0]          a,
  input  logic [4*NMAX-1:0]          b,
  output logic                       busy,
  output logic                       done,
  output logic [4*(MMAX+NMAX)-1:0]   product
);

  localparam int unsigned CMAX = (MMAX + K - 1) / K;
  localparam int unsigned RMAX = (NMAX + L - 1) / L;
  localparam int unsigned MS   = CMAX * K;   // largest M*
  localparam int unsigned NS   = RMAX * L;   // largest N*
  localparam int unsigned PW   = 4 * (MS + NS);
  localparam int unsigned CW   = (CMAX > 1) ? $clog2(CMAX) : 1;
  localparam int unsigned RW   = (RMAX > 1) ? $clog2(RMAX) : 1;
  localparam int unsigned DW   = $clog2(((MS > NS) ? MS : NS) + 1);

  // ---------------------------------------------------------------- control
  phase_e        phase;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [DW-1:0] mstar, nstar;
  logic          accept;

  digifab_ctrl #(.K(K), .L(L), .MMAX(MMAX), .NMAX(NMAX)) u_ctrl (
    .clk, .rst_n, .start, .m_digits, .n_digits,
    .phase, .col, .row, .mstar, .nstar, .accept, .busy, .done
  );

  logic tile_en, last_row, final_en, final_first, final_top;
  logic [RW:0] row_last_idx;
  assign row_last_idx = (RW + 1)'(nstar / DW'(L)) - 1'b1;
  assign tile_en     = phase == PH_TILE;
  assign final_en    = phase == PH_FINAL;
  assign last_row    = (RW + 1)'(row) == row_last_idx;
  assign final_first = final_en && last_row;
  assign final_top   = final_en && row == '0;

  // ---------------------------------------------------- operand registers
  logic [4*MS-1:0] a_q;
  logic [4*NS-1:0] b_q;
  logic            signed_q;
  logic [4*MS-1:0] a_ext;
  logic [4*NS-1:0] b_ext;

  // Extend the low 4M / 4N bits to the widest padded size.
  always_comb begin
    int unsigned m, n;
    m = (m_digits == '0) ? 1 : (int'(m_digits) > MMAX ? MMAX : int'(m_digits));
    n = (n_digits == '0) ? 1 : (int'(n_digits) > NMAX ? NMAX : int'(n_digits));
    for (int k = 0; k < 4 * MS; k++)
      a_ext[k] = (k < 4 * m) ? a[k] : (signed_mode & a[4*m-1]);
    for (int k = 0; k < 4 * NS; k++)
      b_ext[k] = (k < 4 * n) ? b[k] : (signed_mode & b[4*n-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q      <= '0;
      b_q      <= '0;
      signed_q <= 1'b0;
    end else if (accept) begin
      a_q      <= a_ext;
      b_q      <= b_ext;
      signed_q <= signed_mode;
    end
  end

  // ----------------------------------------------------------- datapath
  logic [4*K-1:0] cl_a, cl_top_s, cl_bot_s, top_q;
  logic [4*L-1:0] cl_b, cl_left_c, cl_right_c, rr_c;
  logic [4*L-1:1] cl_left_s;
  logic [4*L-2:0] cl_right_s, rr_s;
  logic           mux_q, mux_d;
  logic [4*L-1:0] slice;

  // Tile (col,row) uses multiplicand digits col*K .. col*K+K-1 and, top row
  // first, multiplier digits N*-1-row*L down to N*-L-row*L.
  assign cl_a = a_q[4*K*int'(col) +: 4*K];
  assign cl_b = b_q[4*(int'(nstar) - L*(int'(row) + 1)) +: 4*L];

  edge_mux #(.K(K), .L(L), .CW(CW), .RW(RW), .DW(DW)) u_edge (
    .signed_mode(signed_q), .col, .row, .mstar, .nstar,
    .top_q, .right_c(rr_c), .right_s(rr_s), .mux_q,
    .top_s(cl_top_s), .left_c(cl_left_c), .left_s(cl_left_s)
  );

  fab_cluster #(.K(K), .L(L)) u_cluster (
    .a(cl_a), .b(cl_b), .signed_mode(signed_q),
    .sign_col(int'(col) * K == int'(mstar) - K),
    .sign_row(row == '0),
    .top_s(cl_top_s), .left_c(cl_left_c), .left_s(cl_left_s),
    .bot_s(cl_bot_s), .right_c(cl_right_c), .right_s(cl_right_s)
  );

  top_registers #(.K(K)) u_top (
    .clk, .rst_n, .clr(accept), .en(tile_en), .d(cl_bot_s), .q(top_q)
  );

  right_registers #(.L(L), .NMAX(NMAX)) u_right (
    .clk, .we(tile_en), .waddr(row), .wc(cl_right_c), .ws(cl_right_s),
    .raddr(row), .rc(rr_c), .rs(rr_s)
  );

  // The corner of the tile just above (in the top register) is stored for
  // the tile one column right; on the top tile row there is none.
  assign mux_d = (row == '0) ? 1'b0 : top_q[4*K-1];

  mux_registers #(.L(L), .NMAX(NMAX)) u_mux (
    .clk, .we(tile_en), .addr(row), .d(mux_d), .q(mux_q)
  );

  final_adder #(.L(L)) u_final (
    .clk, .rst_n, .en(final_en), .first(final_first),
    .flip_msb(signed_q && final_top),
    .right_c(rr_c), .right_s(rr_s), .corner(mux_q), .slice
  );

  // ------------------------------------------------------ product register
  logic [PW-1:0] p_q;
  logic [$clog2(PW)-1:0] hi_base;

  // Tile row r of the extra pass produces product bits
  // 4M* + 4N* - 4L(r+1) .. 4M* + 4N* - 4Lr - 1.
  assign hi_base = ($clog2(PW))'(4 * (int'(mstar) + int'(nstar)) - 4 * L * (int'(row) + 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q <= '0;
    end else if (accept) begin
      p_q <= '0;
    end else if (tile_en && last_row) begin
      p_q[4*K*int'(col) +: 4*K] <= cl_bot_s;
    end else if (final_en) begin
      p_q[hi_base +: 4*L] <= slice;
    end
  end

  // Bits above 4(M*+N*) repeat the sign in signed mode and are zero otherwise.
  logic [$clog2(PW+1)-1:0] p_top;  // 4(M*+N*), bits computed
  logic                    p_sign;
  assign p_top  = ($clog2(PW+1))'(4 * (int'(mstar) + int'(nstar)));
  assign p_sign = signed_q & p_q[($clog2(PW))'(p_top - 1'b1)];

  always_comb begin
    for (int k = 0; k < 4 * (MMAX + NMAX); k++)
      product[k] = (k < int'(p_top)) ? p_q[k] : p_sign;
  end

  // ------------------------------------------------------------ checks
  // A start while idle must name a size the hardware holds.
  a_size_ok: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (m_digits >= 1 && int'(m_digits) <= MMAX &&
                n_digits >= 1 && int'(n_digits) <= NMAX));

  // done follows the last extra-pass cycle.
  a_done: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> $past(final_en) && !busy);

endmodule
