// tb_digifab: end-to-end test of the DigiFAB multiplier at its default size
// (4 x 4 cluster, up to 32 x 32 bits).
//
// Runs directed corner cases and random multiplications for every size
// M, N = 1..8 digits, signed and unsigned, and compares each product with
// the product of the same operands taken as 64-bit integers. It also checks
// that busy lasts exactly (ceil(M/K)+1)*ceil(N/L) cycles and that a start
// while busy is ignored. It counts how often each mechanism of the design is
// exercised and fails a mechanism that never happened.
module tb_digifab;
  localparam int K = 4, L = 4, MMAX = 8, NMAX = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, signed_mode = 1'b0;
  logic [3:0] m_digits = 4'd1, n_digits = 4'd1;
  logic [4*MMAX-1:0] a = '0;
  logic [4*NMAX-1:0] b = '0;
  logic busy, done;
  logic [4*(MMAX+NMAX)-1:0] product;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_signed = 0, n_unsigned = 0, n_padded = 0, n_multicol = 0;
  int n_multirow = 0, n_corner = 0, n_single = 0, n_ignored = 0;

  digifab dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ext(input longint v, input int bits, input bit sgn);
    longint r;
    r = v & ((longint'(1) << bits) - 1);
    if (sgn && r[bits-1]) r = r | ~((longint'(1) << bits) - 1);
    return r;
  endfunction

  task automatic run(input int m, input int n, input bit sgn,
                     input longint av, input longint bv, input bit poke_start);
    longint ea, eb, expect_p;
    int cycles, expect_cycles, ncols, nrows;
    ea = ext(av, 4 * m, sgn);
    eb = ext(bv, 4 * n, sgn);
    expect_p = ea * eb;  // 64-bit wrap-around is exact for up to 32 x 32 bits
    ncols = (m + K - 1) / K;
    nrows = (n + L - 1) / L;
    expect_cycles = (ncols + 1) * nrows;

    @(negedge clk);
    a = '0; b = '0;
    a = $bits(a)'(av);
    b = $bits(b)'(bv);
    m_digits = 4'(m); n_digits = 4'(n); signed_mode = sgn; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // garbage on the inputs must not matter once the operands are latched
    a = $urandom; b = $urandom; signed_mode = ~sgn;
    cycles = 0;
    while (!done) begin
      if (busy) cycles++;
      if (poke_start && cycles == 1) begin
        start = 1'b1;
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      if (cycles > 100) break;
    end
    start = 1'b0;
    checks++;
    if (product !== 64'(expect_p)) begin
      failures++;
      $display("FAIL %0dx%0d %s a=%h b=%h got %h expected %h", 4*m, 4*n,
               sgn ? "signed" : "unsigned", ea, eb, product, expect_p);
    end
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("FAIL %0dx%0d: busy for %0d cycles, expected %0d", 4*m, 4*n, cycles, expect_cycles);
    end
    if (sgn) n_signed++; else n_unsigned++;
    if (m % K != 0 || n % L != 0) n_padded++;
    if (ncols > 1) n_multicol++;
    if (nrows > 1) n_multirow++;
    if (ncols > 1 && nrows > 1) n_corner++;
    if (ncols == 1 && nrows == 1) n_single++;
    @(negedge clk);
  endtask

  longint corner_vals[6] = '{0, -1, 1, 64'h8000_0000, 64'h7fff_ffff, 64'h5555_5555};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed corners: every size, both modes, extreme operands
    for (int m = 1; m <= MMAX; m++)
      for (int n = 1; n <= NMAX; n++)
        for (int s = 0; s < 2; s++) begin
          longint mn, mx;
          mn = longint'(1) << (4 * m - 1);
          mx = longint'(1) << (4 * n - 1);
          run(m, n, s[0], mn, mx, 1'b0);
          run(m, n, s[0], -1, -1, 1'b0);
          run(m, n, s[0], mn, -1, 1'b0);
        end
    foreach (corner_vals[i])
      foreach (corner_vals[j])
        run(8, 8, 1'b1, corner_vals[i], corner_vals[j], 1'b0);
    // random sizes and operands; some with a start pulse while busy
    for (int i = 0; i < 3000; i++) begin
      run(1 + $urandom % MMAX, 1 + $urandom % NMAX, 1'($urandom),
          {$urandom, $urandom}, {$urandom, $urandom}, (i % 7) == 0);
    end
    // every mechanism must have occurred
    checks++; if (n_signed == 0)   begin failures++; $display("no signed run"); end
    checks++; if (n_unsigned == 0) begin failures++; $display("no unsigned run"); end
    checks++; if (n_padded == 0)   begin failures++; $display("no padded size"); end
    checks++; if (n_multicol == 0) begin failures++; $display("no multi-column run"); end
    checks++; if (n_multirow == 0) begin failures++; $display("no multi-row run"); end
    checks++; if (n_corner == 0)   begin failures++; $display("no corner transfer"); end
    checks++; if (n_single == 0)   begin failures++; $display("no single-tile run"); end
    checks++; if (n_ignored == 0)  begin failures++; $display("no ignored start"); end
    $display("signed=%0d unsigned=%0d padded=%0d multicol=%0d multirow=%0d corner=%0d single=%0d ignored_start=%0d",
             n_signed, n_unsigned, n_padded, n_multicol, n_multirow, n_corner, n_single, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
