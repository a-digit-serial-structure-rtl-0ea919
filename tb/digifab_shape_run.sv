// digifab_shape_run: runs 32 x 32-bit multiplications (signed and unsigned)
// on a DigiFAB built with a K x L cluster and checks each product and the
// number of busy cycles, (ceil(8/K)+1)*ceil(8/L). A few random smaller sizes
// are mixed in. Results are reported through checks/failures once done is set.
module digifab_shape_run #(
  parameter int K = 4,
  parameter int L = 4,
  parameter int N_TESTS = 60
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   cycles_32,
  output bit   done
);
  logic rst_n = 0, start = 0, signed_mode = 0;
  logic [3:0] m_digits = 8, n_digits = 8;
  logic [31:0] a = '0, b = '0;
  logic busy, done_o;
  logic [63:0] product;

  digifab #(.K(K), .L(L), .MMAX(8), .NMAX(8)) dut (
    .clk, .rst_n, .start, .signed_mode, .m_digits, .n_digits, .a, .b,
    .busy, .done(done_o), .product
  );

  initial begin
    checks = 0; failures = 0; done = 0; cycles_32 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_TESTS; i++) begin
      int m, n, cyc, expect_cyc;
      bit sgn;
      longint ea, eb, expect_p;
      m = (i % 3 == 2) ? 1 + $urandom % 8 : 8;
      n = (i % 3 == 2) ? 1 + $urandom % 8 : 8;
      sgn = i[0];
      ea = longint'($urandom) & ((longint'(1) << (4 * m)) - 1);
      eb = longint'($urandom) & ((longint'(1) << (4 * n)) - 1);
      if (i == 0) begin ea = 64'hffff_ffff; eb = 64'hffff_ffff; end
      if (i == 1) begin ea = 64'h8000_0000; eb = 64'h8000_0000; end
      @(negedge clk);
      a = 32'(ea); b = 32'(eb); m_digits = 4'(m); n_digits = 4'(n);
      signed_mode = sgn; start = 1;
      if (sgn && ea[4*m-1]) ea = ea | ~((longint'(1) << (4 * m)) - 1);
      if (sgn && eb[4*n-1]) eb = eb | ~((longint'(1) << (4 * n)) - 1);
      expect_p = ea * eb;
      expect_cyc = ((m + K - 1) / K + 1) * ((n + L - 1) / L);
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done_o && cyc < 1000) begin
        if (busy) cyc++;
        @(negedge clk);
      end
      checks += 2;
      if (product !== 64'(expect_p)) begin
        failures++;
        $display("FAIL %0dx%0d cluster, %0dx%0d bits: got %h expected %h", K, L, 4*m, 4*n, product, expect_p);
      end
      if (cyc != expect_cyc) begin
        failures++;
        $display("FAIL %0dx%0d cluster: %0d cycles, expected %0d", K, L, cyc, expect_cyc);
      end
      if (m == 8 && n == 8) cycles_32 = cyc;
    end
    done = 1;
  end
endmodule
