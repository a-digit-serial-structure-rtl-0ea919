// tb_digifab_nxn: N x N-bit multipliers, N = 4 .. 64, on a single 4 x 4
// cluster built for up to 64 x 64 bits (MMAX = NMAX = 16). For each N it
// runs signed and unsigned random products and extreme operands. It checks
// them against 128-bit products, and checks that the cycle count follows the
// step function (ceil(N/16)+1)*ceil(N/16). The cycle count per N is printed.
module tb_digifab_nxn;
  localparam int K = 4, L = 4, DMAX = 16;
  logic clk = 0, rst_n = 0, start = 0, signed_mode = 0;
  logic [4:0] m_digits = 1, n_digits = 1;
  logic [63:0] a = '0, b = '0;
  logic busy, done;
  logic [127:0] product;
  int checks = 0, failures = 0;

  digifab #(.K(K), .L(L), .MMAX(DMAX), .NMAX(DMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int d = 1; d <= DMAX; d++) begin
      int cyc_seen;
      for (int i = 0; i < 40; i++) begin
        logic [127:0] ea, eb, expect_p;
        logic [63:0] mask;
        int cyc, expect_cyc;
        bit sgn;
        sgn = i[0];
        mask = (d == 16) ? '1 : ((64'd1 << (4 * d)) - 1);
        a = {$urandom, $urandom} & mask;
        b = {$urandom, $urandom} & mask;
        if (i < 2) begin a = mask; b = mask; end
        if (i == 2 || i == 3) begin a = 64'd1 << (4 * d - 1); b = a; end
        ea = {64'd0, a}; eb = {64'd0, b};
        if (sgn && a[4*d-1]) ea = ea | ~{64'd0, mask};
        if (sgn && b[4*d-1]) eb = eb | ~{64'd0, mask};
        expect_p = ea * eb;
        expect_cyc = ((d + K - 1) / K + 1) * ((d + L - 1) / L);
        @(negedge clk);
        m_digits = 5'(d); n_digits = 5'(d); signed_mode = sgn; start = 1;
        @(negedge clk);
        start = 0;
        cyc = 0;
        while (!done && cyc < 1000) begin
          if (busy) cyc++;
          @(negedge clk);
        end
        checks += 2;
        if (product !== expect_p) begin
          failures++;
          $display("FAIL %0dx%0d %s: got %h expected %h", 4*d, 4*d, sgn ? "signed" : "unsigned", product, expect_p);
        end
        if (cyc != expect_cyc) begin
          failures++;
          $display("FAIL %0dx%0d: %0d cycles, expected %0d", 4*d, 4*d, cyc, expect_cyc);
        end
        cyc_seen = cyc;
      end
      $display("%0d x %0d bits: %0d cycles", 4*d, 4*d, cyc_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
