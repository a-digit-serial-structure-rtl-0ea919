// tb_edge_mux: checks the cluster edge multiplexers over whole arrays of
// 1..3 x 1..3 tiles of 4 x 4 blocks. Inside the array every edge input
// must come from its register (top, right or mux register, random contents).
// Over the array's boundary, the weighted sum of all constant bits fed in
// must be 2^(n-1) + 2^(m-1) in signed mode (n = 4M*, m = 4N*) and zero in
// unsigned mode. Cell (u,v) weighs u + m - 1 - v.
module tb_edge_mux;
  localparam int K = 4, L = 4;
  logic signed_mode;
  logic [2:0] col;
  logic [1:0] row;
  logic [4:0] mstar, nstar;
  logic [4*K-1:0] top_q, top_s;
  logic [4*L-1:0] right_c, left_c;
  logic [4*L-2:0] right_s;
  logic [4*L-1:1] left_s;
  logic mux_q;
  int checks = 0, failures = 0;

  edge_mux dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sgn = 0; sgn < 2; sgn++)
      for (int nc = 1; nc <= 3; nc++)
        for (int nr = 1; nr <= 3; nr++) begin
          longint total, expect_v;
          int n, m;
          n = 4 * K * nc; m = 4 * L * nr;
          total = 0;
          signed_mode = sgn[0];
          mstar = 5'(nc * K); nstar = 5'(nr * L);
          for (int c = 0; c < nc; c++)
            for (int r = 0; r < nr; r++) begin
              col = 3'(c); row = 2'(r);
              top_q = 16'($urandom); right_c = 16'($urandom);
              right_s = 15'($urandom); mux_q = 1'($urandom);
              #1;
              // register paths
              if (r > 0) begin
                checks++;
                if (top_s[4*K-1:1] !== top_q[4*K-2:0]) begin failures++; $display("FAIL top path %0d,%0d", c, r); end
              end
              if (c > 0) begin
                checks++;
                if (left_c !== right_c || left_s !== right_s) begin failures++; $display("FAIL left path %0d,%0d", c, r); end
              end
              if (c > 0 && r > 0) begin
                checks++;
                if (top_s[0] !== mux_q) begin failures++; $display("FAIL corner path %0d,%0d", c, r); end
              end
              // boundary constants, weighted
              if (r == 0)
                for (int k = 1; k < 4 * K; k++)
                  if (top_s[k]) total += longint'(1) << (4 * K * c + k + m - 1);
              if (r == 0 && c > 0 && top_s[0]) total += longint'(1) << (4 * K * c + m - 1);
              if (c == 0) begin
                if (top_s[0]) total += longint'(1) << (m - 1 - 4 * L * r);
                for (int t = 0; t < 4 * L; t++)
                  if (left_c[t]) total += longint'(1) << (m - 1 - 4 * L * r - t);
                for (int t = 1; t < 4 * L; t++)
                  if (left_s[t]) total += longint'(1) << (m - 1 - 4 * L * r - t);
              end
            end
          expect_v = (sgn != 0) ? (longint'(1) << (n - 1)) + (longint'(1) << (m - 1)) : 0;
          checks++;
          if (total != expect_v) begin
            failures++;
            $display("FAIL constants %s %0dx%0d tiles: %h expected %h", (sgn != 0) ? "signed" : "unsigned", nc, nr, total, expect_v);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
