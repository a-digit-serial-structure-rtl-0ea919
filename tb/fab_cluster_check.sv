// fab_cluster_check: test harness for one fab_cluster of a given size.
//
// Applies random digits and edge inputs and checks value conservation with
// cell (u,v) weighing u + 4L - 1 - v. It then checks whole products. With zero
// edges the outputs must read as a*b. In signed mode, with the Baugh-Wooley
// correction bits 2^(4L-1) and 2^(4K-1) on the edges and the top product bit
// flipped, they must read as the signed product modulo 2^(4K+4L). Results are
// reported through the checks/failures outputs once done is set.
module fab_cluster_check #(
  parameter int K = 4,
  parameter int L = 4,
  parameter int N_TESTS = 2000
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int PW = 4 * (K + L);
  logic [4*K-1:0] a, top_s, bot_s;
  logic [4*L-1:0] b, left_c, right_c;
  logic [4*L-1:1] left_s;
  logic [4*L-2:0] right_s;
  logic signed_mode, sign_col, sign_row;

  fab_cluster #(.K(K), .L(L)) dut (.*);

  function automatic logic [PW+1:0] out_value();
    logic [PW+1:0] v = '0;
    for (int u = 0; u < 4 * K; u++) v += (PW+2)'(bot_s[u]) << u;
    for (int t = 0; t < 4 * L; t++) v += (PW+2)'(right_c[t]) << (4*K + 4*L - 1 - t);
    for (int t = 0; t < 4 * L - 1; t++) v += (PW+2)'(right_s[t]) << (4*K + 4*L - 2 - t);
    return v;
  endfunction

  function automatic logic [PW+1:0] in_edges();
    logic [PW+1:0] v = '0;
    for (int u = 0; u < 4 * K; u++) v += (PW+2)'(top_s[u]) << (u + 4*L - 1);
    for (int t = 0; t < 4 * L; t++) v += (PW+2)'(left_c[t]) << (4*L - 1 - t);
    for (int t = 1; t < 4 * L; t++) v += (PW+2)'(left_s[t]) << (4*L - 1 - t);
    return v;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < N_TESTS; i++) begin
      logic [PW+1:0] expect_v;
      logic [PW-1:0] got, ref_p;
      for (int u = 0; u < 4 * K; u++) a[u] = 1'($urandom);
      for (int t = 0; t < 4 * L; t++) b[t] = 1'($urandom);
      if (i % 4 == 3) begin a = '1; b = '1; end
      // 1) conservation, unsigned partial products, random edges
      signed_mode = 0; sign_col = 1'($urandom); sign_row = 1'($urandom);
      for (int u = 0; u < 4 * K; u++) top_s[u] = 1'($urandom);
      for (int t = 0; t < 4 * L; t++) left_c[t] = 1'($urandom);
      left_s = {(4*L-1){1'b0}};
      for (int t = 1; t < 4 * L; t++) left_s[t] = 1'($urandom);
      #1;
      expect_v = (PW+2)'(a) * (PW+2)'(b) + in_edges();
      checks++;
      if (out_value() != expect_v) begin
        failures++;
        $display("FAIL %0dx%0d conservation a=%h b=%h", K, L, a, b);
      end
      // 2) unsigned product with zero edges
      top_s = '0; left_c = '0; left_s = '0;
      #1;
      checks++;
      if (out_value() != (PW+2)'(a) * (PW+2)'(b)) begin
        failures++;
        $display("FAIL %0dx%0d unsigned a=%h b=%h", K, L, a, b);
      end
      // 3) signed product with Baugh-Wooley corrections on the edges
      signed_mode = 1; sign_col = 1; sign_row = 1;
      left_c[0] = 1'b1;                            // 2^(4L-1)
      if (K >= L) top_s[4*K - 4*L] = 1'b1;         // 2^(4K-1), top edge
      else        left_s[4*L - 4*K] = 1'b1;        // 2^(4K-1), left edge
      #1;
      got = out_value()[PW-1:0];
      got[PW-1] = ~got[PW-1];                      // 2^(PW-1) mod 2^PW
      ref_p = PW'($signed({{PW{a[4*K-1]}}, a}) * $signed({{PW{b[4*L-1]}}, b}));
      checks++;
      if (got != ref_p) begin
        failures++;
        $display("FAIL %0dx%0d signed a=%h b=%h got %h expected %h", K, L, a, b, got, ref_p);
      end
    end
    done = 1;
  end
endmodule
