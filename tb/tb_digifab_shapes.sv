// tb_digifab_shapes: the 32 x 32-bit multiplier on clusters of different
// shapes: all factorisations of 16 blocks (1x16, 2x8, 4x4, 8x2, 16x1) and
// some smaller clusters (1x1, 2x3, 3x3, 3x4, 5x2). Each shape must give
// correct products in (ceil(8/K)+1)*ceil(8/L) cycles. The 32 x 32 cycle
// counts are printed per shape.
module tb_digifab_shapes;
  localparam int NS = 10;
  localparam int KS [NS] = '{1, 2, 4, 8, 16, 1, 2, 3, 3, 5};
  localparam int LS [NS] = '{16, 8, 4, 2, 1, 1, 3, 3, 4, 2};
  logic clk = 0;
  int c [NS], f [NS], cyc [NS];
  bit d [NS];
  always #5 clk = ~clk;

  for (genvar i = 0; i < NS; i++) begin : g_shape
    digifab_shape_run #(.K(KS[i]), .L(LS[i])) u_run (
      .clk, .checks(c[i]), .failures(f[i]), .cycles_32(cyc[i]), .done(d[i])
    );
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (d.and() == 1'b1);
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin
      int expect_cyc;
      expect_cyc = ((8 + KS[i] - 1) / KS[i] + 1) * ((8 + LS[i] - 1) / LS[i]);
      $display("cluster %0dx%0d: 32x32 multiply in %0d cycles", KS[i], LS[i], cyc[i]);
      checks += c[i] + 1;
      failures += f[i] + ((cyc[i] != expect_cyc) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
