// tb_fab_cluster: tests the FAB cluster at its default 4 x 4 size and at
// 2 x 3 and 3 x 1, the latter two to cover non-square tiles and both
// placements of the signed correction bit (see fab_cluster_check).
module tb_fab_cluster;
  int c0, f0, c1, f1, c2, f2;
  bit d0, d1, d2;
  int checks, failures;

  fab_cluster_check #(.K(4), .L(4)) u_44 (.checks(c0), .failures(f0), .done(d0));
  fab_cluster_check #(.K(2), .L(3)) u_23 (.checks(c1), .failures(f1), .done(d1));
  fab_cluster_check #(.K(3), .L(1)) u_31 (.checks(c2), .failures(f2), .done(d2));

  initial begin : watchdog
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
