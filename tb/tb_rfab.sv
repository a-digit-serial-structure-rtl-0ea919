// tb_rfab: self-checking test of one reduced flexible array block.
//
// For every multiplicand/multiplier digit pair, in unsigned and signed mode
// with each sign-position setting, and with random edge inputs, it checks
// that the block conserves value. The weighted sum of its partial products
// and edge inputs must equal the weighted sum of its edge outputs. Cell
// (s,t) weighs s + 3 - t. It also checks that with zero edge inputs in
// unsigned mode, the outputs read as the 8-bit product a*b.
module tb_rfab;
  logic [3:0] a, b, top_s, left_c, bot_s, right_c;
  logic [3:1] left_s;
  logic [2:0] right_s;
  logic signed_mode, sign_col, sign_row;
  int checks = 0, failures = 0;

  rfab dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int out_value();
    int v = 0;
    for (int s = 0; s < 4; s++) v += int'(bot_s[s]) << s;
    for (int t = 0; t < 4; t++) v += int'(right_c[t]) << (7 - t);
    for (int t = 0; t < 3; t++) v += int'(right_s[t]) << (6 - t);
    return v;
  endfunction

  initial begin
    for (int mode = 0; mode < 8; mode++)
      for (int ai = 0; ai < 16; ai++)
        for (int bi = 0; bi < 16; bi++)
          for (int r = 0; r < 8; r++) begin
            int expect_v;
            {signed_mode, sign_col, sign_row} = 3'(mode);
            a = 4'(ai); b = 4'(bi);
            if (r == 0) begin
              top_s = '0; left_c = '0; left_s = '0;
            end else begin
              top_s = 4'($urandom); left_c = 4'($urandom); left_s = 3'($urandom);
            end
            // partial products of a 4x4 Baugh-Wooley block
            expect_v = 0;
            for (int s = 0; s < 4; s++)
              for (int t = 0; t < 4; t++) begin
                bit pp, inv;
                pp  = a[s] & b[3-t];
                inv = signed_mode && ((sign_col && s == 3) != (sign_row && t == 0));
                expect_v += int'(1'(pp ^ inv)) << (s + 3 - t);
              end
            for (int s = 0; s < 4; s++) expect_v += int'(top_s[s]) << (s + 3);
            for (int t = 0; t < 4; t++) expect_v += int'(left_c[t]) << (3 - t);
            for (int t = 1; t < 4; t++) expect_v += int'(left_s[t]) << (3 - t);
            #1;
            checks++;
            if (out_value() != expect_v) begin
              failures++;
              if (failures < 10)
                $display("FAIL mode=%0d a=%0d b=%0d: out %0d expected %0d", mode, ai, bi, out_value(), expect_v);
            end
            if (mode < 4 && r == 0) begin
              checks++;
              if (out_value() != ai * bi) begin
                failures++;
                $display("FAIL product %0d*%0d -> %0d", ai, bi, out_value());
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
