// tb_final_adder: drives sequences of tile-row slices (lowest first) and
// checks each 4L-bit result against an integer sum of the bit-reversed carry
// and sum vectors plus the carry kept from the previous slice, with the top
// bit flipped when flip_msb is set.
module tb_final_adder;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, en = 0, first = 0, flip_msb = 0, corner = 0;
  logic [4*L-1:0] right_c = '0, slice;
  logic [4*L-2:0] right_s = '0;
  int checks = 0, failures = 0;

  final_adder dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int carry;
    #12 rst_n = 1;
    carry = 0;
    for (int i = 0; i < 4000; i++) begin
      int cv, sv, total, expect_v;
      @(negedge clk);
      first = (i % 4 == 0);
      en = (i % 17 != 5);
      flip_msb = 1'($urandom);
      right_c = (i % 11 == 0) ? '1 : 16'($urandom);
      right_s = (i % 11 == 0) ? '1 : 15'($urandom);
      corner = (i % 11 == 0) ? 1'b1 : 1'($urandom);
      cv = 0; sv = 0;
      for (int t = 0; t < 4 * L; t++) cv += int'(right_c[t]) << (4 * L - 1 - t);
      for (int t = 0; t < 4 * L - 1; t++) sv += int'(right_s[t]) << (4 * L - 2 - t);
      sv += int'(corner) << (4 * L - 1);
      total = cv + sv + (first ? 0 : carry);
      expect_v = (total & 32'h0000_ffff) ^ (int'(flip_msb) << (4 * L - 1));
      #1;
      checks++;
      if (int'(slice) != expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d slice=%h expected %h", i, slice, expect_v);
      end
      @(posedge clk);
      if (en) carry = total >> (4 * L);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
