// tb_mux_registers: random read-then-write traffic against a reference
// array. The entry addressed in a cycle is read (old value) and may be
// rewritten on the same clock, as the multiplier uses it. Runs at the
// default 2 levels and at 4 levels (NMAX = 16).
module tb_mux_registers;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic we2, d2, q2; logic [0:0] a2;
  mux_registers dut2 (.clk, .we(we2), .addr(a2), .d(d2), .q(q2));
  logic we4, d4, q4; logic [1:0] a4;
  mux_registers #(.L(4), .NMAX(16)) dut4 (.clk, .we(we4), .addr(a4), .d(d4), .q(q4));

  bit m2 [2], m4 [4], v2 [2], v4 [4];

  initial begin
    v2 = '{default: 0}; v4 = '{default: 0};
    we2 = 0; we4 = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we2 = 1'($urandom); a2 = 1'($urandom); d2 = 1'($urandom);
      we4 = 1'($urandom); a4 = 2'($urandom); d4 = 1'($urandom);
      #1;
      if (v2[a2]) begin checks++; if (q2 !== m2[a2]) begin failures++; $display("FAIL 2-level %0d", a2); end end
      if (v4[a4]) begin checks++; if (q4 !== m4[a4]) begin failures++; $display("FAIL 4-level %0d", a4); end end
      @(posedge clk);
      if (we2) begin m2[a2] = d2; v2[a2] = 1; end
      if (we4) begin m4[a4] = d4; v4[a4] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
