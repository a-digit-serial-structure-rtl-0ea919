// tb_right_registers: random writes and reads against a reference array,
// including reading an entry in the same cycle it is rewritten (the read
// must return the old contents). Uses 3 levels (NMAX = 12, L = 4) as well as
// the default configuration's 2.
module tb_right_registers;
  localparam int L = 4;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default: 2 levels
  logic we2; logic [0:0] wa2, ra2; logic [15:0] wc2, rc2; logic [14:0] ws2, rs2;
  right_registers dut2 (.clk, .we(we2), .waddr(wa2), .wc(wc2), .ws(ws2), .raddr(ra2), .rc(rc2), .rs(rs2));
  // 3 levels
  logic we3; logic [1:0] wa3, ra3; logic [15:0] wc3, rc3; logic [14:0] ws3, rs3;
  right_registers #(.L(L), .NMAX(12)) dut3 (.clk, .we(we3), .waddr(wa3), .wc(wc3), .ws(ws3), .raddr(ra3), .rc(rc3), .rs(rs3));

  logic [30:0] m2 [2], m3 [3];
  bit v2 [2], v3 [3];

  initial begin
    v2 = '{default: 0}; v3 = '{default: 0};
    we2 = 0; we3 = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we2 = 1'($urandom); wa2 = 1'($urandom); ra2 = (i % 3 == 0) ? wa2 : 1'($urandom);
      wc2 = 16'($urandom); ws2 = 15'($urandom);
      we3 = 1'($urandom); wa3 = 2'($urandom % 3); ra3 = (i % 3 == 0) ? wa3 : 2'($urandom % 3);
      wc3 = 16'($urandom); ws3 = 15'($urandom);
      #1;
      if (v2[ra2]) begin
        checks++;
        if ({rc2, rs2} !== m2[ra2]) begin failures++; $display("FAIL 2-level read %0d", ra2); end
      end
      if (v3[ra3]) begin
        checks++;
        if ({rc3, rs3} !== m3[ra3]) begin failures++; $display("FAIL 3-level read %0d", ra3); end
      end
      @(posedge clk);
      if (we2) begin m2[wa2] = {wc2, ws2}; v2[wa2] = 1; end
      if (we3) begin m3[wa3] = {wc3, ws3}; v3[wa3] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
