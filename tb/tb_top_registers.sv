// tb_top_registers: random load/clear sequences against a reference model.
module tb_top_registers;
  localparam int K = 4;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [4*K-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  top_registers dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q=%h model=%h", i, q, model);
      end
      clr = ($urandom % 8) == 0;
      en  = 1'($urandom);
      d   = 16'($urandom);
      @(posedge clk);
      if (clr) model = '0;
      else if (en) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
