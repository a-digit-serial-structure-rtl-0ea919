// tb_digifab_ctrl: for every size M, N = 1..8 digits on the default 4 x 4
// cluster, checks the sequence of phases and tile coordinates the
// sequencer issues against the expected order. Tiles come column by column,
// top to bottom, then the extra pass goes bottom to top. It also checks that
// busy lasts exactly (ceil(M/K)+1)*ceil(N/L) cycles, that done pulses once
// right after, that M* and N* are right, and that a start while busy is
// ignored.
module tb_digifab_ctrl;
  import digifab_pkg::*;
  localparam int K = 4, L = 4, MMAX = 8, NMAX = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] m_digits = 1, n_digits = 1;
  phase_e phase;
  logic [0:0] col;
  logic [0:0] row;
  logic [3:0] mstar, nstar;
  logic accept, busy, done;
  int checks = 0, failures = 0;

  digifab_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_step(input phase_e ph, input int c, input int r, input string what);
    checks++;
    if (phase !== ph || (ph == PH_TILE && int'(col) != c) || int'(row) != r || !busy) begin
      failures++;
      $display("FAIL %s: phase=%0d col=%0d row=%0d, expected phase=%0d col=%0d row=%0d",
               what, phase, col, row, ph, c, r);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int m = 1; m <= MMAX; m++)
      for (int n = 1; n <= NMAX; n++) begin
        int nc, nr, cyc;
        nc = (m + K - 1) / K; nr = (n + L - 1) / L;
        @(negedge clk);
        m_digits = 4'(m); n_digits = 4'(n); start = 1;
        #1;
        checks++;
        if (!accept) begin failures++; $display("FAIL start not accepted"); end
        @(negedge clk);
        start = 1;  // held high: must be ignored while busy
        m_digits = 4'(1 + $urandom % 8); n_digits = 4'(1 + $urandom % 8);
        checks++;
        if (int'(mstar) != nc * K || int'(nstar) != nr * L) begin
          failures++; $display("FAIL M*/N* for %0dx%0d", m, n);
        end
        cyc = 0;
        for (int c = 0; c < nc; c++)
          for (int r = 0; r < nr; r++) begin
            expect_step(PH_TILE, c, r, "tile");
            checks++;
            if (done || accept) begin failures++; $display("FAIL done/accept while busy"); end
            @(negedge clk); cyc++;
          end
        for (int r = nr - 1; r >= 0; r--) begin
          expect_step(PH_FINAL, 0, r, "final");
          @(negedge clk); cyc++;
        end
        start = 0;
        checks++;
        if (busy || !done || cyc != (nc + 1) * nr) begin
          failures++; $display("FAIL end of %0dx%0d: busy=%0d done=%0d cycles=%0d", m, n, busy, done, cyc);
        end
        @(negedge clk);
        checks++;
        if (done) begin failures++; $display("FAIL done longer than one cycle"); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
