// tb_sd_tile_sched -- self-checking test of the nonlinear scheduler at the
// size of its figure (K = 6, M = 3, N = 4, WK = 3, WN = 2). Every issued
// step must follow t = m + M*kt + M*Hk*nt (m fastest, then k tile, then n
// tile), first/last must mark m = 0 and m = M-1, and the run must issue
// exactly Hk*Hn*M = 12 steps with done on the final one. Run twice to check
// restart.
module tb_sd_tile_sched;
  localparam int K = 6, M = 3, N = 4, WK = 3, WN = 2, HK = 2, HN = 2;
  logic clk = 0, rst_n = 0;
  logic start, busy, step, first, last, done; logic [1:0] m; logic kt, nt;
  int checks = 0, failures = 0;

  sd_tile_sched #(.K(K), .M(M), .N(N), .WK(WK), .WN(WN)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int t;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t = 0;
      while (busy) begin
        int em, ekt, ent;
        em = t % M; ekt = (t / M) % HK; ent = t / (M * HK);
        checks++;
        if (!step || int'(m) != em || int'(kt) != ekt || int'(nt) != ent || first != (em == 0) || last != (em == M - 1)
            || done != (t == HK * HN * M - 1)) begin
          failures++; $display("t=%0d got m=%0d kt=%0d nt=%0d f=%0d l=%0d d=%0d", t, m, kt, nt, first, last, done);
        end
        t++;
        @(negedge clk);
      end
      checks++;
      if (t != HK * HN * M) begin failures++; $display("steps %0d exp %0d", t, HK * HN * M); end
      repeat (3) @(negedge clk);
      checks++; if (busy || step) begin failures++; $display("not idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
