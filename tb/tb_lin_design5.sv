// tb_lin_design5 -- self-checking test of the linear N-PE array (Design #5)
// with N = 4, M = 6 and K = 5 reference samples fed feature-serially back
// to back. Checks every D(k,.) against values computed here and that the K
// vectors take exactly K*M clocks.
module tb_lin_design5;
  localparam int N = 4, M = 6, W = 16, K = 5, DW = W + 3;
  logic clk = 0, rst_n = 0;
  logic in_valid; logic [W-1:0] y; logic [N-1:0][W-1:0] x;
  logic d_valid; logic [N-1:0][DW-1:0] d;
  int checks = 0, failures = 0;
  int X[M][N], Y[K][M];

  lin_design5 #(.N(N), .M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0, k_out = 0, t_last = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    #1;
    if (rst_n && d_valid) begin
      t_last = cyc;
      for (int n = 0; n < N; n++) begin
        int exp; exp = 0;
        for (int m = 0; m < M; m++) exp += (X[m][n] > Y[k_out][m]) ? X[m][n] - Y[k_out][m] : Y[k_out][m] - X[m][n];
        checks++;
        if (int'(d[n]) != exp) begin failures++; $display("D(%0d,%0d) got %0d exp %0d", k_out, n, d[n], exp); end
      end
      k_out++;
    end
  end

  initial begin
    int t0;
    in_valid = 0; y = 0; x = '0;
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) X[m][n] = $urandom % 65536;
    for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) Y[k][m] = $urandom % 65536;
    repeat (2) @(posedge clk); rst_n = 1;
    #1 t0 = cyc;
    for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) begin
      @(negedge clk); in_valid = 1; y = W'(Y[k][m]);
      for (int n = 0; n < N; n++) x[n] = W'(X[m][n]);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++; if (k_out != K) begin failures++; $display("outputs %0d", k_out); end
    checks++; if (t_last - t0 != K * M) begin failures++; $display("took %0d clocks, exp %0d", t_last - t0, K * M); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
