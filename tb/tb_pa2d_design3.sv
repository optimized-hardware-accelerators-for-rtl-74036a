// tb_pa2d_design3 -- self-checking test of the 2-D K x N array (Design #3)
// at the size of its figure, K = 3, N = 4, with M = 9 features. Runs two
// distance matrices one after the other ('first' restarts every PE), checks all K*N distances against values
// computed here and that d_valid rises exactly with the clock that takes
// the M-th step, i.e. M steps per matrix.
module tb_pa2d_design3;
  localparam int K = 3, N = 4, M = 9, W = 16, DW = W + 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, first, last; logic [N-1:0][W-1:0] x_row; logic [K-1:0][W-1:0] y_col;
  logic d_valid; logic [K-1:0][N-1:0][DW-1:0] d;
  int checks = 0, failures = 0;
  int X[2][M][N], Y[2][K][M];

  pa2d_design3 #(.K(K), .N(N), .M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; first = 0; last = 0; x_row = '0; y_col = '0;
    for (int r = 0; r < 2; r++) begin
      for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) X[r][m][n] = $urandom % 65536;
      for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) Y[r][k][m] = $urandom % 65536;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      for (int m = 0; m < M; m++) begin
        @(negedge clk);
        in_valid = 1; first = (m == 0); last = (m == M - 1);
        for (int n = 0; n < N; n++) x_row[n] = W'(X[r][m][n]);
        for (int k = 0; k < K; k++) y_col[k] = W'(Y[r][k][m]);
        @(posedge clk); #1;
        checks++;
        if (d_valid !== (m == M - 1)) begin failures++; $display("d_valid wrong r=%0d m=%0d", r, m); end
      end
      @(negedge clk); in_valid = 0; first = 0; last = 0;
      // at this point matrix r is complete (d_valid rose at the last edge)
      for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) begin
        int exp; exp = 0;
        for (int m = 0; m < M; m++) exp += (X[r][m][n] > Y[r][k][m]) ? X[r][m][n] - Y[r][k][m] : Y[r][k][m] - X[r][m][n];
        checks++;
        if (int'(d[k][n]) != exp) begin failures++; $display("r=%0d D(%0d,%0d) got %0d exp %0d", r, k, n, d[k][n], exp); end
      end
      checks++;
      if (!d_valid) begin failures++; $display("d_valid missing after matrix %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
