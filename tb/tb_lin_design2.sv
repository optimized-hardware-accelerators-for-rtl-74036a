// tb_lin_design2 -- self-checking testbench of the linear array Design #2
// (K PEs with N partial sums each) at K = 3, M = 4, N = 5.
//
// Three distance matrices are fed in the order n fastest, then m: the first
// two back to back, the third with idle clocks in the middle. During the
// last feature sweep of each matrix, d_valid must pulse in the same clock
// that sample n's last feature was taken, once per sample, with d_n = n and
// d = D(0..K-1,n) computed here; a matrix takes M*N clocks.
module tb_lin_design2;
  localparam int K = 3, M = 4, N = 5, W = 8, NMAT = 3;
  localparam int DW = W + $clog2(M), NW = $clog2(N);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] x = '0; logic [K-1:0][W-1:0] y = '0;
  logic d_valid; logic [NW-1:0] d_n; logic [K-1:0][DW-1:0] d;

  lin_design2 #(.K(K), .M(M), .N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int X[NMAT][M][N], Y[NMAT][K][M];
  int step_cyc[NMAT][M][N];
  int nres = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    #2;
    if (rst_n && d_valid) begin
      int i, n;
      i = nres / N; n = nres % N; nres++;
      checks += 2;
      if (i >= NMAT || int'(d_n) != n) begin failures++; $display("FAIL result %0d tagged n=%0d", nres - 1, d_n); end
      else begin
        if (cyc != step_cyc[i][M-1][n]) begin failures++; $display("FAIL time of D(.,%0d) matrix %0d", n, i); end
        for (int k = 0; k < K; k++) begin
          int e; e = 0;
          for (int m = 0; m < M; m++) e += (X[i][m][n] > Y[i][k][m]) ? X[i][m][n] - Y[i][k][m] : Y[i][k][m] - X[i][m][n];
          checks++;
          if (int'(d[k]) != e) begin failures++; $display("FAIL D(%0d,%0d) matrix %0d: %0d vs %0d", k, n, i, d[k], e); end
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NMAT; i++) begin
      for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) X[i][m][n] = $urandom % (1 << W);
      for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) Y[i][k][m] = $urandom % (1 << W);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NMAT; i++)
      for (int m = 0; m < M; m++)
        for (int n = 0; n < N; n++) begin
          if (i == 2 && n == 2) begin @(negedge clk); in_valid = 0; @(negedge clk); end
          @(negedge clk); in_valid = 1; x = W'(X[i][m][n]);
          for (int k = 0; k < K; k++) y[k] = W'(Y[i][k][m]);
          @(posedge clk); #1 step_cyc[i][m][n] = cyc;
        end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    #3;
    checks += 2;
    if (nres != NMAT * N) begin failures++; $display("FAIL %0d results", nres); end
    if (step_cyc[1][M-1][N-1] - step_cyc[0][0][0] + 1 != 2 * M * N) begin failures++; $display("FAIL two matrices not in 2*M*N clocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
