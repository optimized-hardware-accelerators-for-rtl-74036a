// tb_pa2d_design5 -- self-checking testbench of pa2d_design5 at K=3, N=4, M=6.
//
// Three distance matrices are fed: the first two back to back, the third
// with two idle clocks in the middle. Every PE's dv pulse is checked
// against D(k,n) = sum_m |X(m,n) - Y(k,m)| computed here, and against the
// expected time: PE(k,n) finishes k clocks after the last step was presented, so one matrix takes K + M - 1 clocks. d_valid must pulse once per matrix.
module tb_pa2d_design5;
  localparam int K = 3, N = 4, M = 6, W = 8, NMAT = 3;
  localparam int DW = W + $clog2(M);

  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0;
  logic [N-1:0][W-1:0] x_row = '0;
  logic [K-1:0][W-1:0] y_col = '0;
  logic [K-1:0][N-1:0] dv;
  logic d_valid;
  logic [K-1:0][N-1:0][DW-1:0] d;

  pa2d_design5 #(.K(K), .N(N), .M(M), .W(W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int X[NMAT][M][N], Y[NMAT][K][M], E[NMAT][K][N];
  int step_cyc[NMAT][M];
  int got[K][N];
  int nvalid = 0, done_cyc[NMAT];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int lat(int k, int n);
    return k;
  endfunction

  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (d_valid) nvalid++;
      for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) if (dv[k][n]) begin
        int i; i = got[k][n]; got[k][n]++;
        checks += 2;
        if (i >= NMAT) begin failures += 2; $display("FAIL extra dv at PE(%0d,%0d)", k, n); end
        else begin
          if (int'(d[k][n]) != E[i][k][n]) begin failures++; $display("FAIL D(%0d,%0d) of matrix %0d: %0d vs %0d", k, n, i, d[k][n], E[i][k][n]); end
          if (cyc != step_cyc[i][M-1] + lat(k, n)) begin failures++; $display("FAIL time of PE(%0d,%0d) matrix %0d: %0d vs %0d", k, n, i, cyc, step_cyc[i][M-1] + lat(k, n)); end
        end
        if (i < NMAT) done_cyc[i] = cyc;
      end
    end
  end

  initial begin
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) got[k][n] = 0;
    for (int i = 0; i < NMAT; i++) begin
      for (int m = 0; m < M; m++) begin
        for (int n = 0; n < N; n++) X[i][m][n] = $urandom % (1 << W);
        for (int k = 0; k < K; k++) Y[i][k][m] = $urandom % (1 << W);
      end
      for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) begin
        E[i][k][n] = 0;
        for (int m = 0; m < M; m++) E[i][k][n] += (X[i][m][n] > Y[i][k][m]) ? X[i][m][n] - Y[i][k][m] : Y[i][k][m] - X[i][m][n];
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NMAT; i++)
      for (int m = 0; m < M; m++) begin
        if (i == 2 && m == 3) begin
          @(negedge clk); in_valid = 0; first = 0; last = 0;
          @(negedge clk);
        end
        @(negedge clk);
        in_valid = 1; first = (m == 0); last = (m == M - 1);
        for (int n = 0; n < N; n++) x_row[n] = W'(X[i][m][n]);
        for (int k = 0; k < K; k++) y_col[k] = W'(Y[i][k][m]);
        @(posedge clk); #1 step_cyc[i][m] = cyc;
      end
    @(negedge clk); in_valid = 0; first = 0; last = 0;
    repeat (K + N + 4) @(posedge clk);
    #3;
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) begin
      checks++;
      if (got[k][n] != NMAT) begin failures++; $display("FAIL PE(%0d,%0d) gave %0d results", k, n, got[k][n]); end
    end
    checks += 2;
    if (nvalid != NMAT) begin failures++; $display("FAIL d_valid count %0d", nvalid); end
    // clocks from the first step of the first matrix to the last result
    if (done_cyc[1] - step_cyc[0][0] + 1 != 2 * M + lat(K - 1, N - 1)) begin
      failures++; $display("FAIL two back-to-back matrices took %0d clocks", done_cyc[1] - step_cyc[0][0] + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
