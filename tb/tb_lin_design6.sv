// tb_lin_design6 -- self-checking testbench of the linear array Design #6
// (N PEs with K partial sums each) at N = 3, M = 4, K = 5.
//
// Three distance matrices are fed in the order k fastest, then m: the first
// two back to back, the third with idle clocks in the middle. During the
// last feature sweep of each matrix, d_valid must pulse in the same clock
// that reference sample k's last feature was taken, once per k, with
// d_k = k and d = D(k,0..N-1) computed here; a matrix takes K*M clocks.
module tb_lin_design6;
  localparam int N = 3, M = 4, K = 5, W = 8, NMAT = 3;
  localparam int DW = W + $clog2(M), KW = $clog2(K);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] y = '0; logic [N-1:0][W-1:0] x = '0;
  logic d_valid; logic [KW-1:0] d_k; logic [N-1:0][DW-1:0] d;

  lin_design6 #(.N(N), .M(M), .K(K), .W(W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int X[NMAT][M][N], Y[NMAT][K][M];
  int step_cyc[NMAT][M][K];
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
      int i, k;
      i = nres / K; k = nres % K; nres++;
      checks += 2;
      if (i >= NMAT || int'(d_k) != k) begin failures++; $display("FAIL result %0d tagged k=%0d", nres - 1, d_k); end
      else begin
        if (cyc != step_cyc[i][M-1][k]) begin failures++; $display("FAIL time of D(%0d,.) matrix %0d", k, i); end
        for (int n = 0; n < N; n++) begin
          int e; e = 0;
          for (int m = 0; m < M; m++) e += (X[i][m][n] > Y[i][k][m]) ? X[i][m][n] - Y[i][k][m] : Y[i][k][m] - X[i][m][n];
          checks++;
          if (int'(d[n]) != e) begin failures++; $display("FAIL D(%0d,%0d) matrix %0d: %0d vs %0d", k, n, i, d[n], e); end
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
        for (int k = 0; k < K; k++) begin
          if (i == 2 && k == 2) begin @(negedge clk); in_valid = 0; @(negedge clk); end
          @(negedge clk); in_valid = 1; y = W'(Y[i][k][m]);
          for (int n = 0; n < N; n++) x[n] = W'(X[i][m][n]);
          @(posedge clk); #1 step_cyc[i][m][k] = cyc;
        end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    #3;
    checks += 2;
    if (nres != NMAT * K) begin failures++; $display("FAIL %0d results", nres); end
    if (step_cyc[1][M-1][K-1] - step_cyc[0][0][0] + 1 != 2 * K * M) begin failures++; $display("FAIL two matrices not in 2*K*M clocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
