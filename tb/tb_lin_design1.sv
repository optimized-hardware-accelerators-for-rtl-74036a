// tb_lin_design1 -- self-checking test of the linear K-PE array (Design #1)
// with K = 4, M = 5 and N = 7 samples fed feature-serially without gaps,
// then 3 more with random gaps. Checks every output vector D(.,n) against
// values computed here, that outputs come once per M inputs, and that the
// gap-free part takes exactly M*N clocks.
module tb_lin_design1;
  localparam int K = 4, M = 5, W = 8, N = 10, DW = W + 3;
  logic clk = 0, rst_n = 0;
  logic in_valid; logic [W-1:0] x; logic [K-1:0][W-1:0] y;
  logic d_valid; logic [K-1:0][DW-1:0] d;
  int checks = 0, failures = 0;
  int X[M][N], Y[K][M];

  lin_design1 #(.K(K), .M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0, n_out = 0, t_out[N];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    #1;
    if (rst_n && d_valid) begin
      t_out[n_out] = cyc;
      for (int k = 0; k < K; k++) begin
        int exp; exp = 0;
        for (int m = 0; m < M; m++) exp += (X[m][n_out] > Y[k][m]) ? X[m][n_out] - Y[k][m] : Y[k][m] - X[m][n_out];
        checks++;
        if (int'(d[k]) != exp) begin failures++; $display("D(%0d,%0d) got %0d exp %0d", k, n_out, d[k], exp); end
      end
      n_out++;
    end
  end

  initial begin
    int t0;
    in_valid = 0; x = 0; y = '0;
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) X[m][n] = $urandom % 256;
    for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) Y[k][m] = $urandom % 256;
    repeat (2) @(posedge clk); rst_n = 1;
    #1 t0 = cyc;
    for (int n = 0; n < N; n++) for (int m = 0; m < M; m++) begin
      if (n >= 7) while ($urandom % 3 == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk); in_valid = 1; x = W'(X[m][n]);
      for (int k = 0; k < K; k++) y[k] = W'(Y[k][m]);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++; if (n_out != N) begin failures++; $display("outputs %0d", n_out); end
    // first input sampled at edge t0+1, sample 6 completes M*7 clocks later
    checks++; if (t_out[6] - t0 != M * 7) begin failures++; $display("7 samples took %0d clocks, exp %0d", t_out[6] - t0, M * 7); end
    for (int n = 1; n < 7; n++) begin
      checks++; if (t_out[n] - t_out[n-1] != M) begin failures++; $display("output spacing %0d", t_out[n] - t_out[n-1]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
