// tb_pa2d_design1 -- self-checking test of the 2-D K x M array (Design #1)
// at the size of its figure, K = 3, M = 4. Loads Y, streams N = 12 columns
// of X (with one gap), and checks each output column against distances
// computed here, the first column on the (M-1)th clock after the one that took it
// (time n + M - 1), and N + M clocks (N - 1 columns + one gap + M) from the
// first input to the last output, inclusive, for the whole stream.
module tb_pa2d_design1;
  localparam int K = 3, M = 4, W = 16, N = 12, DW = W + 2;
  logic clk = 0, rst_n = 0;
  logic y_we; logic [1:0] y_k; logic [1:0] y_m; logic [W-1:0] y_in;
  logic x_valid; logic [M-1:0][W-1:0] x_col; logic d_valid; logic [K-1:0][DW-1:0] d_col;
  int checks = 0, failures = 0;
  int X[M][N], Y[K][M];

  pa2d_design1 #(.K(K), .M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0, t_first_in = -1, t_first_out = -1, t_last_out = -1, n_out = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    if (rst_n && d_valid) begin
      if (t_first_out < 0) t_first_out = cyc;
      t_last_out = cyc;
      for (int k = 0; k < K; k++) begin
        int exp;
        exp = 0;
        for (int m = 0; m < M; m++) exp += (X[m][n_out] > Y[k][m]) ? X[m][n_out] - Y[k][m] : Y[k][m] - X[m][n_out];
        checks++;
        if (int'(d_col[k]) != exp) begin failures++; $display("D(%0d,%0d) got %0d exp %0d", k, n_out, d_col[k], exp); end
      end
      n_out++;
    end
  end

  initial begin
    y_we = 0; y_k = 0; y_m = 0; y_in = 0; x_valid = 0; x_col = '0;
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) X[m][n] = $urandom % 65536;
    for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) Y[k][m] = $urandom % 65536;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) begin
      @(negedge clk); y_we = 1; y_k = 2'(k); y_m = 2'(m); y_in = W'(Y[k][m]);
    end
    @(negedge clk); y_we = 0;
    for (int n = 0; n < N; n++) begin
      if (n == 5) begin @(negedge clk); x_valid = 0; end
      @(negedge clk); x_valid = 1;
      for (int m = 0; m < M; m++) x_col[m] = W'(X[m][n]);
      if (n == 0) t_first_in = cyc + 1;
    end
    @(negedge clk); x_valid = 0; x_col = '0;
    repeat (M + 3) @(posedge clk);
    checks++; if (n_out != N) begin failures++; $display("got %0d columns", n_out); end
    checks++; if (t_first_out - t_first_in != M - 1) begin failures++; $display("latency %0d exp %0d", t_first_out - t_first_in, M - 1); end
    checks++; if (t_last_out - t_first_in + 1 != N + M) begin failures++; $display("span %0d exp %0d", t_last_out - t_first_in + 1, N + M); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
