// tb_pa2d_design2 -- self-checking test of the 2-D K x M array Design #2 at
// K = 3, M = 4. Loads Y, streams N = 12 samples of X (with one gap), and
// checks every row of the output: D(k,n) must appear on d_col[k] with
// d_valid[k] exactly M - 1 + k clocks after the clock that took sample n,
// and must equal the distance computed here. The whole stream, N samples
// plus one gap, must finish N + M + K - 1 clocks after the first input.
module tb_pa2d_design2;
  localparam int K = 3, M = 4, W = 16, N = 12, DW = W + 2;
  logic clk = 0, rst_n = 0;
  logic y_we; logic [1:0] y_k; logic [1:0] y_m; logic [W-1:0] y_in;
  logic x_valid; logic [M-1:0][W-1:0] x_col; logic [K-1:0] d_valid; logic [K-1:0][DW-1:0] d_col;
  int checks = 0, failures = 0;
  int X[M][N], Y[K][M];
  int t_in[N];

  pa2d_design2 #(.K(K), .M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0, t_last_out = -1;
  int n_out[K];
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #2;
    if (rst_n) for (int k = 0; k < K; k++) if (d_valid[k]) begin
      int exp, n;
      n = n_out[k]; exp = 0;
      for (int m = 0; m < M; m++) exp += (X[m][n] > Y[k][m]) ? X[m][n] - Y[k][m] : Y[k][m] - X[m][n];
      checks += 2;
      if (int'(d_col[k]) != exp) begin failures++; $display("D(%0d,%0d) got %0d exp %0d", k, n, d_col[k], exp); end
      if (cyc != t_in[n] + M - 1 + k) begin failures++; $display("D(%0d,%0d) at %0d exp %0d", k, n, cyc, t_in[n] + M - 1 + k); end
      n_out[k]++;
      t_last_out = cyc;
    end
  end

  initial begin
    y_we = 0; y_k = 0; y_m = 0; y_in = 0; x_valid = 0; x_col = '0;
    for (int k = 0; k < K; k++) n_out[k] = 0;
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
      @(posedge clk); #1 t_in[n] = cyc;
    end
    @(negedge clk); x_valid = 0; x_col = '0;
    repeat (M + K + 3) @(posedge clk);
    #3;
    for (int k = 0; k < K; k++) begin
      checks++; if (n_out[k] != N) begin failures++; $display("row %0d gave %0d results", k, n_out[k]); end
    end
    checks++;
    if (t_last_out - t_in[0] + 1 != N + M + K - 1) begin failures++; $display("span %0d exp %0d", t_last_out - t_in[0] + 1, N + M + K - 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
