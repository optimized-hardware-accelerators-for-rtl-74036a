// lin1_workload_run -- test harness that streams N samples of M features,
// without gaps, through one lin_design1 configuration with K PEs and checks
// every output vector D(.,n) against distances computed here. Features of W
// bits are random. It also checks that results come once every M clocks and
// that the whole set takes exactly M*N clocks. It starts itself after reset
// and raises finished with its own check and failure counts. This is a test
// harness only: it is not part of the design.
module lin1_workload_run #(
  parameter int unsigned K = 16,
  parameter int unsigned M = 16,
  parameter int unsigned N = 4096,
  parameter int unsigned W = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned DW = W + ((M > 1) ? $clog2(M) : 1);

  logic in_valid; logic [W-1:0] x; logic [K-1:0][W-1:0] y;
  logic d_valid; logic [K-1:0][DW-1:0] d;
  int X[M][N], Y[K][M];

  lin_design1 #(.K(K), .M(M), .W(W)) dut (.*);

  int cyc = 0, n_out = 0, t_prev = -1, t_last = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    #1;
    if (rst_n && d_valid) begin
      if (t_prev >= 0) begin
        checks++; if (cyc - t_prev != M) begin failures++; $display("lin K=%0d: output spacing %0d", K, cyc - t_prev); end
      end
      t_prev = cyc; t_last = cyc;
      for (int k = 0; k < K; k++) begin
        int exp; exp = 0;
        for (int m = 0; m < M; m++) exp += (X[m][n_out] > Y[k][m]) ? X[m][n_out] - Y[k][m] : Y[k][m] - X[m][n_out];
        checks++;
        if (int'(d[k]) != exp) begin
          failures++;
          if (failures < 10) $display("lin K=%0d: D(%0d,%0d) got %0d exp %0d", K, k, n_out, d[k], exp);
        end
      end
      n_out++;
    end
  end

  initial begin
    int t0;
    finished = 0; checks = 0; failures = 0;
    in_valid = 0; x = '0; y = '0;
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) X[m][n] = int'($urandom % (1 << W));
    for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) Y[k][m] = int'($urandom % (1 << W));
    @(posedge rst_n);
    #1 t0 = cyc;
    for (int n = 0; n < N; n++) for (int m = 0; m < M; m++) begin
      @(negedge clk); in_valid = 1; x = W'(X[m][n]);
      for (int k = 0; k < K; k++) y[k] = W'(Y[k][m]);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++; if (n_out != int'(N)) begin failures++; $display("lin K=%0d: outputs %0d", K, n_out); end
    checks++; if (t_last - t0 != int'(M * N)) begin failures++; $display("lin K=%0d: took %0d clocks, exp %0d", K, t_last - t0, M * N); end
    $display("linear Design #1 K=%0d M=%0d N=%0d: %0d clocks", K, M, N, t_last - t0);
    finished = 1;
  end
endmodule
