// sa_workload_run -- test harness that runs one complete distance matrix
// through one sd_scalable_array configuration and checks it. Parameters are
// the array's own (K, M, N, WK, WN, W). Random features of W bits are made
// here; a one-clock synchronous memory model answers the array's read
// requests. Every valid tile entry is compared with a distance computed
// here, tiles must follow each other every M clocks, every D(k,n) must be
// produced once, and done must come ceil(K/WK)*ceil(N/WN)*M + 1 clocks after
// the edge that samples start. It starts itself after reset and raises
// finished with its own check and failure counts; the enclosing testbench
// adds them up. This is a test harness only: it is not part of the design.
module sa_workload_run #(
  parameter int unsigned K  = 26,
  parameter int unsigned M  = 16,
  parameter int unsigned N  = 20000,
  parameter int unsigned WK = 13,
  parameter int unsigned WN = 2,
  parameter int unsigned W  = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned DW  = W + ((M > 1) ? $clog2(M) : 1);
  localparam int unsigned HK  = (K - 1) / WK + 1;
  localparam int unsigned HN  = (N - 1) / WN + 1;
  localparam int unsigned MW  = (M  > 1) ? $clog2(M)  : 1;
  localparam int unsigned HKW = (HK > 1) ? $clog2(HK) : 1;
  localparam int unsigned HNW = (HN > 1) ? $clog2(HN) : 1;

  logic start, busy, done, rd_en;
  logic [MW-1:0] rd_m; logic [HKW-1:0] rd_kt; logic [HNW-1:0] rd_nt;
  logic [WN-1:0][W-1:0] x_in; logic [WK-1:0][W-1:0] y_in;
  logic tile_valid; logic [HKW-1:0] tile_kt; logic [HNW-1:0] tile_nt;
  logic [WK-1:0][WN-1:0][DW-1:0] tile_d;

  int X[M][N], Y[K][M];
  bit seen[K][N];

  sd_scalable_array #(.K(K), .M(M), .N(N), .WK(WK), .WN(WN), .W(W)) dut (.*);

  always @(posedge clk) begin
    if (rd_en) begin
      for (int j = 0; j < WN; j++) begin
        int n; n = int'(rd_nt) * WN + j;
        x_in[j] <= (n < N) ? W'(X[rd_m][n]) : '1;
      end
      for (int i = 0; i < WK; i++) begin
        int k; k = int'(rd_kt) * WK + i;
        y_in[i] <= (k < K) ? W'(Y[k][rd_m]) : '1;
      end
    end
  end

  int cyc = 0, tiles = 0, t_prev = -1;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    #1;
    if (rst_n && tile_valid) begin
      if (t_prev >= 0) begin
        checks++; if (cyc - t_prev != M) begin failures++; $display("SA K=%0d WN=%0d: tile spacing %0d", K, WN, cyc - t_prev); end
      end
      t_prev = cyc;
      tiles++;
      for (int i = 0; i < WK; i++) for (int j = 0; j < WN; j++) begin
        int k, n, exp;
        k = int'(tile_kt) * WK + i; n = int'(tile_nt) * WN + j;
        if (k < K && n < N) begin
          exp = 0;
          for (int m = 0; m < M; m++) exp += (X[m][n] > Y[k][m]) ? X[m][n] - Y[k][m] : Y[k][m] - X[m][n];
          checks++;
          if (int'(tile_d[i][j]) != exp) begin
            failures++;
            if (failures < 10) $display("SA K=%0d WN=%0d: D(%0d,%0d) got %0d exp %0d", K, WN, k, n, tile_d[i][j], exp);
          end
          seen[k][n] = 1;
        end
      end
    end
  end

  initial begin
    int t0, t1;
    finished = 0; checks = 0; failures = 0;
    start = 0; x_in = '0; y_in = '0;
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) X[m][n] = int'($urandom % (1 << W));
    for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) Y[k][m] = int'($urandom % (1 << W));
    @(posedge rst_n);
    @(negedge clk); start = 1;
    @(posedge clk); #1 t0 = cyc; start = 0;
    while (!done) begin @(posedge clk); #1; end
    t1 = cyc;
    checks++;
    if (t1 - t0 != int'(HK * HN * M) + 1) begin failures++; $display("SA K=%0d WN=%0d: run took %0d, exp %0d", K, WN, t1 - t0, HK * HN * M + 1); end
    checks++; if (tiles != int'(HK * HN)) begin failures++; $display("SA K=%0d WN=%0d: tiles %0d", K, WN, tiles); end
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) begin
      checks++; if (!seen[k][n]) begin failures++; if (failures < 10) $display("SA: D(%0d,%0d) never produced", k, n); end
    end
    $display("scalable array K=%0d M=%0d N=%0d wk=%0d wn=%0d: %0d clocks", K, M, N, WK, WN, t1 - t0);
    finished = 1;
  end
endmodule
