// tb_sd_scalable_array -- self-checking test of the WK x WN array with its
// scheduler. K = 7 (partial last k tile), M = 5, N = 9 (partial last n
// tile), WK = 3, WN = 2. A one-clock synchronous memory model answers the
// read requests. Every tile's valid distances are compared with values
// computed here; tiles must come out every M clocks and the whole matrix
// must end (done) ceil(K/WK)*ceil(N/WN)*M + 1 clocks after the edge that
// samples start.
module tb_sd_scalable_array;
  localparam int K = 7, M = 5, N = 9, WK = 3, WN = 2, W = 4, HK = 3, HN = 5, DW = W + 3;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, rd_en; logic [2:0] rd_m; logic [1:0] rd_kt; logic [2:0] rd_nt;
  logic [WN-1:0][W-1:0] x_in; logic [WK-1:0][W-1:0] y_in;
  logic tile_valid; logic [1:0] tile_kt; logic [2:0] tile_nt; logic [WK-1:0][WN-1:0][DW-1:0] tile_d;
  int checks = 0, failures = 0;
  int X[M][N], Y[K][M];
  bit seen[K][N];

  sd_scalable_array #(.K(K), .M(M), .N(N), .WK(WK), .WN(WN), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memory model: one-clock read latency; out-of-range rows read as 15
  always @(posedge clk) begin
    if (rd_en) begin
      for (int j = 0; j < WN; j++) begin
        int n; n = int'(rd_nt) * WN + j;
        x_in[j] <= (n < N) ? W'(X[rd_m][n]) : 4'hf;
      end
      for (int i = 0; i < WK; i++) begin
        int k; k = int'(rd_kt) * WK + i;
        y_in[i] <= (k < K) ? W'(Y[k][rd_m]) : 4'hf;
      end
    end
  end

  int cyc = 0, tiles = 0, t_prev = -1;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    #1;
    if (rst_n && tile_valid) begin
      if (t_prev >= 0) begin
        checks++; if (cyc - t_prev != M) begin failures++; $display("tile spacing %0d", cyc - t_prev); end
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
          if (int'(tile_d[i][j]) != exp) begin failures++; $display("D(%0d,%0d) got %0d exp %0d", k, n, tile_d[i][j], exp); end
          seen[k][n] = 1;
        end
      end
    end
  end

  initial begin
    int t0, t1;
    start = 0; x_in = '0; y_in = '0;
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) X[m][n] = $urandom % 16;
    for (int k = 0; k < K; k++) for (int m = 0; m < M; m++) Y[k][m] = $urandom % 16;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(posedge clk); #1 t0 = cyc; start = 0;
    while (!done) begin @(posedge clk); #1; end
    t1 = cyc;
    checks++;
    if (t1 - t0 != HK * HN * M + 1) begin failures++; $display("run took %0d, exp %0d", t1 - t0, HK * HN * M + 1); end
    checks++; if (tiles != HK * HN) begin failures++; $display("tiles %0d", tiles); end
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) begin
      checks++; if (!seen[k][n]) begin failures++; $display("D(%0d,%0d) never produced", k, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
