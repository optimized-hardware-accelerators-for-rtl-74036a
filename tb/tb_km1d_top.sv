// tb_km1d_top -- end-to-end test of the 1-D K-means engine.
// Builds a 1-D dataset of noisy groups, assigns every element a random
// initial cluster, loads the centroids and populations of that random
// partition, and runs to convergence (several datasets/seeds). Checks, all
// against values computed here: the run converged; every final label is the
// nearest final centroid (lowest index on ties), which is what a pass with
// no moves implies; the populations equal the label histogram; and the run
// took exactly iterations * (n + ceil(log2 K) + 7) clocks. Also counts the
// element moves (continuous centroid updates) and requires some.
module tb_km1d_top;
  localparam int K = 8, DW = 8, NMAX = 1024, LV = 3;
  localparam int AW = 10, CW = 11;
  logic clk = 0, rst_n = 0;
  logic ld_e_we; logic [AW-1:0] ld_addr; logic [DW-1:0] ld_e; logic [2:0] ld_l;
  logic ld_c_we; logic [2:0] ld_k; logic [DW-1:0] ld_c; logic [CW-1:0] ld_n;
  logic [CW-1:0] n_elems; logic start, busy, done, converged; logic [15:0] iterations;
  logic [K-1:0][DW-1:0] centroids; logic [K-1:0][CW-1:0] counts;
  logic [AW-1:0] rd_addr; logic [2:0] rd_label;
  int checks = 0, failures = 0, moves = 0;

  km1d_top #(.K(K), .DATA_W(DW), .N_MAX(NMAX), .MAX_ITER(64)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && dut.cu_v && dut.cu_changed) moves++;

  int ev[NMAX], lab[NMAX];

  task automatic run_case(int n, int groups);
    int sum[K], cnt[K], cyc;
    for (int k = 0; k < K; k++) begin sum[k] = 0; cnt[k] = 0; end
    for (int i = 0; i < n; i++) begin
      int base = (($urandom % groups) * 255) / (groups > 1 ? groups - 1 : 1);
      int v = base + int'($urandom % 21) - 10;
      ev[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      lab[i] = $urandom % K;
      sum[lab[i]] += ev[i]; cnt[lab[i]]++;
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ld_e_we = 1; ld_addr = AW'(i); ld_e = DW'(ev[i]); ld_l = 3'(lab[i]);
    end
    @(negedge clk); ld_e_we = 0;
    for (int k = 0; k < K; k++) begin
      @(negedge clk); ld_c_we = 1; ld_k = 3'(k);
      ld_c = DW'(cnt[k] ? sum[k] / cnt[k] : $urandom % 256); ld_n = CW'(cnt[k]);
    end
    @(negedge clk); ld_c_we = 0; n_elems = CW'(n); start = 1;
    @(posedge clk); #1; start = 0; cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (!converged) begin failures++; $display("did not converge in %0d passes", iterations); end
    checks++;
    if (cyc != int'(iterations) * (n + LV + 7)) begin
      failures++; $display("cycle count %0d, expected %0d", cyc, int'(iterations) * (n + LV + 7));
    end
    begin
      int hist[K], tot;
      for (int k = 0; k < K; k++) hist[k] = 0;
      for (int i = 0; i < n; i++) begin
        int best; best = 0;
        rd_addr = AW'(i); #1;
        for (int k = 1; k < K; k++) begin
          int db, dk;
          db = ev[i] > int'(centroids[best]) ? ev[i] - int'(centroids[best]) : int'(centroids[best]) - ev[i];
          dk = ev[i] > int'(centroids[k]) ? ev[i] - int'(centroids[k]) : int'(centroids[k]) - ev[i];
          if (dk < db) best = k;
        end
        checks++;
        if (int'(rd_label) != best) begin failures++; $display("elem %0d (%0d) label %0d nearest %0d", i, ev[i], rd_label, best); end
        hist[rd_label]++;
      end
      tot = 0;
      for (int k = 0; k < K; k++) begin
        checks++; tot += int'(counts[k]);
        if (int'(counts[k]) != hist[k]) begin failures++; $display("count %0d got %0d exp %0d", k, counts[k], hist[k]); end
      end
      checks++; if (tot != n) begin failures++; $display("total %0d", tot); end
    end
    $display("case n=%0d groups=%0d: %0d passes, %0d cycles, centroids %p", n, groups, iterations, cyc, centroids);
  endtask

  initial begin
    ld_e_we = 0; ld_addr = 0; ld_e = 0; ld_l = 0; ld_c_we = 0; ld_k = 0; ld_c = 0; ld_n = 0;
    n_elems = 0; start = 0; rd_addr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    run_case(300, 4);
    run_case(1000, 8);
    run_case(64, 3);
    checks++;
    if (moves == 0) begin failures++; $display("no element ever moved"); end
    $display("element moves (centroid updates): %0d", moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
