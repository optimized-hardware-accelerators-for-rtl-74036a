// km_workload_run -- test harness that clusters one full-size 1-D data set
// on one km1d_top configuration with K clusters. It makes NE 8-bit
// elements in GROUPS noisy groups, gives each a random initial label, loads
// elements, labels, centroids and populations of that partition, and runs
// to convergence. Checks, against values computed here: the run converged;
// every final label is the nearest final centroid (lowest index on ties);
// the populations equal the label histogram; and the run took exactly
// iterations * (NE + ceil(log2 K) + 7) clocks. It starts after reset and
// raises finished with its own check and failure counts. This is a test
// harness only: it is not part of the design.
module km_workload_run #(
  parameter int unsigned K      = 16,
  parameter int unsigned NE     = 400000,
  parameter int unsigned GROUPS = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   passes,
  output int   moves
);
  localparam int unsigned DW = 8;
  localparam int unsigned LW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned AW = (NE > 1) ? $clog2(NE) : 1;
  localparam int unsigned CW = $clog2(NE + 1);
  localparam int unsigned LV = (K > 1) ? $clog2(K) : 1;

  logic ld_e_we; logic [AW-1:0] ld_addr; logic [DW-1:0] ld_e; logic [LW-1:0] ld_l;
  logic ld_c_we; logic [LW-1:0] ld_k; logic [DW-1:0] ld_c; logic [CW-1:0] ld_n;
  logic [CW-1:0] n_elems; logic start, busy, done, converged; logic [15:0] iterations;
  logic [K-1:0][DW-1:0] centroids; logic [K-1:0][CW-1:0] counts;
  logic [AW-1:0] rd_addr; logic [LW-1:0] rd_label;

  km1d_top #(.K(K), .DATA_W(DW), .N_MAX(NE), .MAX_ITER(64)) dut (.*);

  always @(posedge clk) if (rst_n && dut.cu_v && dut.cu_changed) moves++;

  int ev[NE];

  initial begin
    int sum[K], cnt[K], cyc, hist[K], tot;
    finished = 0; checks = 0; failures = 0; passes = 0; moves = 0;
    ld_e_we = 0; ld_addr = '0; ld_e = '0; ld_l = '0; ld_c_we = 0; ld_k = '0; ld_c = '0; ld_n = '0;
    n_elems = '0; start = 0; rd_addr = '0;
    for (int k = 0; k < K; k++) begin sum[k] = 0; cnt[k] = 0; hist[k] = 0; end
    @(posedge rst_n);
    for (int i = 0; i < int'(NE); i++) begin
      int base, v, l;
      base = (int'($urandom % GROUPS) * 255) / int'(GROUPS > 1 ? GROUPS - 1 : 1);
      v = base + int'($urandom % 7) - 3;
      ev[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      l = int'($urandom % K);
      sum[l] += ev[i]; cnt[l]++;
      @(negedge clk); ld_e_we = 1; ld_addr = AW'(i); ld_e = DW'(ev[i]); ld_l = LW'(l);
    end
    @(negedge clk); ld_e_we = 0;
    for (int k = 0; k < K; k++) begin
      @(negedge clk); ld_c_we = 1; ld_k = LW'(k);
      ld_c = DW'((cnt[k] != 0) ? sum[k] / cnt[k] : int'($urandom % 256)); ld_n = CW'(cnt[k]);
    end
    @(negedge clk); ld_c_we = 0; n_elems = CW'(NE); start = 1;
    @(posedge clk); #1; start = 0; cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    passes = int'(iterations);
    checks++;
    if (!converged) begin failures++; $display("K-means K=%0d: no convergence in %0d passes", K, iterations); end
    checks++;
    if (cyc != passes * int'(NE + LV + 7)) begin
      failures++; $display("K-means K=%0d: %0d clocks, expected %0d", K, cyc, passes * int'(NE + LV + 7));
    end
    for (int i = 0; i < int'(NE); i++) begin
      int best; best = 0;
      rd_addr = AW'(i); #1;
      for (int k = 1; k < int'(K); k++) begin
        int db, dk;
        db = ev[i] > int'(centroids[best]) ? ev[i] - int'(centroids[best]) : int'(centroids[best]) - ev[i];
        dk = ev[i] > int'(centroids[k]) ? ev[i] - int'(centroids[k]) : int'(centroids[k]) - ev[i];
        if (dk < db) best = k;
      end
      checks++;
      if (int'(rd_label) != best) begin
        failures++;
        if (failures < 10) $display("K-means K=%0d: elem %0d (%0d) label %0d nearest %0d", K, i, ev[i], rd_label, best);
      end
      hist[rd_label]++;
    end
    tot = 0;
    for (int k = 0; k < int'(K); k++) begin
      checks++; tot += int'(counts[k]);
      if (int'(counts[k]) != hist[k]) begin failures++; $display("K-means K=%0d: count %0d got %0d exp %0d", K, k, counts[k], hist[k]); end
    end
    checks++; if (tot != int'(NE)) begin failures++; $display("K-means K=%0d: total %0d", K, tot); end
    checks++; if (moves == 0) begin failures++; $display("K-means K=%0d: no element moved", K); end
    $display("K-means K=%0d n=%0d: %0d passes, %0d clocks, %0d moves", K, NE, passes, cyc, moves);
    finished = 1;
  end
endmodule
