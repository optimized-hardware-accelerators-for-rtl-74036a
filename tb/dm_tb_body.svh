// dm_tb_body.svh -- shared body of the end-to-end testbenches of
// dm_accel_top. The including module defines the size localparams
// (KM_*, P1_*, P3_*, L1_*, L3_*, L5_*, SA_*, plus the workload sizes
// KM_NE, P1_N, L1_N, L3_K, L3_N, L5_K, SA_REQ_PARTIAL and WATCHDOG) and
// instantiates dm_accel_top as 'dut' on the signals declared here. Each
// engine is driven by its own task, all running in parallel; every result is
// compared with values computed here, latencies and cycle counts are checked,
// and each mechanism of the design is counted and must occur.

  localparam int KM_LW  = (KM_K > 1) ? $clog2(KM_K) : 1;
  localparam int KM_AW  = (KM_N_MAX > 1) ? $clog2(KM_N_MAX) : 1;
  localparam int KM_CW  = $clog2(KM_N_MAX + 1);
  localparam int KM_LV  = (KM_K > 1) ? $clog2(KM_K) : 1;
  localparam int P1_KW  = (P1_K > 1) ? $clog2(P1_K) : 1;
  localparam int P1_MW  = (P1_M > 1) ? $clog2(P1_M) : 1;
  localparam int P1_DW  = P1_W + P1_MW;
  localparam int P2_KW  = (P2_K > 1) ? $clog2(P2_K) : 1;
  localparam int P2_MW  = (P2_M > 1) ? $clog2(P2_M) : 1;
  localparam int P2_DW  = P2_W + P2_MW;
  localparam int P4_DW  = P4_W + ((P4_M > 1) ? $clog2(P4_M) : 1);
  localparam int P5_DW  = P5_W + ((P5_M > 1) ? $clog2(P5_M) : 1);
  localparam int P6_DW  = P6_W + ((P6_M > 1) ? $clog2(P6_M) : 1);
  localparam int L2_DW  = L2_W + ((L2_M > 1) ? $clog2(L2_M) : 1);
  localparam int L2_NW  = (L2_N > 1) ? $clog2(L2_N) : 1;
  localparam int L6_DW  = L6_W + ((L6_M > 1) ? $clog2(L6_M) : 1);
  localparam int L6_KW  = (L6_K > 1) ? $clog2(L6_K) : 1;
  localparam int P3_DW  = P3_W + ((P3_M > 1) ? $clog2(P3_M) : 1);
  localparam int L1_DW  = L1_W + ((L1_M > 1) ? $clog2(L1_M) : 1);
  localparam int L3_DW  = L3_W + ((L3_M > 1) ? $clog2(L3_M) : 1);
  localparam int L5_DW  = L5_W + ((L5_M > 1) ? $clog2(L5_M) : 1);
  localparam int SA_DW  = SA_W + ((SA_M > 1) ? $clog2(SA_M) : 1);
  localparam int SA_HK  = (SA_K - 1) / SA_WK + 1;
  localparam int SA_HN  = (SA_N - 1) / SA_WN + 1;
  localparam int SA_MW  = (SA_M > 1) ? $clog2(SA_M) : 1;
  localparam int SA_HKW = (SA_HK > 1) ? $clog2(SA_HK) : 1;
  localparam int SA_HNW = (SA_HN > 1) ? $clog2(SA_HN) : 1;

  logic clk = 0, rst_n = 0;
  // K-means
  logic km_ld_e_we = 0, km_ld_c_we = 0, km_start = 0;
  logic [KM_AW-1:0] km_ld_addr = '0, km_rd_addr = '0;
  logic [KM_DATA_W-1:0] km_ld_e = '0, km_ld_c = '0;
  logic [KM_LW-1:0] km_ld_l = '0, km_ld_k = '0, km_rd_label;
  logic [KM_CW-1:0] km_ld_n = '0, km_n_elems = '0;
  logic km_busy, km_done, km_converged; logic [15:0] km_iterations;
  logic [KM_K-1:0][KM_DATA_W-1:0] km_centroids; logic [KM_K-1:0][KM_CW-1:0] km_counts;
  // 2-D Design #1
  logic p1_y_we = 0, p1_x_valid = 0; logic [P1_KW-1:0] p1_y_k = '0; logic [P1_MW-1:0] p1_y_m = '0;
  logic [P1_W-1:0] p1_y_in = '0; logic [P1_M-1:0][P1_W-1:0] p1_x_col = '0;
  logic p1_d_valid; logic [P1_K-1:0][P1_DW-1:0] p1_d_col;
  // 2-D Design #3
  logic p3_in_valid = 0, p3_first = 0, p3_last = 0;
  logic [P3_N-1:0][P3_W-1:0] p3_x_row = '0; logic [P3_K-1:0][P3_W-1:0] p3_y_col = '0;
  logic p3_d_valid; logic [P3_K-1:0][P3_N-1:0][P3_DW-1:0] p3_d;
  // 2-D Design #2
  logic p2_y_we = 0, p2_x_valid = 0; logic [P2_KW-1:0] p2_y_k = '0; logic [P2_MW-1:0] p2_y_m = '0;
  logic [P2_W-1:0] p2_y_in = '0; logic [P2_M-1:0][P2_W-1:0] p2_x_col = '0;
  logic [P2_K-1:0] p2_d_valid; logic [P2_K-1:0][P2_DW-1:0] p2_d_col;
  // 2-D Design #4
  logic p4_in_valid = 0, p4_first = 0, p4_last = 0;
  logic [P4_N-1:0][P4_W-1:0] p4_x_row = '0; logic [P4_K-1:0][P4_W-1:0] p4_y_col = '0;
  logic [P4_K-1:0][P4_N-1:0] p4_dv; logic p4_d_valid; logic [P4_K-1:0][P4_N-1:0][P4_DW-1:0] p4_d;
  // 2-D Design #5
  logic p5_in_valid = 0, p5_first = 0, p5_last = 0;
  logic [P5_N-1:0][P5_W-1:0] p5_x_row = '0; logic [P5_K-1:0][P5_W-1:0] p5_y_col = '0;
  logic [P5_K-1:0][P5_N-1:0] p5_dv; logic p5_d_valid; logic [P5_K-1:0][P5_N-1:0][P5_DW-1:0] p5_d;
  // 2-D Design #6
  logic p6_in_valid = 0, p6_first = 0, p6_last = 0;
  logic [P6_N-1:0][P6_W-1:0] p6_x_row = '0; logic [P6_K-1:0][P6_W-1:0] p6_y_col = '0;
  logic [P6_K-1:0][P6_N-1:0] p6_dv; logic p6_d_valid; logic [P6_K-1:0][P6_N-1:0][P6_DW-1:0] p6_d;
  // linear #2, #6
  logic l2_in_valid = 0; logic [L2_W-1:0] l2_x = '0; logic [L2_K-1:0][L2_W-1:0] l2_y = '0;
  logic l2_d_valid; logic [L2_NW-1:0] l2_d_n; logic [L2_K-1:0][L2_DW-1:0] l2_d;
  logic l6_in_valid = 0; logic [L6_W-1:0] l6_y = '0; logic [L6_N-1:0][L6_W-1:0] l6_x = '0;
  logic l6_d_valid; logic [L6_KW-1:0] l6_d_k; logic [L6_N-1:0][L6_DW-1:0] l6_d;
  // linear #1, #3, #5
  logic l1_in_valid = 0; logic [L1_W-1:0] l1_x = '0; logic [L1_K-1:0][L1_W-1:0] l1_y = '0;
  logic l1_d_valid; logic [L1_K-1:0][L1_DW-1:0] l1_d;
  logic l3_in_valid = 0; logic [L3_M-1:0][L3_W-1:0] l3_x = '0, l3_y = '0;
  logic l3_d_valid; logic [L3_DW-1:0] l3_d;
  logic l5_in_valid = 0; logic [L5_W-1:0] l5_y = '0; logic [L5_N-1:0][L5_W-1:0] l5_x = '0;
  logic l5_d_valid; logic [L5_N-1:0][L5_DW-1:0] l5_d;
  // scalable array
  logic sa_start = 0, sa_busy, sa_done, sa_rd_en;
  logic [SA_MW-1:0] sa_rd_m; logic [SA_HKW-1:0] sa_rd_kt; logic [SA_HNW-1:0] sa_rd_nt;
  logic [SA_WN-1:0][SA_W-1:0] sa_x_in = '0; logic [SA_WK-1:0][SA_W-1:0] sa_y_in = '0;
  logic sa_tile_valid; logic [SA_HKW-1:0] sa_tile_kt; logic [SA_HNW-1:0] sa_tile_nt;
  logic [SA_WK-1:0][SA_WN-1:0][SA_DW-1:0] sa_tile_d;

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int ev_km_move = 0, ev_km_multi_pass = 0, ev_km_converge = 0, ev_km_empty_src = 0;
  int ev_p1_col = 0, ev_p3_mat = 0, ev_l1_vec = 0, ev_l3_dist = 0, ev_l5_vec = 0;
  int ev_sa_tile = 0, ev_sa_partial = 0;
  int ev_p2_row = 0, ev_p4_pe = 0, ev_p5_pe = 0, ev_p6_pe = 0, ev_l2_vec = 0, ev_l6_vec = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int adiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && dut.u_km.cu_v && dut.u_km.cu_changed) begin
    ev_km_move++;
    if (dut.u_km.cu_nsrc == '0) ev_km_empty_src++;
  end

  // ------------------------------------------------------------ K-means
  int km_e[], km_l[];
  task automatic run_km();
    int sum[KM_K], cnt[KM_K], c0, hist[KM_K], tot;
    km_e = new[KM_NE]; km_l = new[KM_NE];
    for (int k = 0; k < KM_K; k++) begin sum[k] = 0; cnt[k] = 0; hist[k] = 0; end
    for (int i = 0; i < KM_NE; i++) begin
      int v; v = (($urandom % 5) * 60) + int'($urandom % 31) - 15;
      km_e[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      km_l[i] = $urandom % KM_K;
      sum[km_l[i]] += km_e[i]; cnt[km_l[i]]++;
    end
    for (int i = 0; i < KM_NE; i++) begin
      @(negedge clk); km_ld_e_we = 1; km_ld_addr = KM_AW'(i); km_ld_e = KM_DATA_W'(km_e[i]); km_ld_l = KM_LW'(km_l[i]);
    end
    @(negedge clk); km_ld_e_we = 0;
    for (int k = 0; k < KM_K; k++) begin
      @(negedge clk); km_ld_c_we = 1; km_ld_k = KM_LW'(k);
      km_ld_c = KM_DATA_W'((cnt[k] != 0) ? sum[k] / cnt[k] : 128); km_ld_n = KM_CW'(cnt[k]);
    end
    @(negedge clk); km_ld_c_we = 0; km_n_elems = KM_CW'(KM_NE); km_start = 1;
    @(posedge clk); #1 km_start = 0; c0 = cyc;
    while (!km_done) begin @(posedge clk); #1; end
    check(km_converged, "K-means converged");
    if (km_converged) ev_km_converge++;
    if (km_iterations > 1) ev_km_multi_pass++;
    check(cyc - c0 == int'(km_iterations) * (KM_NE + KM_LV + 7), "K-means pass length n + log2K + 7");
    for (int i = 0; i < KM_NE; i++) begin
      int best; best = 0;
      km_rd_addr = KM_AW'(i); #1;
      for (int k = 1; k < KM_K; k++)
        if (adiff(km_e[i], int'(km_centroids[k])) < adiff(km_e[i], int'(km_centroids[best]))) best = k;
      check(int'(km_rd_label) == best, $sformatf("K-means label of element %0d", i));
      hist[km_rd_label]++;
    end
    tot = 0;
    for (int k = 0; k < KM_K; k++) begin
      check(int'(km_counts[k]) == hist[k], $sformatf("K-means count %0d", k));
      tot += int'(km_counts[k]);
    end
    check(tot == KM_NE, "K-means total population");
    $display("K-means: %0d elements, %0d passes, centroids %p", KM_NE, km_iterations, km_centroids);
  endtask

  // ------------------------------------------------------------ 2-D Design #1
  task automatic run_p1();
    int X[][], Y[P1_K][P1_M], n_out, t_in0, t_out0;
    X = new[P1_N]; foreach (X[n]) X[n] = new[P1_M];
    for (int n = 0; n < P1_N; n++) for (int m = 0; m < P1_M; m++) X[n][m] = $urandom % (1 << P1_W);
    for (int k = 0; k < P1_K; k++) for (int m = 0; m < P1_M; m++) begin
      Y[k][m] = $urandom % (1 << P1_W);
      @(negedge clk); p1_y_we = 1; p1_y_k = P1_KW'(k); p1_y_m = P1_MW'(m); p1_y_in = P1_W'(Y[k][m]);
    end
    @(negedge clk); p1_y_we = 0;
    n_out = 0; t_out0 = -1; t_in0 = -1;
    fork
      begin
        for (int n = 0; n < P1_N; n++) begin
          @(negedge clk); p1_x_valid = 1;
          for (int m = 0; m < P1_M; m++) p1_x_col[m] = P1_W'(X[n][m]);
          if (n == 0) t_in0 = cyc + 1;
        end
        @(negedge clk); p1_x_valid = 0;
      end
      begin
        while (n_out < P1_N) begin
          @(posedge clk); #1;
          if (p1_d_valid) begin
            if (t_out0 < 0) t_out0 = cyc;
            for (int k = 0; k < P1_K; k++) begin
              int exp; exp = 0;
              for (int m = 0; m < P1_M; m++) exp += adiff(X[n_out][m], Y[k][m]);
              check(int'(p1_d_col[k]) == exp, $sformatf("2-D #1 D(%0d,%0d)", k, n_out));
            end
            n_out++; ev_p1_col++;
          end
        end
      end
    join
    check(t_out0 - t_in0 == P1_M - 1, "2-D #1 first column at time M-1");
    check(cyc - t_in0 + 1 == P1_N + P1_M - 1, "2-D #1 N + M - 1 clocks for N columns");
  endtask

  // ------------------------------------------------------------ 2-D Design #3
  task automatic run_p3();
    int X[][], Y[][];
    X = new[P3_M]; foreach (X[m]) X[m] = new[P3_N];
    Y = new[P3_M]; foreach (Y[m]) Y[m] = new[P3_K];
    for (int m = 0; m < P3_M; m++) begin
      for (int n = 0; n < P3_N; n++) X[m][n] = $urandom % (1 << P3_W);
      for (int k = 0; k < P3_K; k++) Y[m][k] = $urandom % (1 << P3_W);
    end
    for (int m = 0; m < P3_M; m++) begin
      @(negedge clk); p3_in_valid = 1; p3_first = (m == 0); p3_last = (m == P3_M - 1);
      for (int n = 0; n < P3_N; n++) p3_x_row[n] = P3_W'(X[m][n]);
      for (int k = 0; k < P3_K; k++) p3_y_col[k] = P3_W'(Y[m][k]);
    end
    @(posedge clk); #1;
    check(p3_d_valid, "2-D #3 matrix ready after M steps");
    for (int k = 0; k < P3_K; k++) for (int n = 0; n < P3_N; n++) begin
      int exp; exp = 0;
      for (int m = 0; m < P3_M; m++) exp += adiff(X[m][n], Y[m][k]);
      check(int'(p3_d[k][n]) == exp, $sformatf("2-D #3 D(%0d,%0d)", k, n));
    end
    ev_p3_mat++;
    @(negedge clk); p3_in_valid = 0; p3_first = 0; p3_last = 0;
  endtask

  // ------------------------------------------------------------ 2-D Design #2
  task automatic run_p2();
    int X[][], Y[P2_K][P2_M], n_out[P2_K], t_in[], t_last;
    bit all_done;
    X = new[P2_N]; foreach (X[n]) X[n] = new[P2_M];
    t_in = new[P2_N];
    for (int n = 0; n < P2_N; n++) for (int m = 0; m < P2_M; m++) X[n][m] = $urandom % (1 << P2_W);
    for (int k = 0; k < P2_K; k++) begin
      n_out[k] = 0;
      for (int m = 0; m < P2_M; m++) begin
        Y[k][m] = $urandom % (1 << P2_W);
        @(negedge clk); p2_y_we = 1; p2_y_k = P2_KW'(k); p2_y_m = P2_MW'(m); p2_y_in = P2_W'(Y[k][m]);
      end
    end
    @(negedge clk); p2_y_we = 0;
    t_last = 0;
    fork
      begin
        for (int n = 0; n < P2_N; n++) begin
          @(negedge clk); p2_x_valid = 1;
          for (int m = 0; m < P2_M; m++) p2_x_col[m] = P2_W'(X[n][m]);
          @(posedge clk); #1 t_in[n] = cyc;
        end
        @(negedge clk); p2_x_valid = 0;
      end
      begin
        all_done = 0;
        while (!all_done) begin
          @(posedge clk); #2;
          for (int k = 0; k < P2_K; k++) if (p2_d_valid[k]) begin
            int exp, n; n = n_out[k]; exp = 0;
            for (int m = 0; m < P2_M; m++) exp += adiff(X[n][m], Y[k][m]);
            check(int'(p2_d_col[k]) == exp, $sformatf("2-D #2 D(%0d,%0d)", k, n));
            check(cyc == t_in[n] + P2_M - 1 + k, "2-D #2 D(k,n) at time k + n + M - 1");
            n_out[k]++; ev_p2_row++; t_last = cyc;
          end
          all_done = 1;
          for (int k = 0; k < P2_K; k++) if (n_out[k] < P2_N) all_done = 0;
        end
      end
    join
    check(t_last - t_in[0] + 1 == P2_K + P2_M + P2_N - 2, "2-D #2 K + M + N - 2 clocks");
  endtask

  // ------------------------------------------------------------ 2-D Design #4
  task automatic run_p4();
    int X[][], Y[][], got, t_last, t_end, nvalid;
    X = new[P4_M]; foreach (X[m]) X[m] = new[P4_N];
    Y = new[P4_M]; foreach (Y[m]) Y[m] = new[P4_K];
    for (int m = 0; m < P4_M; m++) begin
      for (int n = 0; n < P4_N; n++) X[m][n] = $urandom % (1 << P4_W);
      for (int k = 0; k < P4_K; k++) Y[m][k] = $urandom % (1 << P4_W);
    end
    got = 0; nvalid = 0; t_end = 0;
    for (int m = 0; m < P4_M; m++) begin
      @(negedge clk); p4_in_valid = 1; p4_first = (m == 0); p4_last = (m == P4_M - 1);
      for (int n = 0; n < P4_N; n++) p4_x_row[n] = P4_W'(X[m][n]);
      for (int k = 0; k < P4_K; k++) p4_y_col[k] = P4_W'(Y[m][k]);
      @(posedge clk); #1;
    end
    t_last = cyc;
    fork
      begin @(negedge clk); p4_in_valid = 0; p4_first = 0; p4_last = 0; end
    join_none
    // the PEs finishing with the last step are seen right away
    while (got < P4_K * P4_N) begin
      #1;
      if (p4_d_valid) nvalid++;
      for (int k = 0; k < P4_K; k++) for (int n = 0; n < P4_N; n++) if (p4_dv[k][n]) begin
        int exp; exp = 0;
        for (int m = 0; m < P4_M; m++) exp += adiff(X[m][n], Y[m][k]);
        check(int'(p4_d[k][n]) == exp, $sformatf("2-D #4 D(%0d,%0d)", k, n));
        check(cyc == t_last + (n), "2-D #4 PE(k,n) finishing time");
        got++; ev_p4_pe++; t_end = cyc;
      end
      if (got < P4_K * P4_N) @(posedge clk);
    end
    check(nvalid == 1, "2-D #4 d_valid once per matrix");
  endtask

  // ------------------------------------------------------------ 2-D Design #5
  task automatic run_p5();
    int X[][], Y[][], got, t_last, t_end, nvalid;
    X = new[P5_M]; foreach (X[m]) X[m] = new[P5_N];
    Y = new[P5_M]; foreach (Y[m]) Y[m] = new[P5_K];
    for (int m = 0; m < P5_M; m++) begin
      for (int n = 0; n < P5_N; n++) X[m][n] = $urandom % (1 << P5_W);
      for (int k = 0; k < P5_K; k++) Y[m][k] = $urandom % (1 << P5_W);
    end
    got = 0; nvalid = 0; t_end = 0;
    for (int m = 0; m < P5_M; m++) begin
      @(negedge clk); p5_in_valid = 1; p5_first = (m == 0); p5_last = (m == P5_M - 1);
      for (int n = 0; n < P5_N; n++) p5_x_row[n] = P5_W'(X[m][n]);
      for (int k = 0; k < P5_K; k++) p5_y_col[k] = P5_W'(Y[m][k]);
      @(posedge clk); #1;
    end
    t_last = cyc;
    fork
      begin @(negedge clk); p5_in_valid = 0; p5_first = 0; p5_last = 0; end
    join_none
    // the PEs finishing with the last step are seen right away
    while (got < P5_K * P5_N) begin
      #1;
      if (p5_d_valid) nvalid++;
      for (int k = 0; k < P5_K; k++) for (int n = 0; n < P5_N; n++) if (p5_dv[k][n]) begin
        int exp; exp = 0;
        for (int m = 0; m < P5_M; m++) exp += adiff(X[m][n], Y[m][k]);
        check(int'(p5_d[k][n]) == exp, $sformatf("2-D #5 D(%0d,%0d)", k, n));
        check(cyc == t_last + (k), "2-D #5 PE(k,n) finishing time");
        got++; ev_p5_pe++; t_end = cyc;
      end
      if (got < P5_K * P5_N) @(posedge clk);
    end
    check(nvalid == 1, "2-D #5 d_valid once per matrix");
  endtask

  // ------------------------------------------------------------ 2-D Design #6
  task automatic run_p6();
    int X[][], Y[][], got, t_last, t_end, nvalid;
    X = new[P6_M]; foreach (X[m]) X[m] = new[P6_N];
    Y = new[P6_M]; foreach (Y[m]) Y[m] = new[P6_K];
    for (int m = 0; m < P6_M; m++) begin
      for (int n = 0; n < P6_N; n++) X[m][n] = $urandom % (1 << P6_W);
      for (int k = 0; k < P6_K; k++) Y[m][k] = $urandom % (1 << P6_W);
    end
    got = 0; nvalid = 0; t_end = 0;
    for (int m = 0; m < P6_M; m++) begin
      @(negedge clk); p6_in_valid = 1; p6_first = (m == 0); p6_last = (m == P6_M - 1);
      for (int n = 0; n < P6_N; n++) p6_x_row[n] = P6_W'(X[m][n]);
      for (int k = 0; k < P6_K; k++) p6_y_col[k] = P6_W'(Y[m][k]);
      @(posedge clk); #1;
    end
    t_last = cyc;
    fork
      begin @(negedge clk); p6_in_valid = 0; p6_first = 0; p6_last = 0; end
    join_none
    // the PEs finishing with the last step are seen right away
    while (got < P6_K * P6_N) begin
      #1;
      if (p6_d_valid) nvalid++;
      for (int k = 0; k < P6_K; k++) for (int n = 0; n < P6_N; n++) if (p6_dv[k][n]) begin
        int exp; exp = 0;
        for (int m = 0; m < P6_M; m++) exp += adiff(X[m][n], Y[m][k]);
        check(int'(p6_d[k][n]) == exp, $sformatf("2-D #6 D(%0d,%0d)", k, n));
        check(cyc == t_last + (k + n), "2-D #6 PE(k,n) finishing time");
        got++; ev_p6_pe++; t_end = cyc;
      end
      if (got < P6_K * P6_N) @(posedge clk);
    end
    check(nvalid == 1, "2-D #6 d_valid once per matrix");
  endtask

  // ------------------------------------------------------------ linear #2
  task automatic run_l2();
    int X[][], Y[L2_K][L2_M], nres, t0;
    X = new[L2_M]; foreach (X[m]) X[m] = new[L2_N];
    for (int m = 0; m < L2_M; m++) for (int n = 0; n < L2_N; n++) X[m][n] = $urandom % (1 << L2_W);
    for (int k = 0; k < L2_K; k++) for (int m = 0; m < L2_M; m++) Y[k][m] = $urandom % (1 << L2_W);
    nres = 0;
    @(posedge clk); #1 t0 = cyc;
    fork
      begin
        for (int m = 0; m < L2_M; m++) for (int n = 0; n < L2_N; n++) begin
          @(negedge clk); l2_in_valid = 1; l2_x = L2_W'(X[m][n]);
          for (int k = 0; k < L2_K; k++) l2_y[k] = L2_W'(Y[k][m]);
        end
        @(negedge clk); l2_in_valid = 0;
      end
      begin
        while (nres < L2_N) begin
          @(posedge clk); #1;
          if (l2_d_valid) begin
            check(int'(l2_d_n) == nres, "linear #2 sample tag");
            for (int k = 0; k < L2_K; k++) begin
              int exp; exp = 0;
              for (int m = 0; m < L2_M; m++) exp += adiff(X[m][nres], Y[k][m]);
              check(int'(l2_d[k]) == exp, $sformatf("linear #2 D(%0d,%0d)", k, nres));
            end
            nres++; ev_l2_vec++;
          end
        end
      end
    join
    check(cyc - t0 == L2_M * L2_N, "linear #2 takes M*N clocks");
  endtask

  // ------------------------------------------------------------ linear #6
  task automatic run_l6();
    int X[][], Y[][], nres, t0;
    X = new[L6_M]; foreach (X[m]) X[m] = new[L6_N];
    Y = new[L6_K]; foreach (Y[k]) Y[k] = new[L6_M];
    for (int m = 0; m < L6_M; m++) for (int n = 0; n < L6_N; n++) X[m][n] = $urandom % (1 << L6_W);
    for (int k = 0; k < L6_K; k++) for (int m = 0; m < L6_M; m++) Y[k][m] = $urandom % (1 << L6_W);
    nres = 0;
    @(posedge clk); #1 t0 = cyc;
    fork
      begin
        for (int m = 0; m < L6_M; m++) for (int k = 0; k < L6_K; k++) begin
          @(negedge clk); l6_in_valid = 1; l6_y = L6_W'(Y[k][m]);
          for (int n = 0; n < L6_N; n++) l6_x[n] = L6_W'(X[m][n]);
        end
        @(negedge clk); l6_in_valid = 0;
      end
      begin
        while (nres < L6_K) begin
          @(posedge clk); #1;
          if (l6_d_valid) begin
            check(int'(l6_d_k) == nres, "linear #6 reference tag");
            for (int n = 0; n < L6_N; n++) begin
              int exp; exp = 0;
              for (int m = 0; m < L6_M; m++) exp += adiff(X[m][n], Y[nres][m]);
              check(int'(l6_d[n]) == exp, $sformatf("linear #6 D(%0d,%0d)", nres, n));
            end
            nres++; ev_l6_vec++;
          end
        end
      end
    join
    check(cyc - t0 == L6_K * L6_M, "linear #6 takes K*M clocks");
  endtask

  // ------------------------------------------------------------ linear #1
  task automatic run_l1();
    int X[][], Y[L1_K][L1_M], n_out, t0;
    X = new[L1_N]; foreach (X[n]) X[n] = new[L1_M];
    for (int n = 0; n < L1_N; n++) for (int m = 0; m < L1_M; m++) X[n][m] = $urandom % (1 << L1_W);
    for (int k = 0; k < L1_K; k++) for (int m = 0; m < L1_M; m++) Y[k][m] = $urandom % (1 << L1_W);
    n_out = 0;
    @(posedge clk); #1 t0 = cyc;
    fork
      begin
        for (int n = 0; n < L1_N; n++) for (int m = 0; m < L1_M; m++) begin
          @(negedge clk); l1_in_valid = 1; l1_x = L1_W'(X[n][m]);
          for (int k = 0; k < L1_K; k++) l1_y[k] = L1_W'(Y[k][m]);
        end
        @(negedge clk); l1_in_valid = 0;
      end
      begin
        while (n_out < L1_N) begin
          @(posedge clk); #1;
          if (l1_d_valid) begin
            for (int k = 0; k < L1_K; k++) begin
              int exp; exp = 0;
              for (int m = 0; m < L1_M; m++) exp += adiff(X[n_out][m], Y[k][m]);
              check(int'(l1_d[k]) == exp, $sformatf("linear #1 D(%0d,%0d)", k, n_out));
            end
            n_out++; ev_l1_vec++;
          end
        end
      end
    join
    check(cyc - t0 == L1_M * L1_N, "linear #1 takes M*N clocks");
  endtask

  // ------------------------------------------------------------ linear #3
  task automatic run_l3();
    int X[L3_M], Y[L3_K][L3_M];
    for (int k = 0; k < L3_K; k++) for (int m = 0; m < L3_M; m++) Y[k][m] = $urandom % (1 << L3_W);
    for (int n = 0; n < L3_N; n++) begin
      for (int m = 0; m < L3_M; m++) X[m] = $urandom % (1 << L3_W);
      for (int k = 0; k < L3_K; k++) begin
        int exp; exp = 0;
        @(negedge clk); l3_in_valid = 1;
        for (int m = 0; m < L3_M; m++) begin
          l3_x[m] = L3_W'(X[m]); l3_y[m] = L3_W'(Y[k][m]); exp += adiff(X[m], Y[k][m]);
        end
        @(posedge clk); #1;
        check(l3_d_valid && int'(l3_d) == exp, $sformatf("linear #3 D(%0d,%0d) one per clock", k, n));
        ev_l3_dist++;
      end
    end
    @(negedge clk); l3_in_valid = 0;
  endtask

  // ------------------------------------------------------------ linear #5
  task automatic run_l5();
    int X[][], Y[][], k_out, t0;
    X = new[L5_M]; foreach (X[m]) X[m] = new[L5_N];
    Y = new[L5_K]; foreach (Y[k]) Y[k] = new[L5_M];
    for (int m = 0; m < L5_M; m++) for (int n = 0; n < L5_N; n++) X[m][n] = $urandom % (1 << L5_W);
    for (int k = 0; k < L5_K; k++) for (int m = 0; m < L5_M; m++) Y[k][m] = $urandom % (1 << L5_W);
    k_out = 0;
    @(posedge clk); #1 t0 = cyc;
    fork
      begin
        for (int k = 0; k < L5_K; k++) for (int m = 0; m < L5_M; m++) begin
          @(negedge clk); l5_in_valid = 1; l5_y = L5_W'(Y[k][m]);
          for (int n = 0; n < L5_N; n++) l5_x[n] = L5_W'(X[m][n]);
        end
        @(negedge clk); l5_in_valid = 0;
      end
      begin
        while (k_out < L5_K) begin
          @(posedge clk); #1;
          if (l5_d_valid) begin
            for (int n = 0; n < L5_N; n++) begin
              int exp; exp = 0;
              for (int m = 0; m < L5_M; m++) exp += adiff(X[m][n], Y[k_out][m]);
              check(int'(l5_d[n]) == exp, $sformatf("linear #5 D(%0d,%0d)", k_out, n));
            end
            k_out++; ev_l5_vec++;
          end
        end
      end
    join
    check(cyc - t0 == L5_K * L5_M, "linear #5 takes K*M clocks");
  endtask

  // ------------------------------------------------------------ scalable array
  int sa_X[][], sa_Y[][];
  always @(posedge clk) begin
    if (sa_rd_en) begin
      for (int j = 0; j < SA_WN; j++) begin
        int n; n = int'(sa_rd_nt) * SA_WN + j;
        sa_x_in[j] <= (n < SA_N) ? SA_W'(sa_X[sa_rd_m][n]) : '1;
      end
      for (int i = 0; i < SA_WK; i++) begin
        int k; k = int'(sa_rd_kt) * SA_WK + i;
        sa_y_in[i] <= (k < SA_K) ? SA_W'(sa_Y[k][sa_rd_m]) : '1;
      end
    end
  end

  task automatic run_sa();
    int t0, t_prev, tiles, ndist;
    sa_X = new[SA_M]; foreach (sa_X[m]) sa_X[m] = new[SA_N];
    sa_Y = new[SA_K]; foreach (sa_Y[k]) sa_Y[k] = new[SA_M];
    for (int m = 0; m < SA_M; m++) for (int n = 0; n < SA_N; n++) sa_X[m][n] = $urandom % (1 << SA_W);
    for (int k = 0; k < SA_K; k++) for (int m = 0; m < SA_M; m++) sa_Y[k][m] = $urandom % (1 << SA_W);
    @(negedge clk); sa_start = 1;
    @(posedge clk); #1 t0 = cyc; sa_start = 0;
    t_prev = -1; tiles = 0; ndist = 0;
    forever begin
      @(posedge clk); #1;
      if (sa_tile_valid) begin
        bit partial; partial = 0;
        if (t_prev >= 0) check(cyc - t_prev == SA_M, "scalable array: one tile every M clocks");
        t_prev = cyc; tiles++; ev_sa_tile++;
        for (int i = 0; i < SA_WK; i++) for (int j = 0; j < SA_WN; j++) begin
          int k, n, exp;
          k = int'(sa_tile_kt) * SA_WK + i; n = int'(sa_tile_nt) * SA_WN + j;
          if (k < SA_K && n < SA_N) begin
            exp = 0;
            for (int m = 0; m < SA_M; m++) exp += adiff(sa_X[m][n], sa_Y[k][m]);
            check(int'(sa_tile_d[i][j]) == exp, $sformatf("scalable D(%0d,%0d)", k, n));
            ndist++;
          end else partial = 1;
        end
        if (partial) ev_sa_partial++;
      end
      if (sa_done) break;
    end
    check(cyc - t0 == SA_HK * SA_HN * SA_M + 1, "scalable array: ceil(K/wk)*ceil(N/wn)*M steps");
    check(tiles == SA_HK * SA_HN && ndist == SA_K * SA_N, "scalable array: every distance produced");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_km();
      run_p1();
      run_p2();
      run_p3();
      run_p4();
      run_p5();
      run_p6();
      run_l2();
      run_l6();
      run_l1();
      run_l3();
      run_l5();
      run_sa();
    join
    $display("mechanisms: km moves=%0d multi-pass=%0d converged=%0d emptied-src=%0d p1 cols=%0d p3 mats=%0d l1 vecs=%0d l3 dists=%0d l5 vecs=%0d sa tiles=%0d partial=%0d",
             ev_km_move, ev_km_multi_pass, ev_km_converge, ev_km_empty_src, ev_p1_col, ev_p3_mat, ev_l1_vec, ev_l3_dist, ev_l5_vec, ev_sa_tile, ev_sa_partial);
    check(ev_km_move > 0, "mechanism: continuous centroid update (element moves)");
    check(ev_km_multi_pass > 0, "mechanism: repeated passes");
    check(ev_km_converge > 0, "mechanism: convergence detection");
    check(ev_km_empty_src > 0, "mechanism: move that empties its source cluster");
    check(ev_p1_col > 0, "mechanism: skewed X / pipelined D (2-D #1)");
    check(ev_p3_mat > 0, "mechanism: broadcast X and Y (2-D #3)");
    check(ev_l1_vec > 0, "mechanism: linear #1 feature-serial accumulation");
    check(ev_l3_dist > 0, "mechanism: adder tree (linear #3)");
    check(ev_l5_vec > 0, "mechanism: linear #5 broadcast Y");
    $display("mechanisms: p2 rows=%0d p4 PEs=%0d p5 PEs=%0d p6 PEs=%0d l2 vecs=%0d l6 vecs=%0d", ev_p2_row, ev_p4_pe, ev_p5_pe, ev_p6_pe, ev_l2_vec, ev_l6_vec);
    check(ev_p2_row > 0, "mechanism: X pipelined along k (2-D #2)");
    check(ev_p4_pe > 0, "mechanism: Y pipelined along n (2-D #4)");
    check(ev_p5_pe > 0, "mechanism: X pipelined along k, skewed Y (2-D #5)");
    check(ev_p6_pe > 0, "mechanism: both inputs pipelined (2-D #6)");
    check(ev_l2_vec > 0, "mechanism: N partial sums per PE (linear #2)");
    check(ev_l6_vec > 0, "mechanism: K partial sums per PE (linear #6)");
    check(ev_sa_tile > 1, "mechanism: tile scheduling (scalable array)");
    if (SA_REQ_PARTIAL) check(ev_sa_partial > 0, "mechanism: partial edge tile");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
