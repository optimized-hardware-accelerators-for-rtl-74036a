// tb_km_centroid_update -- self-checking test of the shift-based centroid
// update. Each request moves an element between two random clusters with
// random counts; the expected centroids use the recursive update with the
// division by the nearest power of two (found here by direct search, ties
// upward) done as a floor division. Requests are isolated (spaced so no two
// are in flight) and the result must appear exactly three cycles after the
// request. A burst of back-to-back requests to distinct clusters checks full
// throughput.
module tb_km_centroid_update;
  localparam int K = 8, DW = 8, CW = 19;
  logic clk = 0, rst_n = 0;
  logic in_valid; logic [DW-1:0] e; logic [2:0] src, dest; logic [CW-1:0] n_src, n_dest;
  logic ld_we; logic [2:0] ld_k; logic [DW-1:0] ld_c; logic [K-1:0][DW-1:0] centroids;
  int checks = 0, failures = 0;
  int model[K];

  km_centroid_update #(.K(K), .DATA_W(DW), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int near_exp(int n);
    int best = 0; longint bd = 64'h7fffffff;
    for (int p = 0; p < 31; p++) begin
      longint d = (longint'(n) > (longint'(1) << p)) ? longint'(n) - (longint'(1) << p) : (longint'(1) << p) - longint'(n);
      if (d <= bd) begin bd = d; best = p; end
    end
    return best;
  endfunction

  function automatic int floor_shift(int v, int x);
    int q = 1 << x;
    if (x >= 30) return (v < 0) ? -1 : 0;
    if (v >= 0) return v / q;
    return -((-v + q - 1) / q);
  endfunction

  function automatic int sat(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic request(int s, int d, int ev, int ns, int nd);
    @(negedge clk);
    in_valid = 1; src = 3'(s); dest = 3'(d); e = DW'(ev); n_src = CW'(ns); n_dest = CW'(nd);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; e = 0; src = 0; dest = 0; n_src = 0; n_dest = 0; ld_we = 0; ld_k = 0; ld_c = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < K; k++) begin
      @(negedge clk); ld_we = 1; ld_k = 3'(k); ld_c = DW'(30 * k + 5); model[k] = 30 * k + 5;
    end
    @(negedge clk); ld_we = 0;
    // rounding spot checks in the interval rule
    checks++; if (near_exp(3) != 2 || near_exp(5) != 2 || near_exp(6) != 3 || near_exp(1) != 0) begin failures++; $display("model rounding"); end
    for (int t = 0; t < 300; t++) begin
      int s, d, ev, ns, nd;
      s = $urandom % K; d = (s + 1 + $urandom % (K - 1)) % K; ev = $urandom % 256;
      case ($urandom % 4)
        0: ns = $urandom % 8;
        1: ns = $urandom % 100;
        2: ns = $urandom % 5000;
        default: ns = 0;
      endcase
      nd = 1 + $urandom % 3000;
      // start the request; results expected 3 clocks after it is sampled
      @(negedge clk);
      in_valid = 1; src = 3'(s); dest = 3'(d); e = DW'(ev); n_src = CW'(ns); n_dest = CW'(nd);
      begin
        int ms, md;
        ms = (ns == 0) ? model[s] : sat(model[s] + floor_shift(model[s] - ev, near_exp(ns)));
        md = sat(model[d] + floor_shift(ev - model[d], near_exp(nd)));
        @(posedge clk); #1; in_valid = 0;
        @(posedge clk); #1;
        checks++;
        if (int'(centroids[s]) != model[s] || int'(centroids[d]) != model[d]) begin
          failures++; $display("updated too early t=%0d", t);
        end
        @(posedge clk); #1;
        model[s] = ms; model[d] = md;
        for (int k = 0; k < K; k++) begin
          checks++;
          if (int'(centroids[k]) != model[k]) begin
            failures++; $display("t=%0d c[%0d] got %0d exp %0d (s=%0d d=%0d e=%0d ns=%0d nd=%0d)", t, k, centroids[k], model[k], s, d, ev, ns, nd);
          end
        end
      end
    end
    // back-to-back requests on disjoint pairs: (0->1), (2->3), (4->5), (6->7)
    begin
      int exp_c[K];
      for (int k = 0; k < K; k++) exp_c[k] = model[k];
      for (int p = 0; p < 4; p++) begin
        exp_c[2*p]   = sat(model[2*p] + floor_shift(model[2*p] - 100, near_exp(10)));
        exp_c[2*p+1] = sat(model[2*p+1] + floor_shift(100 - model[2*p+1], near_exp(20)));
      end
      for (int p = 0; p < 4; p++) begin
        @(negedge clk);
        in_valid = 1; src = 3'(2*p); dest = 3'(2*p+1); e = 8'd100; n_src = 19'd10; n_dest = 19'd20;
      end
      @(negedge clk); in_valid = 0;
      repeat (4) @(posedge clk); #1;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (int'(centroids[k]) != exp_c[k]) begin failures++; $display("burst c[%0d] got %0d exp %0d", k, centroids[k], exp_c[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
