// tb_km_count_unit -- self-checking test of the cluster counters.
// Loads initial counts, then streams random (src, dest) pairs, about half
// of them moves, and compares n_src, n_dest, changed and all counters one
// cycle later with a reference model kept here.
module tb_km_count_unit;
  localparam int K = 8, CW = 19;
  logic clk = 0, rst_n = 0;
  logic in_valid; logic [2:0] src, dest; logic ld_we; logic [2:0] ld_k; logic [CW-1:0] ld_n;
  logic out_valid, changed; logic [CW-1:0] n_src, n_dest; logic [K-1:0][CW-1:0] counts;
  int checks = 0, failures = 0;
  int model[K];

  km_count_unit #(.K(K), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; src = 0; dest = 0; ld_we = 0; ld_k = 0; ld_n = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < K; k++) begin
      @(negedge clk); ld_we = 1; ld_k = 3'(k); ld_n = CW'(100 + k); model[k] = 100 + k;
    end
    @(negedge clk); ld_we = 0;
    for (int t = 0; t < 600; t++) begin
      int es, ed; bit mv, v;
      @(negedge clk);
      v = ($urandom % 4) != 0;
      in_valid = v; src = 3'($urandom); dest = ($urandom % 2) ? src : 3'($urandom);
      mv = v && (src != dest);
      if (mv) begin model[src]--; model[dest]++; end
      es = model[src]; ed = model[dest];
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v || changed !== mv) begin failures++; $display("flag mismatch t=%0d", t); end
      if (v) begin
        checks++;
        if (int'(n_src) != es || int'(n_dest) != ed) begin
          failures++; $display("count out mismatch t=%0d got %0d/%0d exp %0d/%0d", t, n_src, n_dest, es, ed);
        end
      end
      for (int k = 0; k < K; k++) begin
        checks++;
        if (int'(counts[k]) != model[k]) begin failures++; $display("counter %0d got %0d exp %0d", k, counts[k], model[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
