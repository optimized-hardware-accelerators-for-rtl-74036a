// tb_km_min_dist -- self-checking test of the pipelined compare tree.
// Feeds a new random distance vector every clock (small value range so ties
// are frequent) and checks, ceil(log2 K) = 3 cycles later, that the index is
// the first minimum and that e and src came through unchanged. Also checks
// the latency against the number of tree levels.
module tb_km_min_dist;
  localparam int K = 8, DW = 8, LAT = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid; logic [K-1:0][DW-1:0] dists; logic [DW-1:0] e; logic [2:0] src;
  logic out_valid; logic [2:0] dest; logic [DW-1:0] out_e; logic [2:0] out_src;
  int checks = 0, failures = 0;

  km_min_dist #(.K(K), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int exp_dest[$], exp_e[$], exp_src[$], exp_t[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 0; dists = '0; e = 0; src = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    fork
      begin
        for (int t = 0; t < 400; t++) begin
          @(negedge clk);
          in_valid = ($urandom % 5) != 0;
          for (int j = 0; j < K; j++) dists[j] = DW'($urandom % 6);
          e = DW'($urandom); src = 3'($urandom);
          if (in_valid) begin
            int best; best = 0;
            for (int j = 1; j < K; j++) if (dists[j] < dists[best]) best = j;
            exp_dest.push_back(best); exp_e.push_back(int'(e)); exp_src.push_back(int'(src));
            exp_t.push_back(cyc + LAT);
          end
        end
        @(negedge clk) in_valid = 0;
      end
      begin
        forever begin
          @(posedge clk); #1;
          if (out_valid) begin
            checks++;
            if (exp_dest.size() == 0) begin failures++; $display("unexpected output"); end
            else begin
              int d, ee, s, tt; d = exp_dest.pop_front(); ee = exp_e.pop_front(); s = exp_src.pop_front(); tt = exp_t.pop_front();
              if (int'(dest) != d || int'(out_e) != ee || int'(out_src) != s) begin
                failures++; $display("mismatch got %0d exp %0d", dest, d);
              end
              checks++;
              if (cyc != tt) begin failures++; $display("latency: out at %0d exp %0d", cyc, tt); end
            end
          end
        end
      end
    join_any
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_dest.size() != 0) begin failures++; $display("missing outputs %0d", exp_dest.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
