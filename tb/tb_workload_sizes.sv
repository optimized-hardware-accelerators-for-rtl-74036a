// tb_workload_sizes -- runs the workloads whose sizes differ from the top
// level's defaults, each at its full size, side by side:
//   * the K-means engine on a 0.4-megapixel-sized 1-D set (400,000 8-bit
//     elements in noisy groups) with K = 8, 16, 32 and 64 clusters, run to
//     convergence;
//   * the scalable array on a letter-recognition-sized set (K = 26 classes,
//     M = 16 features of 4 bits, N = 20,000 samples) with wk = 13 and
//     wn = 4, 8 and 16, and with K = 8, 16 and 32 at wk = K/2, wn = 2;
//   * linear Design #1 on a Bridge-sized set (N = 4,096 samples of M = 16
//     8-bit features) with K = 32 and K = 64 PEs.
// Each configuration runs in its own harness (km_workload_run,
// sa_workload_run, lin1_workload_run), which checks every result and the
// exact clock count of the whole run. The data are random, not the real data sets.
// This bench adds up the counts and fails if any harness does not finish
// before the watchdog.
module tb_workload_sizes;
  localparam int NSA = 6, NL = 2, NKM = 4;
  logic [NKM-1:0] km_fin; int km_chk[NKM], km_fail[NKM], km_pass[NKM], km_mv[NKM];
  logic clk = 0, rst_n = 0;
  logic [NSA-1:0] sa_fin; int sa_chk[NSA], sa_fail[NSA];
  logic [NL-1:0]  l_fin;  int l_chk[NL],  l_fail[NL];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  km_workload_run #(.K(8),  .NE(400000), .GROUPS(8))  u_km_k8
    (.clk, .rst_n, .finished(km_fin[0]), .checks(km_chk[0]), .failures(km_fail[0]), .passes(km_pass[0]), .moves(km_mv[0]));
  km_workload_run #(.K(16), .NE(400000), .GROUPS(16)) u_km_k16
    (.clk, .rst_n, .finished(km_fin[1]), .checks(km_chk[1]), .failures(km_fail[1]), .passes(km_pass[1]), .moves(km_mv[1]));
  km_workload_run #(.K(32), .NE(400000), .GROUPS(32)) u_km_k32
    (.clk, .rst_n, .finished(km_fin[2]), .checks(km_chk[2]), .failures(km_fail[2]), .passes(km_pass[2]), .moves(km_mv[2]));
  km_workload_run #(.K(64), .NE(400000), .GROUPS(64)) u_km_k64
    (.clk, .rst_n, .finished(km_fin[3]), .checks(km_chk[3]), .failures(km_fail[3]), .passes(km_pass[3]), .moves(km_mv[3]));

  sa_workload_run #(.K(26), .M(16), .N(20000), .WK(13), .WN(4),  .W(4)) u_sa_wn4
    (.clk, .rst_n, .finished(sa_fin[0]), .checks(sa_chk[0]), .failures(sa_fail[0]));
  sa_workload_run #(.K(26), .M(16), .N(20000), .WK(13), .WN(8),  .W(4)) u_sa_wn8
    (.clk, .rst_n, .finished(sa_fin[1]), .checks(sa_chk[1]), .failures(sa_fail[1]));
  sa_workload_run #(.K(26), .M(16), .N(20000), .WK(13), .WN(16), .W(4)) u_sa_wn16
    (.clk, .rst_n, .finished(sa_fin[2]), .checks(sa_chk[2]), .failures(sa_fail[2]));
  sa_workload_run #(.K(8),  .M(16), .N(20000), .WK(4),  .WN(2),  .W(4)) u_sa_k8
    (.clk, .rst_n, .finished(sa_fin[3]), .checks(sa_chk[3]), .failures(sa_fail[3]));
  sa_workload_run #(.K(16), .M(16), .N(20000), .WK(8),  .WN(2),  .W(4)) u_sa_k16
    (.clk, .rst_n, .finished(sa_fin[4]), .checks(sa_chk[4]), .failures(sa_fail[4]));
  sa_workload_run #(.K(32), .M(16), .N(20000), .WK(16), .WN(2),  .W(4)) u_sa_k32
    (.clk, .rst_n, .finished(sa_fin[5]), .checks(sa_chk[5]), .failures(sa_fail[5]));

  lin1_workload_run #(.K(32), .M(16), .N(4096), .W(8)) u_l1_k32
    (.clk, .rst_n, .finished(l_fin[0]), .checks(l_chk[0]), .failures(l_fail[0]));
  lin1_workload_run #(.K(64), .M(16), .N(4096), .W(8)) u_l1_k64
    (.clk, .rst_n, .finished(l_fin[1]), .checks(l_chk[1]), .failures(l_fail[1]));

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NSA; i++) begin checks += sa_chk[i]; failures += sa_fail[i]; end
    for (int i = 0; i < NL; i++)  begin checks += l_chk[i];  failures += l_fail[i];  end
    for (int i = 0; i < NKM; i++) begin checks += km_chk[i]; failures += km_fail[i]; end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    report();
    failures++; $display("watchdog: km %b sa %b lin %b", km_fin, sa_fin, l_fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&km_fin && &sa_fin && &l_fin);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
