// tb_dm_accel_full -- end-to-end test of dm_accel_top at its default
// (workload-sized) parameters. Every engine performs one complete operation
// of the size it was dimensioned for: K-means clustering of 40,000 8-bit
// elements into K=8 clusters (memory sized for 400,000), the gene-based
// leukemia distance matrix with 2-D Designs #1 and #2 (K=2, M=72, N=7129
// samples), the sample-based one with 2-D Designs #3 to #6 (K=2, N=72,
// M=7129), the Bridge data set with linear Designs #1 and #2 (K=16, M=16,
// N=4096), 1,024 distances on linear Design #3 (M=16), linear Designs #5
// and #6 with N=72, M=7129 for K=2, and
// the full letter data set on the scalable array (K=26, M=16, N=20000,
// wk=13, wn=2: 320,000 steps). The checks live in dm_tb_body.svh; the DUT
// is instantiated without parameter overrides.
module tb_dm_accel_full;
  localparam int KM_K = 8, KM_DATA_W = 8, KM_N_MAX = 400000, KM_NE = 40000;
  localparam int P1_K = 2, P1_M = 72, P1_W = 16, P1_N = 7129;
  localparam int P3_K = 2, P3_N = 72, P3_M = 7129, P3_W = 16;
  localparam int P2_K = 2, P2_M = 72, P2_W = 16, P2_N = 7129;
  localparam int P4_K = 2, P4_N = 72, P4_M = 7129, P4_W = 16;
  localparam int P5_K = 2, P5_N = 72, P5_M = 7129, P5_W = 16;
  localparam int P6_K = 2, P6_N = 72, P6_M = 7129, P6_W = 16;
  localparam int L2_K = 16, L2_M = 16, L2_N = 4096, L2_W = 8;
  localparam int L6_N = 72, L6_M = 7129, L6_K = 2, L6_W = 16;
  localparam int L1_K = 16, L1_M = 16, L1_W = 8, L1_N = 4096;
  localparam int L3_M = 16, L3_W = 8, L3_K = 16, L3_N = 64;
  localparam int L5_N = 72, L5_M = 7129, L5_W = 16, L5_K = 2;
  localparam int SA_K = 26, SA_M = 16, SA_N = 20000, SA_WK = 13, SA_WN = 2, SA_W = 4;
  localparam bit SA_REQ_PARTIAL = 0;
  localparam int WATCHDOG = 3000000;

`include "dm_tb_body.svh"

  dm_accel_top dut (.*);
endmodule
