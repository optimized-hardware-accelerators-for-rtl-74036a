// tb_dm_accel_top -- end-to-end test of dm_accel_top at reduced sizes:
// every engine runs one complete operation in parallel, results are
// compared with values computed in the testbench, and every mechanism
// (element moves with continuous centroid update, an emptied cluster,
// repeated passes, convergence, skewed and pipelined inputs, broadcast,
// banks of partial sums, adder tree, tile schedule with a partial edge
// tile) must occur. The checks live in dm_tb_body.svh.
module tb_dm_accel_top;
  localparam int KM_K = 8, KM_DATA_W = 8, KM_N_MAX = 512, KM_NE = 400;
  localparam int P1_K = 3, P1_M = 4, P1_W = 16, P1_N = 10;
  localparam int P3_K = 3, P3_N = 4, P3_M = 6, P3_W = 16;
  localparam int P2_K = 3, P2_M = 4, P2_W = 16, P2_N = 9;
  localparam int P4_K = 3, P4_N = 4, P4_M = 6, P4_W = 16;
  localparam int P5_K = 3, P5_N = 4, P5_M = 6, P5_W = 16;
  localparam int P6_K = 3, P6_N = 4, P6_M = 6, P6_W = 16;
  localparam int L2_K = 3, L2_M = 4, L2_N = 5, L2_W = 8;
  localparam int L6_N = 3, L6_M = 4, L6_K = 5, L6_W = 16;
  localparam int L1_K = 4, L1_M = 5, L1_W = 8, L1_N = 6;
  localparam int L3_M = 4, L3_W = 8, L3_K = 3, L3_N = 5;
  localparam int L5_N = 4, L5_M = 5, L5_W = 16, L5_K = 3;
  localparam int SA_K = 7, SA_M = 5, SA_N = 9, SA_WK = 3, SA_WN = 2, SA_W = 4;
  localparam bit SA_REQ_PARTIAL = 1;
  localparam int WATCHDOG = 200000;

`include "dm_tb_body.svh"

  dm_accel_top #(
    .KM_K(KM_K), .KM_DATA_W(KM_DATA_W), .KM_N_MAX(KM_N_MAX), .KM_MAX_ITER(64),
    .P1_K(P1_K), .P1_M(P1_M), .P1_W(P1_W),
    .P2_K(P2_K), .P2_M(P2_M), .P2_W(P2_W),
    .P4_K(P4_K), .P4_N(P4_N), .P4_M(P4_M), .P4_W(P4_W),
    .P5_K(P5_K), .P5_N(P5_N), .P5_M(P5_M), .P5_W(P5_W),
    .P6_K(P6_K), .P6_N(P6_N), .P6_M(P6_M), .P6_W(P6_W),
    .L2_K(L2_K), .L2_M(L2_M), .L2_N(L2_N), .L2_W(L2_W),
    .L6_N(L6_N), .L6_M(L6_M), .L6_K(L6_K), .L6_W(L6_W),
    .P3_K(P3_K), .P3_N(P3_N), .P3_M(P3_M), .P3_W(P3_W),
    .L1_K(L1_K), .L1_M(L1_M), .L1_W(L1_W),
    .L3_M(L3_M), .L3_W(L3_W),
    .L5_N(L5_N), .L5_M(L5_M), .L5_W(L5_W),
    .SA_K(SA_K), .SA_M(SA_M), .SA_N(SA_N), .SA_WK(SA_WK), .SA_WN(SA_WN), .SA_W(SA_W)
  ) dut (.*);
endmodule
