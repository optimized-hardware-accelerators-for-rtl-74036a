// dm_accel_top -- the data-mining accelerators side by side.
//
// The designs are independent engines that share no signals; this top
// simply places one of each, every one with its own prefixed ports and its
// own parameters (defaults are the sizes of the workloads each was sized
// for):
//   km_*  km1d_top          K-means for 1-D data, continuous centroid update
//                           with shift-based division (K = 8, 8-bit data).
//   p1_*  pa2d_design1      2-D K x M array, N >> K,M (K = 2, M = 72).
//   p2_*  pa2d_design2      2-D K x M array, X pipelined along k (K = 2,
//                           M = 72).
//   p3_*  pa2d_design3      2-D K x N array, M >> K,N (K = 2, N = 72,
//                           M = 7129).
//   p4_*, p5_*, p6_*        2-D K x N Designs #4, #5, #6 with Y, X or both
//                           pipelined (K = 2, N = 72, M = 7129).
//   l1_*  lin_design1       linear array of K PEs (K = 16, M = 16).
//   l2_*  lin_design2       linear array of K PEs, N partial sums each
//                           (K = 16, M = 16, N = 4096).
//   l3_*  lin_design3       linear array of M PEs + adder tree (M = 16).
//   l5_*  lin_design5       linear array of N PEs (N = 72, M = 7129).
//   l6_*  lin_design6       linear array of N PEs, K partial sums each
//                           (N = 72, M = 7129, K = 2).
//   sa_*  sd_scalable_array WK x WN array with nonlinear schedule
//                           (K = 26, M = 16, N = 20000, WK = 13, WN = 2).
// Timing and handshakes are those of each block; see their headers. All
// share one clock and one synchronous active-low reset.
module dm_accel_top #(
  parameter int unsigned KM_K = 8, KM_DATA_W = 8, KM_N_MAX = 400000, KM_MAX_ITER = 64,
  parameter int unsigned P1_K = 2, P1_M = 72, P1_W = 16,
  parameter int unsigned P3_K = 2, P3_N = 72, P3_M = 7129, P3_W = 16,
  parameter int unsigned L1_K = 16, L1_M = 16, L1_W = 8,
  parameter int unsigned L3_M = 16, L3_W = 8,
  parameter int unsigned L5_N = 72, L5_M = 7129, L5_W = 16,
  parameter int unsigned P2_K = 2, P2_M = 72, P2_W = 16,
  parameter int unsigned P4_K = 2, P4_N = 72, P4_M = 7129, P4_W = 16,
  parameter int unsigned P5_K = 2, P5_N = 72, P5_M = 7129, P5_W = 16,
  parameter int unsigned P6_K = 2, P6_N = 72, P6_M = 7129, P6_W = 16,
  parameter int unsigned L2_K = 16, L2_M = 16, L2_N = 4096, L2_W = 8,
  parameter int unsigned L6_N = 72, L6_M = 7129, L6_K = 2, L6_W = 16,
  parameter int unsigned SA_K = 26, SA_M = 16, SA_N = 20000, SA_WK = 13, SA_WN = 2, SA_W = 4,
  localparam int unsigned KM_LW  = (KM_K > 1) ? $clog2(KM_K) : 1,
  localparam int unsigned KM_AW  = (KM_N_MAX > 1) ? $clog2(KM_N_MAX) : 1,
  localparam int unsigned KM_CW  = $clog2(KM_N_MAX + 1),
  localparam int unsigned P1_KW  = (P1_K > 1) ? $clog2(P1_K) : 1,
  localparam int unsigned P1_MW  = (P1_M > 1) ? $clog2(P1_M) : 1,
  localparam int unsigned P1_DW  = P1_W + P1_MW,
  localparam int unsigned P2_KW  = (P2_K > 1) ? $clog2(P2_K) : 1,
  localparam int unsigned P2_MW  = (P2_M > 1) ? $clog2(P2_M) : 1,
  localparam int unsigned P2_DW  = P2_W + P2_MW,
  localparam int unsigned P4_DW  = P4_W + ((P4_M > 1) ? $clog2(P4_M) : 1),
  localparam int unsigned P5_DW  = P5_W + ((P5_M > 1) ? $clog2(P5_M) : 1),
  localparam int unsigned P6_DW  = P6_W + ((P6_M > 1) ? $clog2(P6_M) : 1),
  localparam int unsigned L2_DW  = L2_W + ((L2_M > 1) ? $clog2(L2_M) : 1),
  localparam int unsigned L2_NW  = (L2_N > 1) ? $clog2(L2_N) : 1,
  localparam int unsigned L6_DW  = L6_W + ((L6_M > 1) ? $clog2(L6_M) : 1),
  localparam int unsigned L6_KW  = (L6_K > 1) ? $clog2(L6_K) : 1,
  localparam int unsigned P3_DW  = P3_W + ((P3_M > 1) ? $clog2(P3_M) : 1),
  localparam int unsigned L1_DW  = L1_W + ((L1_M > 1) ? $clog2(L1_M) : 1),
  localparam int unsigned L3_DW  = L3_W + ((L3_M > 1) ? $clog2(L3_M) : 1),
  localparam int unsigned L5_DW  = L5_W + ((L5_M > 1) ? $clog2(L5_M) : 1),
  localparam int unsigned SA_DW  = SA_W + ((SA_M > 1) ? $clog2(SA_M) : 1),
  localparam int unsigned SA_HK  = (SA_K - 1) / SA_WK + 1,
  localparam int unsigned SA_HN  = (SA_N - 1) / SA_WN + 1,
  localparam int unsigned SA_MW  = (SA_M > 1) ? $clog2(SA_M) : 1,
  localparam int unsigned SA_HKW = (SA_HK > 1) ? $clog2(SA_HK) : 1,
  localparam int unsigned SA_HNW = (SA_HN > 1) ? $clog2(SA_HN) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // ---- 1-D K-means
  input  logic                                 km_ld_e_we,
  input  logic [KM_AW-1:0]                     km_ld_addr,
  input  logic [KM_DATA_W-1:0]                 km_ld_e,
  input  logic [KM_LW-1:0]                     km_ld_l,
  input  logic                                 km_ld_c_we,
  input  logic [KM_LW-1:0]                     km_ld_k,
  input  logic [KM_DATA_W-1:0]                 km_ld_c,
  input  logic [KM_CW-1:0]                     km_ld_n,
  input  logic [KM_CW-1:0]                     km_n_elems,
  input  logic                                 km_start,
  output logic                                 km_busy,
  output logic                                 km_done,
  output logic                                 km_converged,
  output logic [15:0]                          km_iterations,
  output logic [KM_K-1:0][KM_DATA_W-1:0]       km_centroids,
  output logic [KM_K-1:0][KM_CW-1:0]           km_counts,
  input  logic [KM_AW-1:0]                     km_rd_addr,
  output logic [KM_LW-1:0]                     km_rd_label,
  // ---- 2-D Design #1
  input  logic                                 p1_y_we,
  input  logic [P1_KW-1:0]                     p1_y_k,
  input  logic [P1_MW-1:0]                     p1_y_m,
  input  logic [P1_W-1:0]                      p1_y_in,
  input  logic                                 p1_x_valid,
  input  logic [P1_M-1:0][P1_W-1:0]            p1_x_col,
  output logic                                 p1_d_valid,
  output logic [P1_K-1:0][P1_DW-1:0]           p1_d_col,
  // ---- 2-D Design #3
  input  logic                                 p3_in_valid,
  input  logic                                 p3_first,
  input  logic                                 p3_last,
  input  logic [P3_N-1:0][P3_W-1:0]            p3_x_row,
  input  logic [P3_K-1:0][P3_W-1:0]            p3_y_col,
  output logic                                 p3_d_valid,
  output logic [P3_K-1:0][P3_N-1:0][P3_DW-1:0] p3_d,
  // ---- 2-D Design #2
  input  logic                                 p2_y_we,
  input  logic [P2_KW-1:0]                     p2_y_k,
  input  logic [P2_MW-1:0]                     p2_y_m,
  input  logic [P2_W-1:0]                      p2_y_in,
  input  logic                                 p2_x_valid,
  input  logic [P2_M-1:0][P2_W-1:0]            p2_x_col,
  output logic [P2_K-1:0]                      p2_d_valid,
  output logic [P2_K-1:0][P2_DW-1:0]           p2_d_col,
  // ---- 2-D Design #4
  input  logic                                 p4_in_valid,
  input  logic                                 p4_first,
  input  logic                                 p4_last,
  input  logic [P4_N-1:0][P4_W-1:0]            p4_x_row,
  input  logic [P4_K-1:0][P4_W-1:0]            p4_y_col,
  output logic [P4_K-1:0][P4_N-1:0]            p4_dv,
  output logic                                 p4_d_valid,
  output logic [P4_K-1:0][P4_N-1:0][P4_DW-1:0] p4_d,
  // ---- 2-D Design #5
  input  logic                                 p5_in_valid,
  input  logic                                 p5_first,
  input  logic                                 p5_last,
  input  logic [P5_N-1:0][P5_W-1:0]            p5_x_row,
  input  logic [P5_K-1:0][P5_W-1:0]            p5_y_col,
  output logic [P5_K-1:0][P5_N-1:0]            p5_dv,
  output logic                                 p5_d_valid,
  output logic [P5_K-1:0][P5_N-1:0][P5_DW-1:0] p5_d,
  // ---- 2-D Design #6
  input  logic                                 p6_in_valid,
  input  logic                                 p6_first,
  input  logic                                 p6_last,
  input  logic [P6_N-1:0][P6_W-1:0]            p6_x_row,
  input  logic [P6_K-1:0][P6_W-1:0]            p6_y_col,
  output logic [P6_K-1:0][P6_N-1:0]            p6_dv,
  output logic                                 p6_d_valid,
  output logic [P6_K-1:0][P6_N-1:0][P6_DW-1:0] p6_d,
  // ---- linear Design #1
  input  logic                                 l1_in_valid,
  input  logic [L1_W-1:0]                      l1_x,
  input  logic [L1_K-1:0][L1_W-1:0]            l1_y,
  output logic                                 l1_d_valid,
  output logic [L1_K-1:0][L1_DW-1:0]           l1_d,
  // ---- linear Design #3
  input  logic                                 l3_in_valid,
  input  logic [L3_M-1:0][L3_W-1:0]            l3_x,
  input  logic [L3_M-1:0][L3_W-1:0]            l3_y,
  output logic                                 l3_d_valid,
  output logic [L3_DW-1:0]                     l3_d,
  // ---- linear Design #5
  input  logic                                 l5_in_valid,
  input  logic [L5_W-1:0]                      l5_y,
  input  logic [L5_N-1:0][L5_W-1:0]            l5_x,
  output logic                                 l5_d_valid,
  output logic [L5_N-1:0][L5_DW-1:0]           l5_d,
  // ---- linear Design #2
  input  logic                                 l2_in_valid,
  input  logic [L2_W-1:0]                      l2_x,
  input  logic [L2_K-1:0][L2_W-1:0]            l2_y,
  output logic                                 l2_d_valid,
  output logic [L2_NW-1:0]                     l2_d_n,
  output logic [L2_K-1:0][L2_DW-1:0]           l2_d,
  // ---- linear Design #6
  input  logic                                 l6_in_valid,
  input  logic [L6_W-1:0]                      l6_y,
  input  logic [L6_N-1:0][L6_W-1:0]            l6_x,
  output logic                                 l6_d_valid,
  output logic [L6_KW-1:0]                     l6_d_k,
  output logic [L6_N-1:0][L6_DW-1:0]           l6_d,
  // ---- scalable array
  input  logic                                 sa_start,
  output logic                                 sa_busy,
  output logic                                 sa_done,
  output logic                                 sa_rd_en,
  output logic [SA_MW-1:0]                     sa_rd_m,
  output logic [SA_HKW-1:0]                    sa_rd_kt,
  output logic [SA_HNW-1:0]                    sa_rd_nt,
  input  logic [SA_WN-1:0][SA_W-1:0]           sa_x_in,
  input  logic [SA_WK-1:0][SA_W-1:0]           sa_y_in,
  output logic                                 sa_tile_valid,
  output logic [SA_HKW-1:0]                    sa_tile_kt,
  output logic [SA_HNW-1:0]                    sa_tile_nt,
  output logic [SA_WK-1:0][SA_WN-1:0][SA_DW-1:0] sa_tile_d
);
  km1d_top #(.K(KM_K), .DATA_W(KM_DATA_W), .N_MAX(KM_N_MAX), .MAX_ITER(KM_MAX_ITER)) u_km (
    .clk, .rst_n,
    .ld_e_we(km_ld_e_we), .ld_addr(km_ld_addr), .ld_e(km_ld_e), .ld_l(km_ld_l),
    .ld_c_we(km_ld_c_we), .ld_k(km_ld_k), .ld_c(km_ld_c), .ld_n(km_ld_n),
    .n_elems(km_n_elems), .start(km_start), .busy(km_busy), .done(km_done),
    .converged(km_converged), .iterations(km_iterations),
    .centroids(km_centroids), .counts(km_counts),
    .rd_addr(km_rd_addr), .rd_label(km_rd_label));

  pa2d_design1 #(.K(P1_K), .M(P1_M), .W(P1_W)) u_p1 (
    .clk, .rst_n, .y_we(p1_y_we), .y_k(p1_y_k), .y_m(p1_y_m), .y_in(p1_y_in),
    .x_valid(p1_x_valid), .x_col(p1_x_col), .d_valid(p1_d_valid), .d_col(p1_d_col));

  pa2d_design3 #(.K(P3_K), .N(P3_N), .M(P3_M), .W(P3_W)) u_p3 (
    .clk, .rst_n, .in_valid(p3_in_valid), .first(p3_first), .last(p3_last),
    .x_row(p3_x_row), .y_col(p3_y_col), .d_valid(p3_d_valid), .d(p3_d));

  lin_design1 #(.K(L1_K), .M(L1_M), .W(L1_W)) u_l1 (
    .clk, .rst_n, .in_valid(l1_in_valid), .x(l1_x), .y(l1_y),
    .d_valid(l1_d_valid), .d(l1_d));

  lin_design3 #(.M(L3_M), .W(L3_W)) u_l3 (
    .clk, .rst_n, .in_valid(l3_in_valid), .x(l3_x), .y(l3_y),
    .d_valid(l3_d_valid), .d(l3_d));

  lin_design5 #(.N(L5_N), .M(L5_M), .W(L5_W)) u_l5 (
    .clk, .rst_n, .in_valid(l5_in_valid), .y(l5_y), .x(l5_x),
    .d_valid(l5_d_valid), .d(l5_d));

  pa2d_design2 #(.K(P2_K), .M(P2_M), .W(P2_W)) u_p2 (
    .clk, .rst_n, .y_we(p2_y_we), .y_k(p2_y_k), .y_m(p2_y_m), .y_in(p2_y_in),
    .x_valid(p2_x_valid), .x_col(p2_x_col), .d_valid(p2_d_valid), .d_col(p2_d_col));

  pa2d_design4 #(.K(P4_K), .N(P4_N), .M(P4_M), .W(P4_W)) u_p4 (
    .clk, .rst_n, .in_valid(p4_in_valid), .first(p4_first), .last(p4_last),
    .x_row(p4_x_row), .y_col(p4_y_col), .dv(p4_dv), .d_valid(p4_d_valid), .d(p4_d));

  pa2d_design5 #(.K(P5_K), .N(P5_N), .M(P5_M), .W(P5_W)) u_p5 (
    .clk, .rst_n, .in_valid(p5_in_valid), .first(p5_first), .last(p5_last),
    .x_row(p5_x_row), .y_col(p5_y_col), .dv(p5_dv), .d_valid(p5_d_valid), .d(p5_d));

  pa2d_design6 #(.K(P6_K), .N(P6_N), .M(P6_M), .W(P6_W)) u_p6 (
    .clk, .rst_n, .in_valid(p6_in_valid), .first(p6_first), .last(p6_last),
    .x_row(p6_x_row), .y_col(p6_y_col), .dv(p6_dv), .d_valid(p6_d_valid), .d(p6_d));

  lin_design2 #(.K(L2_K), .M(L2_M), .N(L2_N), .W(L2_W)) u_l2 (
    .clk, .rst_n, .in_valid(l2_in_valid), .x(l2_x), .y(l2_y),
    .d_valid(l2_d_valid), .d_n(l2_d_n), .d(l2_d));

  lin_design6 #(.N(L6_N), .M(L6_M), .K(L6_K), .W(L6_W)) u_l6 (
    .clk, .rst_n, .in_valid(l6_in_valid), .y(l6_y), .x(l6_x),
    .d_valid(l6_d_valid), .d_k(l6_d_k), .d(l6_d));

  sd_scalable_array #(.K(SA_K), .M(SA_M), .N(SA_N), .WK(SA_WK), .WN(SA_WN), .W(SA_W)) u_sa (
    .clk, .rst_n, .start(sa_start), .busy(sa_busy), .done(sa_done),
    .rd_en(sa_rd_en), .rd_m(sa_rd_m), .rd_kt(sa_rd_kt), .rd_nt(sa_rd_nt),
    .x_in(sa_x_in), .y_in(sa_y_in),
    .tile_valid(sa_tile_valid), .tile_kt(sa_tile_kt), .tile_nt(sa_tile_nt), .tile_d(sa_tile_d));
endmodule
