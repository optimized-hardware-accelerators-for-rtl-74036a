// km1d_top -- K-means clustering engine for one-dimensional data.
//
// The dataset e[0..n_elems-1] and each element's current cluster label l[i]
// live in two on-chip arrays. A pass streams every element, one per clock,
// through a fully pipelined datapath:
//   read  -> km_dist_calc (|e - c_j| for all K centroids)
//         -> km_min_dist  (ceil(log2 K)-level compare tree, gives dest)
//         -> km_count_unit (n_src--, n_dest++ when src != dest)
//         -> km_centroid_update (c_src, c_dest updated by shift-based
//            recursive equations, three stages).
// Centroids are therefore updated continuously, after every element that
// changes cluster, instead of once per pass; elements already in flight see
// centroids that may be a few updates old. The new label is written back
// when the compare tree delivers it. After the last element the controller
// waits for the pipeline to drain (LEVELS + 6 cycles) and ends the run when
// a whole pass moved no element (converged = 1) or after MAX_ITER passes.
//
// Use: with busy low, write every element and its initial label through
// ld_e_we, and every centroid with its population through ld_c_we (the
// initial random partition is chosen by the host), set n_elems and pulse
// start. 'done' pulses at the end; centroids, counts, iterations and the
// labels (rd_addr -> rd_label, combinational) can then be read.
// A pass takes n_elems + LEVELS + 7 clocks: n_elems issue clocks, then
// LEVELS + 7 clocks of drain and decision. The datapath split follows the
// design; the memories, the read stage in front of the distance unit, the
// drain/convergence controller and the load ports are this implementation's
// own choices.
module km1d_top #(
  parameter int unsigned K        = 8,
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned N_MAX    = 400000,
  parameter int unsigned MAX_ITER = 64,
  localparam int unsigned LW      = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW      = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int unsigned CNT_W   = $clog2(N_MAX + 1),
  localparam int unsigned LEVELS  = (K > 1) ? $clog2(K) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host loading
  input  logic                     ld_e_we,
  input  logic [AW-1:0]            ld_addr,
  input  logic [DATA_W-1:0]        ld_e,
  input  logic [LW-1:0]            ld_l,
  input  logic                     ld_c_we,
  input  logic [LW-1:0]            ld_k,
  input  logic [DATA_W-1:0]        ld_c,
  input  logic [CNT_W-1:0]         ld_n,
  // control
  input  logic [CNT_W-1:0]         n_elems,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     converged,
  output logic [15:0]              iterations,
  // results
  output logic [K-1:0][DATA_W-1:0] centroids,
  output logic [K-1:0][CNT_W-1:0]  counts,
  input  logic [AW-1:0]            rd_addr,
  output logic [LW-1:0]            rd_label
);
  localparam int unsigned DRAIN = LEVELS + 6;
  localparam int unsigned IDX_LAT = 2 + LEVELS;   // read + distance + tree

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [DATA_W-1:0] e_mem [N_MAX];
  logic [LW-1:0]     l_mem [N_MAX];

  logic [CNT_W-1:0]  issue_idx;
  logic [7:0]        drain_cnt;
  logic              pass_changed;

  // read stage
  logic              rd_v;
  logic [DATA_W-1:0] rd_e;
  logic [LW-1:0]     rd_l;
  logic              issue;
  assign issue = (state == S_RUN);

  always_ff @(posedge clk) begin
    if (ld_e_we && !busy) begin
      e_mem[ld_addr] <= ld_e;
    end
  end

  always_ff @(posedge clk) begin
    rd_e <= e_mem[issue_idx[AW-1:0]];
    rd_l <= l_mem[issue_idx[AW-1:0]];
  end

  assign rd_label = l_mem[rd_addr];

  // element index delay line, aligned with the compare-tree output
  logic [IDX_LAT-1:0][AW-1:0] idx_pipe;
  always_ff @(posedge clk) begin
    if (!rst_n) idx_pipe <= '0;
    else        idx_pipe <= {idx_pipe[IDX_LAT-2:0], issue_idx[AW-1:0]};
  end

  // distance stage
  logic                     dc_v;
  logic [DATA_W-1:0]        dc_e;
  logic [LW-1:0]            dc_src;
  logic [K-1:0][DATA_W-1:0] dc_d;

  km_dist_calc #(.K(K), .DATA_W(DATA_W)) u_dist (
    .clk, .rst_n, .in_valid(rd_v), .e(rd_e), .src(rd_l), .c(centroids),
    .out_valid(dc_v), .out_e(dc_e), .out_src(dc_src), .dists(dc_d));

  // compare tree
  logic              md_v;
  logic [LW-1:0]     md_dest, md_src;
  logic [DATA_W-1:0] md_e;

  km_min_dist #(.K(K), .DATA_W(DATA_W)) u_min (
    .clk, .rst_n, .in_valid(dc_v), .dists(dc_d), .e(dc_e), .src(dc_src),
    .out_valid(md_v), .dest(md_dest), .out_e(md_e), .out_src(md_src));

  // label write-back
  always_ff @(posedge clk) begin
    if (ld_e_we && !busy)  l_mem[ld_addr] <= ld_l;
    else if (md_v)         l_mem[idx_pipe[IDX_LAT-1]] <= md_dest;
  end

  // count unit
  logic              cu_v, cu_changed;
  logic [CNT_W-1:0]  cu_nsrc, cu_ndest;
  logic [DATA_W-1:0] cu_e;
  logic [LW-1:0]     cu_src, cu_dest;

  km_count_unit #(.K(K), .CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .in_valid(md_v), .src(md_src), .dest(md_dest),
    .ld_we(ld_c_we && !busy), .ld_k, .ld_n,
    .out_valid(cu_v), .changed(cu_changed), .n_src(cu_nsrc), .n_dest(cu_ndest),
    .counts);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cu_e <= '0; cu_src <= '0; cu_dest <= '0;
    end else begin
      cu_e <= md_e; cu_src <= md_src; cu_dest <= md_dest;
    end
  end

  // centroid update
  km_centroid_update #(.K(K), .DATA_W(DATA_W), .CNT_W(CNT_W)) u_upd (
    .clk, .rst_n, .in_valid(cu_v && cu_changed), .e(cu_e), .src(cu_src), .dest(cu_dest),
    .n_src(cu_nsrc), .n_dest(cu_ndest),
    .ld_we(ld_c_we && !busy), .ld_k, .ld_c, .centroids);

  // pass controller
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      issue_idx    <= '0;
      drain_cnt    <= '0;
      pass_changed <= 1'b0;
      rd_v         <= 1'b0;
      done         <= 1'b0;
      converged    <= 1'b0;
      iterations   <= '0;
    end else begin
      done <= 1'b0;
      rd_v <= issue;
      if (cu_v && cu_changed) pass_changed <= 1'b1;
      unique case (state)
        S_IDLE: if (start && n_elems != '0) begin
          state        <= S_RUN;
          issue_idx    <= '0;
          pass_changed <= 1'b0;
          iterations   <= '0;
          converged    <= 1'b0;
        end
        S_RUN: begin
          if (issue_idx == n_elems - 1'b1) begin
            state     <= S_DRAIN;
            drain_cnt <= 8'(DRAIN);
          end else begin
            issue_idx <= issue_idx + 1'b1;
          end
        end
        S_DRAIN: begin
          if (drain_cnt != '0) begin
            drain_cnt <= drain_cnt - 1'b1;
          end else begin
            iterations <= iterations + 1'b1;
            if (!pass_changed || (32'(iterations) + 1 >= MAX_ITER)) begin
              state     <= S_IDLE;
              done      <= 1'b1;
              converged <= !pass_changed;
            end else begin
              state        <= S_RUN;
              issue_idx    <= '0;
              pass_changed <= 1'b0;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The host must not load while a run is in progress.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(ld_e_we || ld_c_we));
endmodule
