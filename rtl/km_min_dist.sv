// km_min_dist -- pipelined compare tree of the 1-D K-means datapath.
//
// Finds the index of the smallest of K distances. The tree has
// LEVELS = ceil(log2 K) levels of two-input comparators with a pipeline
// register after every level, so the latency is LEVELS cycles and one new
// set of distances can enter every clock. The data element e and its
// current label src ride along the pipeline because the later stages need
// them. Ties go to the lower cluster index (a strict "<" scanning upward,
// as in the algorithm's inner loop). For K that is not a power of two the
// unused leaves hold the largest distance and can never win. Tree shape and
// latency follow the design; tie rule, padding and reset are choices of
// this implementation. Every tree level is declared with the full K-leaf
// width for simple indexing; the entries a level does not use are left
// unread and synthesis removes them.
module km_min_dist #(
  parameter int unsigned K      = 8,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned LW     = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LEVELS = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LEAVES = 1 << LEVELS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [K-1:0][DATA_W-1:0] dists,
  input  logic [DATA_W-1:0]        e,
  input  logic [LW-1:0]            src,
  output logic                     out_valid,
  output logic [LW-1:0]            dest,
  output logic [DATA_W-1:0]        out_e,
  output logic [LW-1:0]            out_src
);
  // Level l holds LEAVES >> l candidates (distance, index).
  logic [LEVELS:0][LEAVES-1:0][DATA_W-1:0] lv_d;
  logic [LEVELS:0][LEAVES-1:0][LW-1:0]     lv_i;
  logic [LEVELS:0]                         lv_v;
  logic [LEVELS:0][DATA_W-1:0]             lv_e;
  logic [LEVELS:0][LW-1:0]                 lv_s;

  always_comb begin
    lv_d[0] = '1;
    lv_i[0] = '0;
    for (int j = 0; j < K; j++) begin
      lv_d[0][j] = dists[j];
      lv_i[0][j] = LW'(j);
    end
    lv_v[0] = in_valid;
    lv_e[0] = e;
    lv_s[0] = src;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        lv_v[l+1] <= 1'b0;
        lv_e[l+1] <= '0;
        lv_s[l+1] <= '0;
        lv_d[l+1] <= '1;
        lv_i[l+1] <= '0;
      end else begin
        lv_v[l+1] <= lv_v[l];
        lv_e[l+1] <= lv_e[l];
        lv_s[l+1] <= lv_s[l];
        lv_d[l+1] <= '1;
        lv_i[l+1] <= '0;
        for (int p = 0; p < (LEAVES >> (l + 1)); p++) begin
          if (lv_d[l][2*p+1] < lv_d[l][2*p]) begin
            lv_d[l+1][p] <= lv_d[l][2*p+1];
            lv_i[l+1][p] <= lv_i[l][2*p+1];
          end else begin
            lv_d[l+1][p] <= lv_d[l][2*p];
            lv_i[l+1][p] <= lv_i[l][2*p];
          end
        end
      end
    end
  end

  assign out_valid = lv_v[LEVELS];
  assign dest      = lv_i[LEVELS][0];
  assign out_e     = lv_e[LEVELS];
  assign out_src   = lv_s[LEVELS];
endmodule
