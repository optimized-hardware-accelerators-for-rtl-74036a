// km_centroid_update -- shift-based recursive centroid update (1-D K-means).
//
// Holds the K centroid registers. When an element e moves from cluster src
// to cluster dest the two centroids are updated recursively,
//     c_src  += (c_src - e)  / n_src      c_dest += (e - c_dest) / n_dest,
// where n_src and n_dest are the counts after the move. Each division is
// replaced by an arithmetic right shift by log2 of the nearest power of two
// of the count. Three pipeline stages:
//   1. round n_src, n_dest to the nearest power of two by comparing them
//      against the interval bounds 3*2^(k-2) (a tie rounds up), and form the
//      two signed differences from the current centroids;
//   2. barrel-shift the differences;
//   3. add the shifted differences to the centroids (saturating to the data
//      range) and write them back.
// An update enters every clock at most. An element entering while an
// earlier update to the same cluster is still in stages 1-2 sees the older
// centroid, exactly as in a continuously updated pipeline. A source cluster
// that becomes empty (n_src = 0) keeps its centroid. The recursive form and
// the three stages follow the design; the rounding tie rule, the empty-
// cluster rule, saturation, the load port and the reset are choices of this
// implementation.
module km_centroid_update #(
  parameter int unsigned K      = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned CNT_W  = 19,
  localparam int unsigned LW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned EW    = $clog2(CNT_W + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [DATA_W-1:0]        e,
  input  logic [LW-1:0]            src,
  input  logic [LW-1:0]            dest,
  input  logic [CNT_W-1:0]         n_src,
  input  logic [CNT_W-1:0]         n_dest,
  input  logic                     ld_we,
  input  logic [LW-1:0]            ld_k,
  input  logic [DATA_W-1:0]        ld_c,
  output logic [K-1:0][DATA_W-1:0] centroids
);
  typedef logic signed [DATA_W:0] diff_t;

  // Exponent of the power of two nearest to n (n >= 1); 0 for n = 0.
  function automatic logic [EW-1:0] near_pow2_exp(input logic [CNT_W-1:0] n);
    logic [EW-1:0] x;
    x = '0;
    for (int k = 1; k <= CNT_W; k++) begin
      longint unsigned lo;
      lo = (k == 1) ? 64'd2 : (64'd3 << (k - 2));
      if (64'(n) >= lo) x = EW'(k);
    end
    return x;
  endfunction

  // Stage 1 registers
  logic              s1_v, s1_empty;
  logic [LW-1:0]     s1_src, s1_dest;
  logic [EW-1:0]     s1_xs, s1_xd;
  diff_t             s1_ds, s1_dd;
  // Stage 2 registers
  logic              s2_v, s2_empty;
  logic [LW-1:0]     s2_src, s2_dest;
  diff_t             s2_ss, s2_sd;

  function automatic logic [DATA_W-1:0] sat_add(input logic [DATA_W-1:0] c, input diff_t d);
    logic signed [DATA_W+1:0] s;
    s = $signed({2'b00, c}) + (DATA_W+2)'(d);
    if (s < 0) return '0;
    if (s > $signed({2'b00, {DATA_W{1'b1}}})) return '1;
    return s[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_empty <= 1'b0; s1_src <= '0; s1_dest <= '0;
      s1_xs <= '0; s1_xd <= '0; s1_ds <= '0; s1_dd <= '0;
      s2_v <= 1'b0; s2_empty <= 1'b0; s2_src <= '0; s2_dest <= '0;
      s2_ss <= '0; s2_sd <= '0;
      centroids <= '0;
    end else begin
      // stage 1: round counts, form differences
      s1_v     <= in_valid && (src != dest);
      s1_empty <= (n_src == '0);
      s1_src   <= src;
      s1_dest  <= dest;
      s1_xs    <= near_pow2_exp(n_src);
      s1_xd    <= near_pow2_exp(n_dest);
      s1_ds    <= $signed({1'b0, centroids[src]}) - $signed({1'b0, e});
      s1_dd    <= $signed({1'b0, e}) - $signed({1'b0, centroids[dest]});
      // stage 2: barrel shifters
      s2_v     <= s1_v;
      s2_empty <= s1_empty;
      s2_src   <= s1_src;
      s2_dest  <= s1_dest;
      s2_ss    <= s1_ds >>> s1_xs;
      s2_sd    <= s1_dd >>> s1_xd;
      // stage 3: adders and write-back
      if (ld_we) begin
        centroids[ld_k] <= ld_c;
      end else if (s2_v) begin
        if (!s2_empty) centroids[s2_src] <= sat_add(centroids[s2_src], s2_ss);
        centroids[s2_dest] <= sat_add(centroids[s2_dest], s2_sd);
      end
    end
  end
endmodule
