// km_dist_calc -- distance stage of the 1-D K-means pipeline.
//
// For every valid data element e it forms the K Manhattan distances
// |e - c_j| (for one-dimensional data this is just the absolute difference)
// against all K centroids at once, and registers them together with e and
// the element's current cluster label src. One element per clock; latency
// one cycle.  The K parallel absolute-difference units follow the
// distance-calculation unit of the design; carrying src alongside e and the
// synchronous active-low reset are choices of this implementation.
module km_dist_calc #(
  parameter int unsigned K      = 8,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned LW    = (K > 1) ? $clog2(K) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [DATA_W-1:0]          e,
  input  logic [LW-1:0]              src,
  input  logic [K-1:0][DATA_W-1:0]   c,
  output logic                       out_valid,
  output logic [DATA_W-1:0]          out_e,
  output logic [LW-1:0]              out_src,
  output logic [K-1:0][DATA_W-1:0]   dists
);
  logic [K-1:0][DATA_W-1:0] dists_d;

  always_comb begin
    for (int j = 0; j < K; j++)
      dists_d[j] = (e >= c[j]) ? (e - c[j]) : (c[j] - e);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_e     <= '0;
      out_src   <= '0;
      dists      <= '0;
    end else begin
      out_valid <= in_valid;
      out_e     <= e;
      out_src   <= src;
      dists      <= dists_d;
    end
  end
endmodule
