// pa2d_design1 -- 2-D K x M processor array for similarity distances when the
// dataset is much larger than K and M (N >> K, M).
//
// Computes D(k,n) = sum_m |X(m,n) - Y(k,m)| for a stream of N samples.
// PE(k,m) (pa2d_d1_pe) keeps Y(k,m) locally. Sample n is presented as a whole
// column X(0..M-1,n) in one cycle; row m then passes through m delay
// registers (M(M-1)/2 in all) so that X(m,n) reaches row m of the array at
// time m + n, and is broadcast along k to the K PEs of that row. Partial
// distances flow along m, entering as 0 at m = 0; column n of D leaves the
// PEs PE(k,M-1) M-1 clocks after the edge that took the column (d_valid
// marks it). A new column can be presented every clock, so N samples take
// N + M - 1 clocks. The schedule t = m + n, the skew registers, the local Y and the
// pipelined D follow the design; presenting whole columns, the valid bit
// that travels with the data and the Y load port are this implementation's
// choices.
module pa2d_design1 #(
  parameter int unsigned K  = 2,
  parameter int unsigned M  = 72,
  parameter int unsigned W  = 16,
  localparam int unsigned DW = W + ((M > 1) ? $clog2(M) : 1),
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 y_we,
  input  logic [KW-1:0]        y_k,
  input  logic [MW-1:0]        y_m,
  input  logic [W-1:0]         y_in,
  input  logic                 x_valid,
  input  logic [M-1:0][W-1:0]  x_col,
  output logic                 d_valid,
  output logic [K-1:0][DW-1:0] d_col
);
  // skewed X rows: row m delayed by m cycles
  logic [M-1:0][W-1:0] x_skew;
  assign x_skew[0] = x_col[0];

  for (genvar m = 1; m < M; m++) begin : g_skew
    logic [m-1:0][W-1:0] sr;
    always_ff @(posedge clk) begin
      if (!rst_n) sr <= '0;
      else begin
        for (int i = 0; i < m - 1; i++) sr[i] <= sr[i+1];
        sr[m-1] <= x_col[m];
      end
    end
    assign x_skew[m] = sr[0];
  end

  // valid bit follows the D pipeline: M cycles
  logic [M-1:0] v_sr;
  always_ff @(posedge clk) begin
    if (!rst_n) v_sr <= '0;
    else        v_sr <= {v_sr[M-2:0], x_valid};
  end
  assign d_valid = v_sr[M-1];

  for (genvar k = 0; k < K; k++) begin : g_k
    logic [M-1:0][DW-1:0] d_chain;
    for (genvar m = 0; m < M; m++) begin : g_m
      pa2d_d1_pe #(.W(W), .DW(DW)) u_pe (
        .clk, .rst_n,
        .y_we (y_we && (y_k == KW'(k)) && (y_m == MW'(m))),
        .y_in,
        .x    (x_skew[m]),
        .d_in ((m == 0) ? '0 : d_chain[(m == 0) ? 0 : m-1]),
        .d_out(d_chain[m]));
    end
    assign d_col[k] = d_chain[M-1];
  end
endmodule
