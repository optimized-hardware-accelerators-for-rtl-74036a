// pa2d_design2 -- 2-D K x M processor array, Design #2 of the N >> K, M case
// (schedule t = k + m + n, projection along n).
//
// Computes D(k,n) = sum_m |X(m,n) - Y(k,m)| for a stream of samples.
// PE(k,m) (pa2d_d2_pe) keeps Y(k,m). A whole sample X(.,n) is presented in
// one clock; row m is delayed by m registers (M(M-1)/2 in all) so that
// X(m,n) enters PE(0,m) at time m + n, and from there it is pipelined down
// the k axis, one register per PE, reaching PE(k,m) at k + m + n. Partial
// distances flow along m as in Design #1. D(k,n) leaves PE(k,M-1) at time
// k + n + M - 1: row k of the output is k clocks later than row 0, and
// d_valid[k] marks it. N samples take K + M + N - 2 clocks to drain
// completely. Compared with Design #1, X moves between PEs instead of being
// broadcast, at the cost of one more register per PE and K - 1 more
// clocks. Schedule, mapping and skew follow the design; presenting whole
// samples, the per-row valid bits and the Y load port are this
// implementation's choices. The X output registers of the last row (k = K-1)
// have no receiver; they are left open and synthesis removes them.
module pa2d_design2 #(
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
  output logic [K-1:0]         d_valid,
  output logic [K-1:0][DW-1:0] d_col
);
  logic [M-1:0][W-1:0] x_skew;
  sd_skew #(.L(M), .W(W)) u_skew (.clk, .rst_n, .din(x_col), .dout(x_skew));

  // valid bit: M - 1 clocks to row 0's output, one more per row
  logic [M+K-2:0] v_sr;
  always_ff @(posedge clk) begin
    if (!rst_n) v_sr <= '0;
    else        v_sr <= {v_sr[M+K-3:0], x_valid};
  end

  logic [K-1:0][M-1:0][W-1:0]  x_pipe;
  logic [K-1:0][M-1:0][DW-1:0] d_chain;
  for (genvar k = 0; k < K; k++) begin : g_k
    for (genvar m = 0; m < M; m++) begin : g_m
      pa2d_d2_pe #(.W(W), .DW(DW)) u_pe (
        .clk, .rst_n,
        .y_we (y_we && (y_k == KW'(k)) && (y_m == MW'(m))),
        .y_in,
        .x_in ((k == 0) ? x_skew[m] : x_pipe[(k == 0) ? 0 : k-1][m]),
        .d_in ((m == 0) ? '0 : d_chain[k][(m == 0) ? 0 : m-1]),
        .x_out(x_pipe[k][m]),
        .d_out(d_chain[k][m]));
    end
    assign d_col[k]   = d_chain[k][M-1];
    assign d_valid[k] = v_sr[M-1+k];
  end
endmodule
