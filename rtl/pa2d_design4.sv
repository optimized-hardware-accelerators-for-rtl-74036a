// pa2d_design4 -- 2-D K x N processor array, Design #4 of the M >> K, N case
// (schedule t = m + n, projection along m).
//
// X is broadcast along k and Y is pipelined along n: Y(k,m) enters PE(k,0)
// at time m and moves one PE to the right per clock, so PE(k,n) works on
// feature m at time m + n. Column n therefore needs X(m,n) n clocks after
// it is presented, which the N(N-1)/2 input delay registers provide. D is
// local (pa2d_pipe_pe); the step flags travel with Y. A matrix takes
// M + N - 1 clocks; PE(k,n) finishes n clocks after column 0. Schedule,
// mapping, broadcast/pipeline choice and delay registers follow the design;
// the step flags and the valid outputs are this implementation's choices.
// Interface: at every time step m the caller presents the whole feature
// row x_row = X(m,0..N-1) and feature column y_col = Y(0..K-1,m) with
// in_valid, marking m = 0 with first and m = M-1 with last (in_valid may
// drop between steps). Each PE keeps D(k,n) in its own register (d[k][n])
// and pulses dv[k][n] the clock after its last step; d_valid is dv of the
// last PE to finish, i.e. the whole matrix is ready.
module pa2d_design4 #(
  parameter int unsigned K  = 2,
  parameter int unsigned N  = 72,
  parameter int unsigned M  = 7129,
  parameter int unsigned W  = 16,
  localparam int unsigned DW = W + ((M > 1) ? $clog2(M) : 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic                         first,
  input  logic                         last,
  input  logic [N-1:0][W-1:0]          x_row,
  input  logic [K-1:0][W-1:0]          y_col,
  output logic [K-1:0][N-1:0]          dv,
  output logic                         d_valid,
  output logic [K-1:0][N-1:0][DW-1:0]  d
);
  logic [N-1:0][W-1:0] x_skew;
  sd_skew #(.L(N), .W(W)) u_skew (.clk, .rst_n, .din(x_row), .dout(x_skew));

  logic [K-1:0][N-1:0]         en_p, first_p, last_p;
  logic [K-1:0][N-1:0][W-1:0]  x_unused, y_p;
  for (genvar k = 0; k < K; k++) begin : g_k
    for (genvar n = 0; n < N; n++) begin : g_n
      localparam int unsigned NP = (n == 0) ? 0 : n - 1;
      pa2d_pipe_pe #(.W(W), .DW(DW)) u_pe (
        .clk, .rst_n,
        .en_in   ((n == 0) ? in_valid   : en_p[k][NP]),
        .first_in((n == 0) ? first      : first_p[k][NP]),
        .last_in ((n == 0) ? last       : last_p[k][NP]),
        .x_in    (x_skew[n]),
        .y_in    ((n == 0) ? y_col[k]   : y_p[k][NP]),
        .en_out(en_p[k][n]), .first_out(first_p[k][n]), .last_out(last_p[k][n]),
        .x_out(x_unused[k][n]), .y_out(y_p[k][n]),
        .d(d[k][n]), .dv(dv[k][n]));
    end
  end
  assign d_valid = dv[K-1][N-1];
endmodule
