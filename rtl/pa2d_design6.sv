// pa2d_design6 -- 2-D K x N processor array, Design #6 of the M >> K, N case
// (schedule t = k + m + n, projection along m).
//
// Both inputs are pipelined: X(m,n) enters PE(0,n) at time m + n and moves
// down the k axis, Y(k,m) enters PE(k,0) at time k + m and moves along the
// n axis, so PE(k,n) works on feature m at time k + m + n. N(N-1)/2 delay
// registers skew the X row (together with the step flags, which then travel
// with X) and K(K-1)/2 skew the Y column. D is local (pa2d_pipe_pe). A
// matrix takes K + M + N - 2 clocks; PE(k,n) finishes k + n clocks after
// PE(0,0). Schedule, mapping and delay registers follow the design; the
// step flags and the valid outputs are this implementation's choices.
// Interface: at every time step m the caller presents the whole feature
// row x_row = X(m,0..N-1) and feature column y_col = Y(0..K-1,m) with
// in_valid, marking m = 0 with first and m = M-1 with last (in_valid may
// drop between steps). Each PE keeps D(k,n) in its own register (d[k][n])
// and pulses dv[k][n] the clock after its last step; d_valid is dv of the
// last PE to finish, i.e. the whole matrix is ready.
module pa2d_design6 #(
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
  // X lanes carry {in_valid, first, last, X(m,n)} so the flags stay aligned
  logic [N-1:0][W+2:0] xf_in, xf_skew;
  for (genvar n = 0; n < N; n++) begin : g_xf
    assign xf_in[n] = {in_valid, first, last, x_row[n]};
  end
  sd_skew #(.L(N), .W(W + 3)) u_skew_x (.clk, .rst_n, .din(xf_in), .dout(xf_skew));

  logic [K-1:0][W-1:0] y_skew;
  sd_skew #(.L(K), .W(W)) u_skew_y (.clk, .rst_n, .din(y_col), .dout(y_skew));

  logic [K-1:0][N-1:0]         en_p, first_p, last_p;
  logic [K-1:0][N-1:0][W-1:0]  x_p, y_p;
  for (genvar k = 0; k < K; k++) begin : g_k
    localparam int unsigned KP = (k == 0) ? 0 : k - 1;
    for (genvar n = 0; n < N; n++) begin : g_n
      localparam int unsigned NP = (n == 0) ? 0 : n - 1;
      pa2d_pipe_pe #(.W(W), .DW(DW)) u_pe (
        .clk, .rst_n,
        .en_in   ((k == 0) ? xf_skew[n][W+2] : en_p[KP][n]),
        .first_in((k == 0) ? xf_skew[n][W+1] : first_p[KP][n]),
        .last_in ((k == 0) ? xf_skew[n][W]   : last_p[KP][n]),
        .x_in    ((k == 0) ? xf_skew[n][W-1:0] : x_p[KP][n]),
        .y_in    ((n == 0) ? y_skew[k] : y_p[k][NP]),
        .en_out(en_p[k][n]), .first_out(first_p[k][n]), .last_out(last_p[k][n]),
        .x_out(x_p[k][n]), .y_out(y_p[k][n]),
        .d(d[k][n]), .dv(dv[k][n]));
    end
  end
  assign d_valid = dv[K-1][N-1];
endmodule
