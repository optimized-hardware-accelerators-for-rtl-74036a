// pa2d_design3 -- 2-D K x N processor array for high-dimensional, low sample
// size data (M >> K, N).
//
// One sd_acc_pe per output element D(k,n). At time step m the whole feature
// row X(m,0..N-1) and the whole feature column Y(0..K-1,m) are presented;
// X(m,n) is broadcast along k to column n of the array and Y(k,m) along n
// to row k, and every PE adds |X(m,n) - Y(k,m)| to its local register. After
// the M steps the complete K x N distance matrix sits in the PEs. No delay
// registers and no PE-to-PE links are needed; M cycles in all. The caller
// marks m = 0 with 'first' and m = M-1 with 'last'; d_valid rises the clock
// after the last step. Broadcasting both inputs and keeping D local follow
// the design; the first/last framing is this implementation's choice.
module pa2d_design3 #(
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
  output logic                         d_valid,
  output logic [K-1:0][N-1:0][DW-1:0]  d
);
  always_ff @(posedge clk) begin
    if (!rst_n) d_valid <= 1'b0;
    else        d_valid <= in_valid && last;
  end

  for (genvar k = 0; k < K; k++) begin : g_k
    for (genvar n = 0; n < N; n++) begin : g_n
      sd_acc_pe #(.W(W), .DW(DW)) u_pe (
        .clk, .rst_n, .en(in_valid), .first,
        .x(x_row[n]), .y(y_col[k]), .d(d[k][n]));
    end
  end
endmodule
