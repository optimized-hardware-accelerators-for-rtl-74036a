// sd_scalable_array -- scalable, parameterized WK x WN processor array for
// similarity (Manhattan) distance matrices D(k,n) = sum_m |X(m,n) - Y(k,m)|.
//
// The full K x N array that broadcasts both inputs is folded onto WK x WN
// PEs: point (k,m,n) runs on PE(i,j) with i = k mod WK, j = n mod WN, at the
// time step issued by sd_tile_sched (m fastest, then k tile, then n tile).
// Per step the array needs WN values X(m, nt*WN + j), broadcast along row j,
// and WK values Y(kt*WK + i, m), broadcast along column i, so only WK + WN
// inputs are read per clock whatever K, M and N are. Each PE (sd_acc_pe)
// keeps its partial distance in a local register; after the M steps of a
// tile, tile_valid pulses and tile_d holds the WK x WN distances of tile
// (tile_kt, tile_nt). done pulses ceil(K/WK)*ceil(N/WN)*M + 1 clocks after
// the edge that samples start, together with the last tile_valid.
//
// Memory interface: on a clock with rd_en high the array requests feature
// rd_m of n tile rd_nt and k tile rd_kt; x_in and y_in must carry those
// values on the following clock (one-cycle synchronous read). Rows or
// columns of a partial last tile get whatever the memory returns; their
// results are simply not used. Array, PE, mapping and schedule follow the
// design; the memory interface and the tile tags are this
// implementation's choices.
module sd_scalable_array #(
  parameter int unsigned K  = 26,
  parameter int unsigned M  = 16,
  parameter int unsigned N  = 20000,
  parameter int unsigned WK = 13,
  parameter int unsigned WN = 2,
  parameter int unsigned W  = 4,
  localparam int unsigned DW  = W + ((M > 1) ? $clog2(M) : 1),
  localparam int unsigned HK  = (K - 1) / WK + 1,
  localparam int unsigned HN  = (N - 1) / WN + 1,
  localparam int unsigned MW  = (M  > 1) ? $clog2(M)  : 1,
  localparam int unsigned HKW = (HK > 1) ? $clog2(HK) : 1,
  localparam int unsigned HNW = (HN > 1) ? $clog2(HN) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  output logic                             busy,
  output logic                             done,
  // read requests
  output logic                             rd_en,
  output logic [MW-1:0]                    rd_m,
  output logic [HKW-1:0]                   rd_kt,
  output logic [HNW-1:0]                   rd_nt,
  // read data, one clock after rd_en
  input  logic [WN-1:0][W-1:0]             x_in,
  input  logic [WK-1:0][W-1:0]             y_in,
  // results
  output logic                             tile_valid,
  output logic [HKW-1:0]                   tile_kt,
  output logic [HNW-1:0]                   tile_nt,
  output logic [WK-1:0][WN-1:0][DW-1:0]    tile_d
);
  logic s_busy, s_step, s_first, s_last, s_done;
  logic [HKW-1:0] s_kt;
  logic [HNW-1:0] s_nt;

  sd_tile_sched #(.K(K), .M(M), .N(N), .WK(WK), .WN(WN)) u_sched (
    .clk, .rst_n, .start, .busy(s_busy), .step(s_step), .m(rd_m), .kt(s_kt), .nt(s_nt),
    .first(s_first), .last(s_last), .done(s_done));

  assign rd_en = s_step;
  assign rd_kt = s_kt;
  assign rd_nt = s_nt;

  // control delayed to meet the read data
  logic           p_step, p_first, p_last, p_done;
  logic [HKW-1:0] p_kt;
  logic [HNW-1:0] p_nt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_step <= 1'b0; p_first <= 1'b0; p_last <= 1'b0; p_done <= 1'b0;
      p_kt <= '0; p_nt <= '0;
      tile_valid <= 1'b0; tile_kt <= '0; tile_nt <= '0; done <= 1'b0;
    end else begin
      p_step  <= s_step;
      p_first <= s_first;
      p_last  <= s_last;
      p_done  <= s_done;
      p_kt    <= s_kt;
      p_nt    <= s_nt;
      tile_valid <= p_step && p_last;
      done       <= p_done;
      if (p_step && p_last) begin
        tile_kt <= p_kt;
        tile_nt <= p_nt;
      end
    end
  end

  assign busy = s_busy || p_step || tile_valid;

  for (genvar i = 0; i < WK; i++) begin : g_i
    for (genvar j = 0; j < WN; j++) begin : g_j
      sd_acc_pe #(.W(W), .DW(DW)) u_pe (
        .clk, .rst_n, .en(p_step), .first(p_first),
        .x(x_in[j]), .y(y_in[i]), .d(tile_d[i][j]));
    end
  end
endmodule
