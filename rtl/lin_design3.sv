// lin_design3 -- linear array of M absolute-difference PEs with an adder tree
// (schedule t = k + K*n, projection onto the m-axis).
//
// All M features of one sample X(.,n) and of one reference sample Y(k,.)
// are presented in the same clock. PE m (sd_absdiff_pe) forms
// |X(m,n) - Y(k,m)| with no register, and an adder tree of M-1 adders and
// ceil(log2 M) levels sums the M partial results in the same clock, so one
// distance D(k,n) is produced per clock and K*N distances take K*N cycles.
// The order of (k,n) pairs is up to whoever feeds the array (the document's
// Designs #3 and #4 differ only in that order). The sum is registered once
// at the output: d/d_valid follow the inputs by one clock. PEs and tree
// follow the design; the output register is this implementation's choice.
module lin_design3 #(
  parameter int unsigned M  = 16,
  parameter int unsigned W  = 8,
  localparam int unsigned LV = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned DW = W + LV
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [M-1:0][W-1:0] x,
  input  logic [M-1:0][W-1:0] y,
  output logic                d_valid,
  output logic [DW-1:0]       d
);
  localparam int unsigned LEAVES = 1 << LV;

  logic [M-1:0][W-1:0] ad;
  for (genvar m = 0; m < M; m++) begin : g_pe
    sd_absdiff_pe #(.W(W)) u_pe (.x(x[m]), .y(y[m]), .a(ad[m]));
  end

  // adder tree: level l has LEAVES >> l nodes
  logic [LV:0][LEAVES-1:0][DW-1:0] node;
  always_comb begin
    node = '0;
    for (int m = 0; m < M; m++) node[0][m] = DW'(ad[m]);
    for (int l = 0; l < LV; l++)
      for (int p = 0; p < (LEAVES >> (l + 1)); p++)
        node[l+1][p] = node[l][2*p] + node[l][2*p+1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d       <= '0;
    end else begin
      d_valid <= in_valid;
      d       <= node[LV][0];
    end
  end
endmodule
