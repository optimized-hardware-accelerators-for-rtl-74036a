// lin_design5 -- linear array of N PEs for high-dimensional, low sample size
// data (schedule t = M*k + m, projection onto the n-axis).
//
// Reference samples Y are fed feature-serially: one value Y(k,m) per clock,
// m fastest, broadcast to all N PEs; PE n receives X(m,n) on its own input
// and accumulates |X(m,n) - Y(k,m)| (sd_acc_pe). An internal feature
// counter marks m = 0 and m = M-1; one clock after feature M-1, d_valid
// pulses and d holds D(k,0..N-1). K reference samples take K*M cycles. The
// array and PE follow the design; counter and framing are this
// implementation's choices.
module lin_design5 #(
  parameter int unsigned N  = 72,
  parameter int unsigned M  = 7129,
  parameter int unsigned W  = 16,
  localparam int unsigned DW = W + ((M > 1) ? $clog2(M) : 1),
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [W-1:0]         y,
  input  logic [N-1:0][W-1:0]  x,
  output logic                 d_valid,
  output logic [N-1:0][DW-1:0] d
);
  logic [MW-1:0] m_cnt;
  logic          first, last;
  assign first = (m_cnt == '0);
  assign last  = (m_cnt == MW'(M - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_cnt   <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= in_valid && last;
      if (in_valid) m_cnt <= last ? '0 : m_cnt + 1'b1;
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_pe
    sd_acc_pe #(.W(W), .DW(DW)) u_pe (
      .clk, .rst_n, .en(in_valid), .first, .x(x[n]), .y, .d(d[n]));
  end
endmodule
