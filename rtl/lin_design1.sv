// lin_design1 -- linear array of K PEs for similarity distances (schedule
// t = m + M*n, projection onto the k-axis).
//
// Samples of X are fed feature-serially: one value X(m,n) per clock, m
// fastest, broadcast to all K PEs. PE k receives Y(k,m) on its own input
// in the same clock and accumulates |X(m,n) - Y(k,m)| (sd_acc_pe). An
// internal feature counter marks m = 0 (start a new sum) and m = M-1; one
// clock after feature M-1 is taken, d_valid pulses and d holds
// D(0..K-1,n). Back-to-back samples need no idle cycle, so N samples take
// M*N cycles. in_valid may drop at any time; the counter simply waits. The
// array and PE follow the design; the counter and framing are this
// implementation's choices.
module lin_design1 #(
  parameter int unsigned K  = 16,
  parameter int unsigned M  = 16,
  parameter int unsigned W  = 8,
  localparam int unsigned DW = W + ((M > 1) ? $clog2(M) : 1),
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [W-1:0]         x,
  input  logic [K-1:0][W-1:0]  y,
  output logic                 d_valid,
  output logic [K-1:0][DW-1:0] d
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

  for (genvar k = 0; k < K; k++) begin : g_pe
    sd_acc_pe #(.W(W), .DW(DW)) u_pe (
      .clk, .rst_n, .en(in_valid), .first, .x, .y(y[k]), .d(d[k]));
  end
endmodule
