// lin_design2 -- linear array of K PEs, Design #2 (schedule t = N*m + n,
// projection onto the k axis).
//
// Same array as lin_design1 (X broadcast, Y and D local) but with the other
// execution order: feature m of all N samples is processed before feature
// m + 1. One value X(m,n) is broadcast per clock, n fastest; PE k receives
// Y(k,m) on its own input in the same clock. Because N partial distances
// are open at once, each PE keeps a bank of N of them (sd_bank_pe), N*K
// registers in all. During the last feature sweep (m = M-1) d_valid pulses
// one clock after each sample n is taken, with d = D(0..K-1,n) and d_n = n.
// A whole matrix takes M*N clocks; in_valid may drop at any time. The
// schedule, the array and the N registers per PE follow the design; the
// counters and the output framing are this implementation's choices.
module lin_design2 #(
  parameter int unsigned K  = 16,
  parameter int unsigned M  = 16,
  parameter int unsigned N  = 4096,
  parameter int unsigned W  = 8,
  localparam int unsigned DW = W + ((M > 1) ? $clog2(M) : 1),
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [W-1:0]         x,
  input  logic [K-1:0][W-1:0]  y,
  output logic                 d_valid,
  output logic [NW-1:0]        d_n,
  output logic [K-1:0][DW-1:0] d
);
  logic [MW-1:0] m_cnt;
  logic [NW-1:0] n_cnt;
  logic          first, last, n_end;
  assign first = (m_cnt == '0);
  assign last  = (m_cnt == MW'(M - 1));
  assign n_end = (n_cnt == NW'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_cnt   <= '0;
      n_cnt   <= '0;
      d_valid <= 1'b0;
      d_n     <= '0;
    end else begin
      d_valid <= in_valid && last;
      if (in_valid) begin
        d_n   <= n_cnt;
        n_cnt <= n_end ? '0 : n_cnt + 1'b1;
        if (n_end) m_cnt <= last ? '0 : m_cnt + 1'b1;
      end
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_pe
    sd_bank_pe #(.W(W), .DW(DW), .R(N)) u_pe (
      .clk, .rst_n, .en(in_valid), .first, .idx(n_cnt), .x, .y(y[k]), .d(d[k]));
  end
endmodule
