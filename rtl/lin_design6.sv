// lin_design6 -- linear array of N PEs, Design #6 (schedule t = k + K*m,
// projection onto the n axis).
//
// Same array as lin_design5 (Y broadcast, X and D local) but with the other
// execution order: feature m of all K reference samples is processed before
// feature m + 1. One value Y(k,m) is broadcast per clock, k fastest; PE n
// receives X(m,n) on its own input in the same clock. Because K partial
// distances are open at once, each PE keeps a bank of K of them
// (sd_bank_pe), K*N registers in all. During the last feature sweep
// (m = M-1) d_valid pulses one clock after each reference sample k is
// taken, with d = D(k,0..N-1) and d_k = k. A whole matrix takes K*M clocks;
// in_valid may drop at any time. The schedule, the array and the K
// registers per PE follow the design; the counters and the output framing
// are this implementation's choices.
module lin_design6 #(
  parameter int unsigned N  = 72,
  parameter int unsigned M  = 7129,
  parameter int unsigned K  = 2,
  parameter int unsigned W  = 16,
  localparam int unsigned DW = W + ((M > 1) ? $clog2(M) : 1),
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [W-1:0]         y,
  input  logic [N-1:0][W-1:0]  x,
  output logic                 d_valid,
  output logic [KW-1:0]        d_k,
  output logic [N-1:0][DW-1:0] d
);
  logic [MW-1:0] m_cnt;
  logic [KW-1:0] k_cnt;
  logic          first, last, k_end;
  assign first = (m_cnt == '0);
  assign last  = (m_cnt == MW'(M - 1));
  assign k_end = (k_cnt == KW'(K - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_cnt   <= '0;
      k_cnt   <= '0;
      d_valid <= 1'b0;
      d_k     <= '0;
    end else begin
      d_valid <= in_valid && last;
      if (in_valid) begin
        d_k   <= k_cnt;
        k_cnt <= k_end ? '0 : k_cnt + 1'b1;
        if (k_end) m_cnt <= last ? '0 : m_cnt + 1'b1;
      end
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_pe
    sd_bank_pe #(.W(W), .DW(DW), .R(K)) u_pe (
      .clk, .rst_n, .en(in_valid), .first, .idx(k_cnt), .x(x[n]), .y, .d(d[n]));
  end
endmodule
