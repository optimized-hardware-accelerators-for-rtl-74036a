// sd_tile_sched -- nonlinear time-step scheduler of the scalable array.
//
// The K x M x N computation domain is cut into tiles of WK reference
// samples by WN data samples. Time steps are issued one per clock in the
// order t = m + M*kt + M*Hk*nt, with kt = floor(k/WK), nt = floor(n/WN),
// Hk = ceil(K/WK) and Hn = ceil(N/WN): the feature index m runs fastest, so
// each tile's WK*WN distances are finished after M consecutive steps, then
// the next k tile follows, then the next n tile. 'first' marks m = 0 and
// 'last' m = M-1 of a tile. A run of Hk*Hn*M steps starts with a start
// pulse (ignored while busy); step is high on every issued step, and done
// pulses with the final step. The execution order is the one the design's
// schedule figure prints; the start/done handshake is this implementation's
// choice.
module sd_tile_sched #(
  parameter int unsigned K  = 26,
  parameter int unsigned M  = 16,
  parameter int unsigned N  = 20000,
  parameter int unsigned WK = 13,
  parameter int unsigned WN = 2,
  localparam int unsigned HK  = (K - 1) / WK + 1,
  localparam int unsigned HN  = (N - 1) / WN + 1,
  localparam int unsigned MW  = (M  > 1) ? $clog2(M)  : 1,
  localparam int unsigned HKW = (HK > 1) ? $clog2(HK) : 1,
  localparam int unsigned HNW = (HN > 1) ? $clog2(HN) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           step,
  output logic [MW-1:0]  m,
  output logic [HKW-1:0] kt,
  output logic [HNW-1:0] nt,
  output logic           first,
  output logic           last,
  output logic           done
);
  logic m_end, k_end, n_end;
  assign m_end = (m  == MW'(M - 1));
  assign k_end = (kt == HKW'(HK - 1));
  assign n_end = (nt == HNW'(HN - 1));

  assign step  = busy;
  assign first = busy && (m == '0);
  assign last  = busy && m_end;
  assign done  = busy && m_end && k_end && n_end;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      m    <= '0;
      kt   <= '0;
      nt   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        m    <= '0;
        kt   <= '0;
        nt   <= '0;
      end
    end else if (!m_end) begin
      m <= m + 1'b1;
    end else begin
      m <= '0;
      if (!k_end) begin
        kt <= kt + 1'b1;
      end else begin
        kt <= '0;
        if (!n_end) nt <= nt + 1'b1;
        else        busy <= 1'b0;
      end
    end
  end
endmodule
