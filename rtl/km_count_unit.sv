// km_count_unit -- cluster population counters of the 1-D K-means pipeline.
//
// Holds one counter n_k per cluster (K registers in all; no per-cluster sums
// are kept because centroids are updated recursively). For each valid
// element it compares the source label src (the cluster the element was in)
// with the destination label dest (its nearest cluster). If they differ,
// n_src is decremented and n_dest incremented in the same clock, and the
// updated values n_src(t), n_dest(t) are registered on the outputs together
// with the 'changed' flag, one cycle after the input. If they are equal the
// counters are untouched and changed is 0. The host writes the initial
// counts through the ld_* port before a run. Comparator, counters and the
// ++/-- units follow the design; the load port, registered outputs and reset
// are choices of this implementation.
module km_count_unit #(
  parameter int unsigned K     = 8,
  parameter int unsigned CNT_W = 19,
  localparam int unsigned LW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [LW-1:0]           src,
  input  logic [LW-1:0]           dest,
  input  logic                    ld_we,
  input  logic [LW-1:0]           ld_k,
  input  logic [CNT_W-1:0]        ld_n,
  output logic                    out_valid,
  output logic                    changed,
  output logic [CNT_W-1:0]        n_src,
  output logic [CNT_W-1:0]        n_dest,
  output logic [K-1:0][CNT_W-1:0] counts
);
  logic move;
  assign move = in_valid && (src != dest);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      counts    <= '0;
      out_valid <= 1'b0;
      changed   <= 1'b0;
      n_src     <= '0;
      n_dest    <= '0;
    end else begin
      out_valid <= in_valid;
      changed   <= move;
      if (ld_we) begin
        counts[ld_k] <= ld_n;
      end else if (move) begin
        counts[src]  <= counts[src] - 1'b1;
        counts[dest] <= counts[dest] + 1'b1;
      end
      n_src  <= move ? counts[src] - 1'b1  : counts[src];
      n_dest <= move ? counts[dest] + 1'b1 : counts[dest];
    end
  end
endmodule
