// sd_skew -- input skew network of the systolic distance arrays.
//
// L lanes of W bits; lane i leaves i clocks after it enters (lane 0 passes
// straight through), built from i registers per lane, L(L-1)/2 in all. It
// is the "delay register" triangle that feeds a data matrix to an array
// whose schedule needs element (i, t) at time t + i. Shift registers of
// this shape are what the design calls for; sharing them in one module and
// the reset are this implementation's choices.
module sd_skew #(
  parameter int unsigned L = 4,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [L-1:0][W-1:0] din,
  output logic [L-1:0][W-1:0] dout
);
  assign dout[0] = din[0];

  for (genvar i = 1; i < L; i++) begin : g_lane
    logic [i-1:0][W-1:0] sr;
    always_ff @(posedge clk) begin
      if (!rst_n) sr <= '0;
      else begin
        for (int j = 0; j < i - 1; j++) sr[j] <= sr[j+1];
        sr[i-1] <= din[i];
      end
    end
    assign dout[i] = sr[0];
  end
endmodule
