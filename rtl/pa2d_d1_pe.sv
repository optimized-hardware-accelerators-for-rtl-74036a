// pa2d_d1_pe -- processing element PE(k,m) of the 2-D array Design #1.
//
// Stores one element Y(k,m) of the reference set (loaded through y_we) and,
// every clock, adds |X(m,n) - Y(k,m)| to the partial distance D(k,n)_{m-1}
// arriving from PE(k,m-1), registering the sum D(k,n)_m for PE(k,m+1).
// One-cycle latency, one new partial sum per clock. The structure (Y
// register, subtract, abs, add, D register) follows the design; the load
// port and reset are this implementation's choices.
module pa2d_d1_pe #(
  parameter int unsigned W  = 16,
  parameter int unsigned DW = 23
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          y_we,
  input  logic [W-1:0]  y_in,
  input  logic [W-1:0]  x,
  input  logic [DW-1:0] d_in,
  output logic [DW-1:0] d_out
);
  logic [W-1:0] y_q;
  logic [W-1:0] ad;
  assign ad = (x >= y_q) ? (x - y_q) : (y_q - x);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_q   <= '0;
      d_out <= '0;
    end else begin
      if (y_we) y_q <= y_in;
      d_out <= d_in + DW'(ad);
    end
  end
endmodule
