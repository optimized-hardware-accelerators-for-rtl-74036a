// pa2d_d2_pe -- processing element PE(k,m) of the 2-D array Design #2.
//
// Same as the Design #1 element (a stored Y(k,m), and
// d_out <= d_in + |x - Y(k,m)| every clock) plus one register that passes
// the incoming X(m,n) on to PE(k+1,m) one clock later, because in this
// design X is pipelined along k instead of broadcast. One-cycle latency on
// both outputs. Structure follows the design; load port and reset are this
// implementation's choices.
module pa2d_d2_pe #(
  parameter int unsigned W  = 16,
  parameter int unsigned DW = 23
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          y_we,
  input  logic [W-1:0]  y_in,
  input  logic [W-1:0]  x_in,
  input  logic [DW-1:0] d_in,
  output logic [W-1:0]  x_out,
  output logic [DW-1:0] d_out
);
  logic [W-1:0] y_q;
  logic [W-1:0] ad;
  assign ad = (x_in >= y_q) ? (x_in - y_q) : (y_q - x_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_q   <= '0;
      x_out <= '0;
      d_out <= '0;
    end else begin
      if (y_we) y_q <= y_in;
      x_out <= x_in;
      d_out <= d_in + DW'(ad);
    end
  end
endmodule
