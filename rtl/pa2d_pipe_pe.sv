// pa2d_pipe_pe -- processing element of the 2-D arrays with a local
// distance register and pipelined inputs (Designs #4, #5 and #6 of the
// K x N family).
//
// Every clock with en_in high it adds |x_in - y_in| to its local partial
// distance d, starting from zero when first_in is high; dv pulses the clock
// after the step marked last_in, when d holds the finished D(k,n). x_in,
// y_in and the step flags are also registered and passed on (x_out, y_out,
// en_out, first_out, last_out) to the neighbour that receives them one time
// step later; an array that broadcasts one of the inputs simply leaves that
// output open. The accumulator is the design's; the extra pass registers
// are those the design adds for pipelined inputs, and carrying the step
// flags with the data is this implementation's choice.
module pa2d_pipe_pe #(
  parameter int unsigned W  = 16,
  parameter int unsigned DW = 29
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en_in,
  input  logic          first_in,
  input  logic          last_in,
  input  logic [W-1:0]  x_in,
  input  logic [W-1:0]  y_in,
  output logic          en_out,
  output logic          first_out,
  output logic          last_out,
  output logic [W-1:0]  x_out,
  output logic [W-1:0]  y_out,
  output logic [DW-1:0] d,
  output logic          dv
);
  logic [W-1:0] ad;
  assign ad = (x_in >= y_in) ? (x_in - y_in) : (y_in - x_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      en_out <= 1'b0; first_out <= 1'b0; last_out <= 1'b0;
      x_out <= '0; y_out <= '0; d <= '0; dv <= 1'b0;
    end else begin
      en_out    <= en_in;
      first_out <= first_in;
      last_out  <= last_in;
      x_out     <= x_in;
      y_out     <= y_in;
      dv        <= en_in && last_in;
      if (en_in) d <= (first_in ? '0 : d) + DW'(ad);
    end
  end
endmodule
