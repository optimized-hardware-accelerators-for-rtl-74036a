// sd_acc_pe -- accumulating processing element for Manhattan distances.
//
// Each enabled clock adds |x - y| to the local distance register d, so after
// M enabled cycles d holds D(k,n) = sum_m |X(m,n) - Y(k,m)|. 'first' marks
// the first term of a new distance: the register is loaded with |x - y|
// rather than added to, so distances can follow each other with no idle
// cycle. d is valid from the clock edge that takes the last term. The
// subtract / absolute value / add / register structure is the processing
// element of the design (used by the 2-D Design #3, linear Designs #1 and #5
// and the scalable array); the 'first' input and reset are this
// implementation's choice for clearing the sum.
module sd_acc_pe #(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          first,
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  y,
  output logic [DW-1:0] d
);
  logic [W-1:0] ad;
  assign ad = (x >= y) ? (x - y) : (y - x);

  always_ff @(posedge clk) begin
    if (!rst_n)     d <= '0;
    else if (en)    d <= (first ? '0 : d) + DW'(ad);
  end
endmodule
