// sd_absdiff_pe -- combinational absolute-difference element.
//
// Output a = |x - y|, with no register: the processing element of the
// linear array Design #3, whose M outputs are summed by an adder tree in the
// same clock. Purely combinational; the structure follows the design.
module sd_absdiff_pe #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] a
);
  assign a = (x >= y) ? (x - y) : (y - x);
endmodule
