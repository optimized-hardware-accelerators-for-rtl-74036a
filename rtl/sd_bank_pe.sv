// sd_bank_pe -- accumulating distance PE with a bank of R partial sums
// (linear Designs #2 and #6).
//
// When the schedule visits the points of one output element in an order
// where other output elements come in between, a PE has to keep R partial
// distances at once. On every clock with en high it reads entry idx, adds
// |x - y| (or starts from zero when first is high), writes the sum back and
// also registers it on d, so d holds the updated partial sum of entry idx
// one clock later; on the final feature that is the finished distance.
// The bank is a plain array with asynchronous read. The bank of R registers
// per PE is the design's; the read-modify-write arrangement is this
// implementation's choice.
module sd_bank_pe #(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = 12,
  parameter int unsigned R  = 4096,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          first,
  input  logic [RW-1:0] idx,
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  y,
  output logic [DW-1:0] d
);
  logic [DW-1:0] bank [R];
  logic [W-1:0]  ad;
  logic [DW-1:0] sum;
  assign ad  = (x >= y) ? (x - y) : (y - x);
  assign sum = (first ? '0 : bank[idx]) + DW'(ad);

  always_ff @(posedge clk) begin
    if (en) bank[idx] <= sum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= sum;
  end
endmodule
