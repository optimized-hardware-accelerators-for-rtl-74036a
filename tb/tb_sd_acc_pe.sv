// tb_sd_acc_pe -- self-checking test of the accumulating PE: random
// operands, random 'first' and enable, compared every clock with a running
// sum of |x - y| kept here.
module tb_sd_acc_pe;
  localparam int W = 8, DW = 12;
  logic clk = 0, rst_n = 0;
  logic en, first; logic [W-1:0] x, y; logic [DW-1:0] d;
  int checks = 0, failures = 0, model = 0;

  sd_acc_pe #(.W(W), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; first = 0; x = 0; y = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0; first = ($urandom % 12) == 0; x = W'($urandom); y = W'($urandom);
      if (en) model = (first ? 0 : model) + ((x > y) ? int'(x) - int'(y) : int'(y) - int'(x));
      model = model % (1 << DW);
      @(posedge clk); #1;
      checks++;
      if (int'(d) != model) begin failures++; $display("t=%0d d=%0d exp %0d", t, d, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
