// tb_pa2d_d1_pe -- self-checking test of PE(k,m) of 2-D Design #1: loads a
// stored Y value, then checks d_out = d_in + |x - Y| one clock after each
// random input, reloading Y now and then.
module tb_pa2d_d1_pe;
  localparam int W = 16, DW = 23;
  logic clk = 0, rst_n = 0;
  logic y_we; logic [W-1:0] y_in, x; logic [DW-1:0] d_in, d_out;
  int checks = 0, failures = 0, yv = 0;

  pa2d_d1_pe #(.W(W), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    y_we = 0; y_in = 0; x = 0; d_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); y_we = 1; y_in = 16'd1234; yv = 1234;
    @(negedge clk); y_we = 0;
    for (int t = 0; t < 800; t++) begin
      int exp;
      @(negedge clk);
      x = W'($urandom); d_in = DW'($urandom % 4000000);
      exp = int'(d_in) + ((int'(x) > yv) ? int'(x) - yv : yv - int'(x));
      if (t % 97 == 50) begin y_we = 1; y_in = W'($urandom); end else y_we = 0;
      @(posedge clk); #1;
      checks++;
      if (int'(d_out) != exp) begin failures++; $display("t=%0d got %0d exp %0d", t, d_out, exp); end
      if (y_we) yv = int'(y_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
