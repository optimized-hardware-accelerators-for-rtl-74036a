// tb_lin_design3 -- self-checking test of the M-PE array with adder tree
// (Design #3). Uses M = 6, so the tree has padded leaves, and feeds a new
// random (X sample, Y sample) pair every clock, with gaps; every distance
// must appear, correct, exactly one clock after its inputs (one distance
// per clock).
module tb_lin_design3;
  localparam int M = 6, W = 8, DW = W + 3;
  logic clk = 0, rst_n = 0;
  logic in_valid; logic [M-1:0][W-1:0] x, y; logic d_valid; logic [DW-1:0] d;
  int checks = 0, failures = 0;

  lin_design3 #(.M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; x = '0; y = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int exp; bit v;
      @(negedge clk);
      v = ($urandom % 6) != 0; in_valid = v; exp = 0;
      for (int m = 0; m < M; m++) begin
        x[m] = W'($urandom); y[m] = W'($urandom);
        exp += (x[m] > y[m]) ? int'(x[m]) - int'(y[m]) : int'(y[m]) - int'(x[m]);
      end
      @(posedge clk); #1;
      checks++;
      if (d_valid !== v || (v && int'(d) != exp)) begin failures++; $display("t=%0d got %0d/%0d exp %0d/%0d", t, d_valid, d, v, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
