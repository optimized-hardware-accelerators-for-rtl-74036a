// tb_km_dist_calc -- self-checking test of the K-means distance stage.
// Streams random elements and centroids every clock (with random valid
// gaps) and compares every registered output, one cycle later, against
// |e - c_j| computed here.
module tb_km_dist_calc;
  localparam int K = 8, DW = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid; logic [DW-1:0] e; logic [2:0] src; logic [K-1:0][DW-1:0] c;
  logic out_valid; logic [DW-1:0] out_e; logic [2:0] out_src; logic [K-1:0][DW-1:0] dists;
  int checks = 0, failures = 0;

  km_dist_calc #(.K(K), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [DW-1:0] pe; logic [2:0] ps; logic pv; logic [K-1:0][DW-1:0] pc;
    in_valid = 0; e = 0; src = 0; c = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0; e = DW'($urandom); src = 3'($urandom);
      for (int j = 0; j < K; j++) c[j] = DW'($urandom);
      pv = in_valid; pe = e; ps = src; pc = c;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== pv || (pv && (out_e !== pe || out_src !== ps))) begin
        failures++; $display("ctrl mismatch t=%0d", t);
      end
      for (int j = 0; j < K; j++) begin
        int exp; exp = (int'(pe) > int'(pc[j])) ? int'(pe) - int'(pc[j]) : int'(pc[j]) - int'(pe);
        checks++;
        if (int'(dists[j]) != exp) begin failures++; $display("dist mismatch j=%0d got %0d exp %0d", j, dists[j], exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
