// tb_sdf_kcu: checks the row distance unit against a brute-force search over
// random rows (including all-ones rows, which must give INF) and checks the
// 2*W+1 cycle latency.
module tb_sdf_kcu;
  localparam int W = 20, D_W = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] row;
  logic [D_W-1:0] k [W];
  int checks = 0, failures = 0;

  sdf_kcu #(.W(W), .D_W(D_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_dist(logic [W-1:0] r, int i);
    int best = 255;
    for (int j = 0; j < W; j++) if (!r[j]) begin
      int d = (i > j) ? i - j : j - i;
      if (d < best) best = d;
    end
    return best;
  endfunction

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      if (t == 0) row = '1;
      else if (t == 1) row = '0;
      else row = W'($urandom) | W'($urandom);   // mostly ones
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 2 * W + 1) begin failures++; $display("latency %0d", cyc); end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (int'(k[i]) != ref_dist(row, i)) begin
          failures++;
          $display("row %h cell %0d got %0d exp %0d", row, i, k[i], ref_dist(row, i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
