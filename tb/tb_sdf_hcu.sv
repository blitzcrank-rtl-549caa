// tb_sdf_hcu: feeds random row-distance columns to the H unit and compares
// each output with sqrt(min_j(K[j]^2 + (i-j)^2)) computed in real numbers.
module tb_sdf_hcu;
  import blitz_pkg::*;
  localparam int H = 12, D_W = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done, out_valid;
  logic [D_W-1:0] kcol [H];
  logic [$clog2(H)-1:0] out_row;
  fix_t out_dist;
  int checks = 0, failures = 0, got = 0;

  sdf_hcu #(.H(H), .D_W(D_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_h(int i);
    int best = 1 << 30;
    for (int j = 0; j < H; j++) begin
      int d = int'(kcol[j]) * int'(kcol[j]) + (i - j) * (i - j);
      if (d < best) best = d;
    end
    return $sqrt(real'(best));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    real e, g;
    e = ref_h(int'(out_row));
    g = real'(out_dist) / 65536.0;
    checks++;
    got++;
    if (g > e + 1e-3 || g < e - 1e-3) begin
      failures++;
      $display("row %0d got %f exp %f", out_row, g, e);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int j = 0; j < H; j++) kcol[j] = (t == 0) ? D_W'(j % 3) : D_W'($urandom_range(0, 9));
      if (t == 5) for (int j = 0; j < H; j++) kcol[j] = (j == 4) ? 8'd0 : 8'd255;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      repeat (2) @(negedge clk);
    end
    checks++;
    if (got != 6 * H) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
