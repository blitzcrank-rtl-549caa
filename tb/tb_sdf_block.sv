// tb_sdf_block: builds a random occupancy grid with a few rectangular
// obstacles, runs the SDF engine and compares every cell of S with a
// brute-force signed Euclidean distance transform, then checks the 2x2
// window read port at the map border.
module tb_sdf_block;
  import blitz_pkg::*;
  localparam int MW = 16, MH = 12;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] thr = 8'd127;
  logic [$clog2(MH)-1:0] g_row_addr;
  logic [7:0] g_row [MW];
  logic [$clog2(MW)-1:0] win_x;
  logic [$clog2(MH)-1:0] win_y;
  fix_t win [4];
  logic [7:0] g [MH][MW];
  int checks = 0, failures = 0;

  sdf_block #(.MAP_W(MW), .MAP_H(MH), .NR(3), .NC(2)) dut (.*);
  always #5 clk = ~clk;
  always_comb for (int c = 0; c < MW; c++) g_row[c] = g[g_row_addr][c];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit occ(int r, int c);
    return g[r][c] > thr;
  endfunction

  function automatic real ref_s(int r, int c);
    int best = 1 << 30;
    bit me = occ(r, c);
    for (int rr = 0; rr < MH; rr++) for (int cc = 0; cc < MW; cc++)
      if (occ(rr, cc) != me) begin
        int d = (rr - r) * (rr - r) + (cc - c) * (cc - c);
        if (d < best) best = d;
      end
    return me ? -$sqrt(real'(best)) : $sqrt(real'(best));
  endfunction

  initial begin
    for (int r = 0; r < MH; r++) for (int c = 0; c < MW; c++) g[r][c] = 8'($urandom_range(0, 100));
    for (int r = 3; r < 6; r++) for (int c = 4; c < 9; c++) g[r][c] = 8'd200;
    for (int r = 8; r < 12; r++) for (int c = 12; c < 14; c++) g[r][c] = 8'd180;
    g[0][15] = 8'd255;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int r = 0; r < MH; r++) for (int c = 0; c < MW; c++) begin
      real gv, ev;
      gv = real'(dut.s[r][c]) / 65536.0;
      ev = ref_s(r, c);
      checks++;
      if (gv > ev + 1e-3 || gv < ev - 1e-3) begin
        failures++;
        $display("S[%0d][%0d] got %f exp %f", r, c, gv, ev);
      end
    end
    win_x = 4'(MW - 1); win_y = 4'(MH - 1);
    #1;
    checks++;
    if (win[1] != dut.s[MH-1][MW-1] || win[3] != dut.s[MH-1][MW-1]) failures++;
    win_x = 4'd3; win_y = 4'd2;
    #1;
    checks++;
    if (win[0] != dut.s[2][3] || win[1] != dut.s[2][4] || win[2] != dut.s[3][3] || win[3] != dut.s[3][4]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
