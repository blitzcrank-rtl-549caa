// tb_qr_decomp: loads random matrices into the QR block, runs a partial
// decomposition and compares the whole matrix with a Householder QR done in
// real arithmetic with the same sign convention (alpha = -sign(x_k)*||x||).
// Cases cover n_elim below, equal to and above the number of Update units
// (so the units are reused over several passes), and a column that is
// already zero below the diagonal.
module tb_qr_decomp;
  import blitz_pkg::*;
  localparam int NU = 2, MAX_R = 16, MAX_C = 9;
  logic clk = 0, rst_n = 0, start = 0, busy, done, ld_we = 0;
  logic [7:0] n_rows, n_cols, n_elim, ld_row, ld_col, rd_row, rd_col;
  fix_t ld_data, rd_data;
  real a [MAX_R][MAX_C];
  int checks = 0, failures = 0;

  qr_decomp #(.NU(NU), .MAX_R(MAX_R), .MAX_C(MAX_C)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_qr(int R, int C, int E);
    for (int k = 0; k < E; k++) begin
      real nrm = 0.0, al, tau, dot;
      real v [MAX_R];
      for (int i = k; i < R; i++) nrm += a[i][k] * a[i][k];
      nrm = $sqrt(nrm);
      if (nrm == 0.0) continue;
      al  = (a[k][k] >= 0.0) ? -nrm : nrm;
      tau = 1.0 / (nrm * (nrm + ((a[k][k] >= 0.0) ? a[k][k] : -a[k][k])));
      for (int i = 0; i < R; i++) v[i] = (i < k) ? 0.0 : a[i][k];
      v[k] = a[k][k] - al;
      for (int j = k; j < C; j++) begin
        dot = 0.0;
        for (int i = k; i < R; i++) dot += v[i] * a[i][j];
        for (int i = k; i < R; i++) a[i][j] -= tau * v[i] * dot;
      end
    end
  endtask

  task automatic run_case(int R, int C, int E, bit zero_col);
    @(negedge clk);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      fix_t val = fix_t'($signed($urandom_range(0, 8 * 65536)) - 4 * 65536);
      if (zero_col && c == 0 && r > 0) val = '0;
      a[r][c] = real'(val) / 65536.0;
      ld_we = 1; ld_row = 8'(r); ld_col = 8'(c); ld_data = val;
      @(negedge clk);
    end
    ld_we = 0;
    n_rows = 8'(R); n_cols = 8'(C); n_elim = 8'(E);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    ref_qr(R, C, E);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      real g;
      rd_row = 8'(r); rd_col = 8'(c); #1;
      g = real'(rd_data) / 65536.0;
      checks++;
      if (g - a[r][c] > 0.02 || a[r][c] - g > 0.02) begin
        failures++;
        $display("R=%0d C=%0d E=%0d [%0d][%0d] got %f exp %f", R, C, E, r, c, g, a[r][c]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_case(5, 4, 1, 0);
    run_case(8, 5, 2, 0);
    run_case(13, 7, 6, 0);
    run_case(16, 9, 8, 1);
    run_case(7, 7, 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
