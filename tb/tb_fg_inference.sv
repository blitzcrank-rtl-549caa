// tb_fg_inference: builds a random chain factor graph (random prior factor
// Jacobians and errors, random collision rows, start and goal priors),
// runs the two-sided elimination and back substitution, and compares delta
// with the least-squares solution of the full stacked system, obtained in
// real arithmetic from the normal equations. It also checks that the two
// sides really ran in parallel for N/2 - 1 steps.
module tb_fg_inference;
  import blitz_pkg::*;
  localparam int DOF = 2, S = 2 * DOF, N = 6, MAX_R = 24, MAX_C = 2 * S + 1;
  localparam int NV = N * S, NR = 2 * S + (N - 1) * S + N;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fix_t prior_j1 [N-1][S][S], prior_j2 [N-1][S][S], prior_b [N-1][S];
  fix_t coll_j [N][S], coll_b [N], sp_w, sp_b [S], gp_b [S];
  fix_t delta [N][S];
  logic [15:0] par_steps;
  real A [NR][NV];
  real bb [NR];
  real M [NV][NV+1];
  int checks = 0, failures = 0;

  fg_inference #(.DOF(DOF), .N(N), .NU(2), .MAX_R(MAX_R), .MAX_C(MAX_C)) dut (.*);
  always #5 clk = ~clk;

  function automatic fix_t fr(real x); return fix_t'($rtoi(x * 65536.0)); endfunction
  function automatic real rf(fix_t x); return real'(x) / 65536.0; endfunction
  function automatic real rnd(real m); return m * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0); endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int row;
    for (int r = 0; r < NR; r++) begin bb[r] = 0.0; for (int c = 0; c < NV; c++) A[r][c] = 0.0; end
    sp_w = fr(5.0);
    row = 0;
    for (int r = 0; r < S; r++) begin
      sp_b[r] = fr(rnd(1.0)); gp_b[r] = fr(rnd(1.0));
      A[row][r] = 5.0;              bb[row] = rf(sp_b[r]); row++;
      A[row][(N-1)*S + r] = 5.0;    bb[row] = rf(gp_b[r]); row++;
    end
    for (int p = 0; p < N - 1; p++) for (int r = 0; r < S; r++) begin
      for (int c = 0; c < S; c++) begin
        prior_j1[p][r][c] = fr((r == c) ? 2.0 + rnd(0.5) : rnd(0.5));
        prior_j2[p][r][c] = fr((r == c) ? -2.0 + rnd(0.5) : rnd(0.5));
        A[row][p*S + c]     = rf(prior_j1[p][r][c]);
        A[row][(p+1)*S + c] = rf(prior_j2[p][r][c]);
      end
      prior_b[p][r] = fr(rnd(2.0));
      bb[row] = rf(prior_b[p][r]);
      row++;
    end
    for (int v = 0; v < N; v++) begin
      for (int c = 0; c < S; c++) begin
        coll_j[v][c] = (c < 2) ? fr(rnd(1.5)) : '0;
        A[row][v*S + c] = rf(coll_j[v][c]);
      end
      coll_b[v] = fr(rnd(1.0));
      bb[row] = rf(coll_b[v]);
      row++;
    end
    // reference: normal equations solved by Gauss-Jordan elimination
    for (int i = 0; i < NV; i++) begin
      for (int j = 0; j < NV; j++) begin
        M[i][j] = 0.0;
        for (int r = 0; r < NR; r++) M[i][j] += A[r][i] * A[r][j];
      end
      M[i][NV] = 0.0;
      for (int r = 0; r < NR; r++) M[i][NV] += A[r][i] * bb[r];
    end
    for (int i = 0; i < NV; i++) begin
      real pv;
      pv = M[i][i];
      for (int j = 0; j <= NV; j++) M[i][j] /= pv;
      for (int k = 0; k < NV; k++) if (k != i) begin
        real f;
        f = M[k][i];
        for (int j = 0; j <= NV; j++) M[k][j] -= f * M[i][j];
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int v = 0; v < N; v++) for (int r = 0; r < S; r++) begin
      real g, e;
      g = rf(delta[v][r]); e = M[v*S + r][NV];
      checks++;
      if (g - e > 0.01 || e - g > 0.01) begin
        failures++; $display("delta[%0d][%0d] got %f exp %f", v, r, g, e);
      end
    end
    checks++;
    if (par_steps != 16'(N / 2 - 1)) begin failures++; $display("par_steps %0d", par_steps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
