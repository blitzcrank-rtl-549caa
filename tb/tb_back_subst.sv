// tb_back_subst: random well-conditioned upper-triangular R_ii, random R_ij,
// x_j and a chosen solution x_i; d is formed as R_ii*x_i + R_ij*x_j and the
// unit must recover x_i. Also checks a singular pivot (x = 0 there).
module tb_back_subst;
  import blitz_pkg::*;
  localparam int DOF = 2, S = 2 * DOF;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fix_t r_ii [S][S], r_ij [S][S], d [S], x_j [S], x_i [S];
  real xe [S];
  int checks = 0, failures = 0;

  back_subst #(.DOF(DOF)) dut (.*);
  always #5 clk = ~clk;

  function automatic fix_t fr(real x); return fix_t'($rtoi(x * 65536.0)); endfunction
  function automatic real rf(fix_t x); return real'(x) / 65536.0; endfunction
  function automatic real rnd(); return real'($urandom_range(0, 8000)) / 1000.0 - 4.0; endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int r = 0; r < S; r++) begin
        xe[r] = rf(fr(rnd()));
        x_j[r] = fr(rnd());
        for (int c = 0; c < S; c++) begin
          r_ij[r][c] = fr(rnd());
          r_ii[r][c] = (c < r) ? '0 : (c == r) ? fr((t % 2 ? -1.0 : 1.0) * (2.0 + rnd() / 4.0)) : fr(rnd());
        end
      end
      for (int r = 0; r < S; r++) begin
        real acc;
        acc = 0.0;
        for (int c = 0; c < S; c++) acc += rf(r_ii[r][c]) * xe[c] + rf(r_ij[r][c]) * rf(x_j[c]);
        d[r] = fr(acc);
      end
      if (t == 5) begin r_ii[0][0] = '0; xe[0] = 0.0; end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int r = 0; r < S; r++) begin
        checks++;
        if (rf(x_i[r]) - xe[r] > 5e-3 || xe[r] - rf(x_i[r]) > 5e-3) begin
          failures++; $display("t %0d x[%0d] got %f exp %f", t, r, rf(x_i[r]), xe[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
