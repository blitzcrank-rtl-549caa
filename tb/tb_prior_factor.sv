// tb_prior_factor: random state pairs through the prior factor pipeline,
// three in consecutive cycles; checks b = -L*(Phi*theta_a - theta_b) and the
// Jacobians L*Phi and -L element by element in real arithmetic, and the
// two-cycle latency.
module tb_prior_factor;
  import blitz_pkg::*;
  localparam int DOF = 3, S = 2 * DOF;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  fix_t theta_a [S], theta_b [S], dt, l [2][2];
  fix_t j1 [S][S], j2 [S][S], b [S];
  real ta [3][S], tb [3][S];
  int checks = 0, failures = 0, nout = 0, cyc = 0, first_out = -1, in_cyc = 0;

  prior_factor #(.DOF(DOF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rf(fix_t x); return real'(x) / 65536.0; endfunction
  function automatic fix_t fr(real x); return fix_t'($rtoi(x * 65536.0)); endfunction
  function automatic real rnd(); return real'($urandom_range(0, 20000)) / 1000.0 - 10.0; endfunction
  task automatic chk(real g, real e);
    checks++;
    if (g - e > 2e-3 || e - g > 2e-3) begin failures++; $display("got %f exp %f", g, e); end
  endtask

  // checker: the t-th result must appear two cycles after the t-th input
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int t;
      real L [2][2];
      t = nout;
      nout++;
      for (int p = 0; p < 2; p++) for (int q = 0; q < 2; q++) L[p][q] = rf(l[p][q]);
      if (first_out < 0) first_out = cyc;
      for (int d = 0; d < DOF; d++) begin
        real eq, ev;
        eq = ta[t][d] + 0.25 * ta[t][DOF+d] - tb[t][d];
        ev = ta[t][DOF+d] - tb[t][DOF+d];
        chk(rf(b[d]),     -(L[0][0] * eq + L[0][1] * ev));
        chk(rf(b[DOF+d]), -(L[1][0] * eq + L[1][1] * ev));
        chk(rf(j1[d][DOF+d]), L[0][0] * 0.25 + L[0][1]);
        chk(rf(j1[DOF+d][DOF+d]), L[1][0] * 0.25 + L[1][1]);
        chk(rf(j2[d][d]), -L[0][0]);
        chk(rf(j2[d][DOF+d]), -L[0][1]);
        chk(rf(j1[d][(d + 1) % DOF]), 0.0);
      end
    end
  end

  initial begin
    dt = fr(0.25);
    l[0][0] = fr(3.0); l[0][1] = fr(-0.5); l[1][0] = fr(0.0); l[1][1] = fr(1.5);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      for (int i = 0; i < S; i++) begin
        ta[t][i] = rf(fr(rnd())); tb[t][i] = rf(fr(rnd()));
        theta_a[i] = fr(ta[t][i]); theta_b[i] = fr(tb[t][i]);
      end
      in_valid = 1;
      if (t == 0) in_cyc = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nout != 3) begin failures++; $display("outputs %0d", nout); end
    checks++;
    if (first_out - in_cyc != 2) begin failures++; $display("latency %0d", first_out - in_cyc); end
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
