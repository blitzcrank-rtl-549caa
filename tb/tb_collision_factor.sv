// tb_collision_factor: uses an analytic SDF table d(x,y) = 0.5*x - 0.25*y + 1
// (exactly reproduced by bilinear interpolation) and checks the window
// address, the hinge loss and its Jacobian for positions inside and outside
// the safety distance, and at the map border where the position is clamped.
module tb_collision_factor;
  import blitz_pkg::*;
  localparam int DOF = 3, S = 2 * DOF, MW = 8, MH = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  fix_t theta [S], eps, w, win [4], j [S], b;
  logic [2:0] win_x, win_y;
  int checks = 0, failures = 0;

  collision_factor #(.DOF(DOF), .MAP_W(MW), .MAP_H(MH)) dut (.*);
  always #5 clk = ~clk;

  function automatic real sdf(int x, int y); return 0.5 * x - 0.25 * y + 1.0; endfunction
  function automatic fix_t fr(real x); return fix_t'($rtoi(x * 65536.0)); endfunction
  function automatic real rf(fix_t x); return real'(x) / 65536.0; endfunction
  always_comb begin
    win[0] = fr(sdf(win_x, win_y));     win[1] = fr(sdf(win_x + 1, win_y));
    win[2] = fr(sdf(win_x, win_y + 1)); win[3] = fr(sdf(win_x + 1, win_y + 1));
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(real g, real e);
    checks++;
    if (g - e > 2e-3 || e - g > 2e-3) begin failures++; $display("got %f exp %f", g, e); end
  endtask

  task automatic run(real x, real y, real ex, real ey);
    real d, h;
    @(negedge clk);
    for (int i = 0; i < S; i++) theta[i] = '0;
    theta[0] = fr(x); theta[1] = fr(y);
    in_valid = 1;
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    checks++;
    if (!out_valid) failures++;
    d = 0.5 * ex - 0.25 * ey + 1.0;
    h = (d < 2.0) ? 2.0 - d : 0.0;
    chk(rf(b), -4.0 * h);
    chk(rf(j[0]), (d < 2.0) ? -4.0 * 0.5 : 0.0);
    chk(rf(j[1]), (d < 2.0) ? 4.0 * 0.25 : 0.0);
    chk(rf(j[2]), 0.0);
  endtask

  initial begin
    eps = fr(2.0); w = fr(4.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1.25, 2.5, 1.25, 2.5);     // inside the safety distance
    run(5.5, 1.0, 5.5, 1.0);       // far away: no cost
    run(0.75, 6.25, 0.75, 6.25);
    run(-3.0, 9.5, 0.0, 7.0);      // clamped to the map
    checks++;
    if (win_x != 3'd0 || win_y != 3'd6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
