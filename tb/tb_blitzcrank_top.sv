// tb_blitzcrank_top: end-to-end planning run of the accelerator at its
// default size (64x64 map, 20 states of a 3-DOF planar point robot).
//
// A disc-shaped obstacle sits across the straight line from start to goal.
// The host loads the map and the straight-line, constant-velocity initial
// trajectory, starts the accelerator and waits. The testbench then checks,
// independently of the design, that every state of the final trajectory is
// clear of the obstacle by more than the robot radius (brute-force distance
// to the occupied cells), that start and goal were kept, and that the
// design's mechanisms were exercised: the SDF pass, active and inactive
// hinge losses, two-sided (parallel) elimination, reuse of the QR Update
// units over several passes, overlap of Evaluate and Update, FIFO
// back-pressure in the Update chain and more than one Gauss-Newton
// iteration. A second run with a zero tolerance must stop at the
// iteration limit without reporting convergence.
module tb_blitzcrank_top;
  import blitz_pkg::*;
  localparam int DOF = 3, S = 2 * DOF, N = 20, MW = 64, MH = 64;
  localparam real CX = 32.0, CY = 34.0, RAD = 8.0;
  logic clk = 0, rst_n = 0;
  logic map_we = 0, st_we = 0, start = 0;
  logic [5:0] map_x, map_y;
  logic [7:0] map_data, occ_thr;
  logic [4:0] st_idx;
  logic [2:0] st_comp;
  fix_t st_data, dt, prior_l [2][2], eps, coll_w, sp_w, tol;
  logic busy, done, converged;
  logic [7:0] iters;
  fix_t theta [N][S];
  logic [15:0] hinge_count, par_steps;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int ev_overlap = 0, stalls = 0, passes2 = 0, sdf_cycles = 0;

  blitzcrank_top dut (.*);
  always #5 clk = ~clk;

  function automatic fix_t fr(real x); return fix_t'($rtoi(x * 65536.0)); endfunction
  function automatic real rf(fix_t x); return real'(x) / 65536.0; endfunction
  function automatic bit occupied(int x, int y);
    return (real'(x) - CX) ** 2 + (real'(y) - CY) ** 2 <= RAD * RAD;
  endfunction

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // activity monitors
  always @(posedge clk) begin
    cyc++;
    if (dut.u_sdf.busy) sdf_cycles++;
    if (dut.u_fg.g_qr[0].u_qr.u_eval.busy &&
        (dut.u_fg.g_qr[0].u_qr.f_iv[1] || dut.u_fg.g_qr[0].u_qr.f_iv[2])) ev_overlap++;
    if (dut.u_fg.g_qr[0].u_qr.f_iv[1] && !dut.u_fg.g_qr[0].u_qr.f_ir[1]) stalls++;
    if (dut.u_fg.g_qr[0].u_qr.st != 0 && dut.u_fg.g_qr[0].u_qr.k0 != 0) passes2++;
  end

  initial begin
    real sx = 6.0, sy = 30.0, gx = 58.0, gy = 30.0, T;
    longint t0;
    T = real'(N - 1);
    occ_thr = 8'd127;
    dt = fr(1.0);
    // Qc = 1, dt = 1: Q^-1 = [[12, -6], [-6, 4]] = L^T L
    prior_l[0][0] = fr(3.4641016); prior_l[0][1] = fr(-1.7320508);
    prior_l[1][0] = fr(0.0);       prior_l[1][1] = fr(1.0);
    eps = fr(6.0);     // safety distance 5 cells + robot radius 1 cell
    coll_w = fr(1.0);
    sp_w = fr(100.0);
    tol = fr(0.02);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the map
    for (int y = 0; y < MH; y++) for (int x = 0; x < MW; x++) begin
      @(negedge clk);
      map_we = 1; map_x = 6'(x); map_y = 6'(y);
      map_data = occupied(x, y) ? 8'd220 : 8'(($urandom_range(0, 60)));
    end
    @(negedge clk); map_we = 0;
    // straight-line, constant-velocity initial trajectory
    for (int i = 0; i < N; i++) for (int c = 0; c < S; c++) begin
      real val;
      case (c)
        0: val = sx + (gx - sx) * real'(i) / T;
        1: val = sy + (gy - sy) * real'(i) / T;
        3: val = (gx - sx) / T;
        4: val = (gy - sy) / T;
        default: val = 0.0;
      endcase
      @(negedge clk);
      st_we = 1; st_idx = 5'(i); st_comp = 3'(c); st_data = fr(val);
    end
    @(negedge clk); st_we = 0;
    start = 1; @(negedge clk); start = 0;
    t0 = cyc;
    while (!done) @(negedge clk);
    $display("run: %0d cycles, %0d iterations, converged=%0d, SDF %0d cycles", cyc - t0, iters, converged, sdf_cycles);

    // every state clear of the obstacle by more than the robot radius
    for (int i = 0; i < N; i++) begin
      real best, px, py;
      best = 1e9;
      px = rf(theta[i][0]); py = rf(theta[i][1]);
      for (int y = 0; y < MH; y++) for (int x = 0; x < MW; x++)
        if (occupied(x, y)) begin
          real d;
          d = $sqrt((px - x) ** 2 + (py - y) ** 2);
          if (d < best) best = d;
        end
      $display("state %2d: (%7.3f, %7.3f) clearance %6.3f", i, px, py, best);
      checks++;
      if (best <= 1.0) begin failures++; $display("  collision at state %0d", i); end
    end
    checks++;
    if (rf(theta[0][0]) - sx > 0.1 || sx - rf(theta[0][0]) > 0.1 ||
        rf(theta[N-1][0]) - gx > 0.1 || gx - rf(theta[N-1][0]) > 0.1) begin
      failures++; $display("start/goal moved");
    end
    // mechanisms
    checks++; if (sdf_cycles == 0) begin failures++; $display("SDF never ran"); end
    checks++; if (hinge_count == 0) begin failures++; $display("hinge never active"); end
    checks++; if (int'(hinge_count) >= int'(iters) * N) begin failures++; $display("hinge never inactive"); end
    checks++; if (par_steps != 16'(N / 2 - 1)) begin failures++; $display("par_steps %0d", par_steps); end
    checks++; if (passes2 == 0) begin failures++; $display("Update units never reused"); end
    checks++; if (ev_overlap == 0) begin failures++; $display("Evaluate never overlapped Update"); end
    checks++; if (stalls == 0) begin failures++; $display("no back-pressure"); end
    checks++; if (iters < 2) begin failures++; $display("only %0d iteration", iters); end
    checks++; if (!converged) begin failures++; $display("did not converge"); end
    // second run with an unreachable tolerance: must stop at the iteration limit
    tol = '0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (converged || iters != 8'd10) begin failures++; $display("limit run: iters %0d converged %0d", iters, converged); end
    $display("hinge=%0d par=%0d passes2=%0d overlap=%0d stalls=%0d", hinge_count, par_steps, passes2, ev_overlap, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
