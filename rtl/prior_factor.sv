// prior_factor: constant velocity prior factor block.
//
// For two adjacent states theta_a, theta_b (each [q(0..DOF-1), qdot(0..DOF-1)])
// it forms the whitened linearised factor of
//   e = Phi(dt) * theta_a - theta_b,  Phi = [[I, dt*I], [0, I]],
// i.e. the block row [J1 J2 | b] with J1 = L*Phi, J2 = -L and b = -L*e.
// L is the 2x2 whitening matrix (a square root of the inverse of the
// per-joint GP covariance Q) applied to every joint's (position, velocity)
// pair; the host supplies it, together with dt, as configuration.
//
// Timing: two pipeline stages (error, then whitening); one factor per cycle
// may enter with in_valid and leaves two cycles later with out_valid.
// The factor definition follows the original BLITZCRANK design; taking L as an
// input rather than computing it from Q on chip is this design's choice.
module prior_factor
  import blitz_pkg::*;
#(
  parameter int DOF = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fix_t theta_a [2*DOF],
  input  fix_t theta_b [2*DOF],
  input  fix_t dt,
  input  fix_t l [2][2],
  output logic out_valid,
  output fix_t j1 [2*DOF][2*DOF],
  output fix_t j2 [2*DOF][2*DOF],
  output fix_t b  [2*DOF]
);
  localparam int S = 2 * DOF;

  logic v1;
  fix_t eq [DOF];
  fix_t ev [DOF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; out_valid <= 1'b0;
      for (int d = 0; d < DOF; d++) begin eq[d] <= '0; ev[d] <= '0; end
      for (int r = 0; r < S; r++) begin
        b[r] <= '0;
        for (int c = 0; c < S; c++) begin j1[r][c] <= '0; j2[r][c] <= '0; end
      end
    end else begin
      // stage 1: error of the constant velocity model
      v1 <= in_valid;
      for (int d = 0; d < DOF; d++) begin
        eq[d] <= theta_a[d] + fmul(dt, theta_a[DOF+d]) - theta_b[d];
        ev[d] <= theta_a[DOF+d] - theta_b[DOF+d];
      end
      // stage 2: whitening and Jacobians
      out_valid <= v1;
      for (int r = 0; r < S; r++)
        for (int c = 0; c < S; c++) begin j1[r][c] <= '0; j2[r][c] <= '0; end
      for (int d = 0; d < DOF; d++) begin
        b[d]     <= -(fmul(l[0][0], eq[d]) + fmul(l[0][1], ev[d]));
        b[DOF+d] <= -(fmul(l[1][0], eq[d]) + fmul(l[1][1], ev[d]));
        j1[d][d]           <= l[0][0];
        j1[d][DOF+d]       <= fmul(l[0][0], dt) + l[0][1];
        j1[DOF+d][d]       <= l[1][0];
        j1[DOF+d][DOF+d]   <= fmul(l[1][0], dt) + l[1][1];
        j2[d][d]           <= -l[0][0];
        j2[d][DOF+d]       <= -l[0][1];
        j2[DOF+d][d]       <= -l[1][0];
        j2[DOF+d][DOF+d]   <= -l[1][1];
      end
    end
  end
endmodule
