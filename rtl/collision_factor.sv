// collision_factor: collision-free likelihood factor block.
//
// For one state it evaluates the hinge loss of the signed distance at the
// robot's position and its Jacobian:
//   h = eps - d(x)  if d(x) < eps, else 0,      dh/dx = -grad d(x),
// whitened by the weight w (the inverse standard deviation of the factor),
// giving one block row [J | b] with J = w*dh/dtheta and b = -w*h. The robot
// is a point robot with one sphere whose centre is the first two
// configuration coordinates (x, y) in map cells; eps is the safety distance
// plus the sphere radius. d and its gradient come from bilinear
// interpolation of the SDF over the 2x2 cell window around x, read from the
// SDF block through (win_x, win_y) -> win.
//
// Timing: two pipeline stages (address, then interpolation), one state per
// cycle. The hinge loss and factor form follow the original BLITZCRANK design; the
// point-robot kinematics and the bilinear interpolation are this design's
// choices, since the original leaves the forward kinematics open.
module collision_factor
  import blitz_pkg::*;
#(
  parameter int DOF   = 3,
  parameter int MAP_W = 64,
  parameter int MAP_H = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fix_t theta [2*DOF],
  input  fix_t eps,
  input  fix_t w,
  output logic [$clog2(MAP_W)-1:0] win_x,
  output logic [$clog2(MAP_H)-1:0] win_y,
  input  fix_t win [4],
  output logic out_valid,
  output fix_t j [2*DOF],
  output fix_t b
);
  localparam int S  = 2 * DOF;
  localparam int XW = $clog2(MAP_W);
  localparam int YW = $clog2(MAP_H);

  // clamp a coordinate into [0, size-1] cells, split into cell and fraction
  function automatic void split(fix_t p, int size, output int ci, output fix_t frac);
    if (p < 0) begin
      ci = 0; frac = '0;
    end else if (p >= int2fix(size - 1)) begin
      ci = size - 2; frac = FIX_ONE;
    end else begin
      ci = int'(p >>> FRAC); frac = p & fix_t'(32'h0000_FFFF);
    end
  endfunction

  logic v1;
  fix_t fx, fy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; fx <= '0; fy <= '0; win_x <= '0; win_y <= '0;
    end else begin
      int cx, cy;
      fix_t tx, ty;
      v1 <= in_valid;
      split(theta[0], MAP_W, cx, tx);
      split(theta[1], MAP_H, cy, ty);
      win_x <= XW'(cx);
      win_y <= YW'(cy);
      fx    <= tx;
      fy    <= ty;
    end
  end

  // stage 2: bilinear value and gradient
  fix_t d, gx, gy, top, bot;
  always_comb begin
    top = win[0] + fmul(fx, win[1] - win[0]);
    bot = win[2] + fmul(fx, win[3] - win[2]);
    d   = top + fmul(fy, bot - top);
    gx  = (win[1] - win[0]) + fmul(fy, (win[3] - win[2]) - (win[1] - win[0]));
    gy  = bot - top;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; b <= '0;
      for (int c = 0; c < S; c++) j[c] <= '0;
    end else begin
      out_valid <= v1;
      for (int c = 0; c < S; c++) j[c] <= '0;
      if (d < eps) begin
        b    <= -fmul(w, eps - d);
        j[0] <= -fmul(w, gx);
        j[1] <= -fmul(w, gy);
      end else begin
        b <= '0;
      end
    end
  end
endmodule
