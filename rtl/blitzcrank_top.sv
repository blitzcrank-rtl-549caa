// blitzcrank_top: motion planning accelerator built on factor graph
// inference.
//
// The host loads an occupancy grid map and an initial trajectory of N
// states into the input buffer, sets the configuration and pulses `start`.
// The accelerator then
//   1. computes the signed distance field of the map (SDF block);
//   2. repeats Gauss-Newton iterations: the constant velocity prior factor
//      block and the collision-free likelihood factor block linearise all
//      factors at the current trajectory (one factor per cycle each,
//      pipelined), the factor graph inference block solves for the update
//      delta by two-sided elimination and back substitution, and the
//      trajectory is updated, Theta += delta;
//   3. stops when max|delta| < tol (converged) or after MAX_ITER iterations.
// Start and goal are held by fixed-state priors (weight sp_w) on the first
// and last states, taken from the initial trajectory.
//
// Units: positions in map cells, Q16.16. The trajectory, the iteration
// count and activity counters are outputs. `done` pulses at the end.
// Data flow and the four main blocks follow the original BLITZCRANK design; the
// convergence test, the counters and the host interface are this design's.
module blitzcrank_top
  import blitz_pkg::*;
#(
  parameter int DOF      = 3,
  parameter int N        = 20,
  parameter int MAP_W    = 64,
  parameter int MAP_H    = 64,
  parameter int NR       = 4,
  parameter int NC       = 4,
  parameter int NU       = 4,
  parameter int MAX_R    = 32,
  parameter int MAX_C    = 13,
  parameter int MAX_ITER = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host loading of the input buffer
  input  logic                       map_we,
  input  logic [$clog2(MAP_W)-1:0]   map_x,
  input  logic [$clog2(MAP_H)-1:0]   map_y,
  input  logic [7:0]                 map_data,
  input  logic                       st_we,
  input  logic [$clog2(N)-1:0]       st_idx,
  input  logic [$clog2(2*DOF)-1:0]   st_comp,
  input  fix_t                       st_data,
  // configuration
  input  logic [7:0]                 occ_thr,   // occupancy threshold
  input  fix_t                       dt,        // time between states
  input  fix_t                       prior_l [2][2], // whitening of the GP prior
  input  fix_t                       eps,       // safety distance + sphere radius
  input  fix_t                       coll_w,    // 1/sigma of the collision factor
  input  fix_t                       sp_w,      // 1/sigma of start/goal priors
  input  fix_t                       tol,       // convergence threshold on |delta|
  // control and results
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  output logic                       converged,
  output logic [7:0]                 iters,
  output fix_t                       theta [N][2*DOF],
  output logic [15:0]                hinge_count,  // active collision factors, all iterations
  output logic [15:0]                par_steps     // two-sided steps of the last solve
);
  localparam int S  = 2 * DOF;
  localparam int IW = $clog2(N);
  localparam int FW2 = $clog2(N + 4);

  typedef enum logic [2:0] {IDLE, SDF, INIT, FACT, INFER, UPDATE} st_e;
  st_e st;

  // ---------------- input buffer ----------------
  logic [$clog2(MAP_H)-1:0] g_row_addr;
  logic [7:0]               g_row [MAP_W];
  logic [IW-1:0]            rd_idx;
  fix_t                     rd_state [S];
  input_buffer #(.DOF(DOF), .N(N), .MAP_W(MAP_W), .MAP_H(MAP_H)) u_buf (
    .clk, .map_we, .map_x, .map_y, .map_data, .st_we, .st_idx, .st_comp, .st_data,
    .row_addr(g_row_addr), .row_data(g_row), .rd_idx, .rd_state
  );

  // ---------------- SDF block ----------------
  logic sdf_start, sdf_busy, sdf_done;
  logic [$clog2(MAP_W)-1:0] win_x;
  logic [$clog2(MAP_H)-1:0] win_y;
  fix_t win [4];
  sdf_block #(.MAP_W(MAP_W), .MAP_H(MAP_H), .NR(NR), .NC(NC)) u_sdf (
    .clk, .rst_n, .start(sdf_start), .thr(occ_thr), .g_row_addr, .g_row,
    .busy(sdf_busy), .done(sdf_done), .win_x, .win_y, .win
  );

  // ---------------- factor blocks ----------------
  logic [FW2-1:0] fi;               // factor index fed this cycle
  logic           f_feed;
  logic           pf_in, pf_out, cf_in, cf_out;
  fix_t           pf_a [S], pf_b [S], cf_th [S];
  fix_t           pf_j1 [S][S], pf_j2 [S][S], pf_e [S], cf_j [S], cf_e;
  logic [IW-1:0]  pidx [2], cidx [2];   // index pipelines matching the 2-cycle latency

  always_comb begin
    pf_in = f_feed && (int'(fi) < N - 1);
    cf_in = f_feed && (int'(fi) < N);
    for (int c = 0; c < S; c++) begin
      pf_a[c]  = theta[(int'(fi) < N - 1) ? int'(fi) : 0][c];
      pf_b[c]  = theta[(int'(fi) < N - 1) ? int'(fi) + 1 : 0][c];
      cf_th[c] = theta[(int'(fi) < N) ? int'(fi) : 0][c];
    end
  end

  prior_factor #(.DOF(DOF)) u_pf (
    .clk, .rst_n, .in_valid(pf_in), .theta_a(pf_a), .theta_b(pf_b), .dt, .l(prior_l),
    .out_valid(pf_out), .j1(pf_j1), .j2(pf_j2), .b(pf_e)
  );
  collision_factor #(.DOF(DOF), .MAP_W(MAP_W), .MAP_H(MAP_H)) u_cf (
    .clk, .rst_n, .in_valid(cf_in), .theta(cf_th), .eps, .w(coll_w), .win_x, .win_y, .win,
    .out_valid(cf_out), .j(cf_j), .b(cf_e)
  );

  // factor store
  fix_t prior_j1 [N-1][S][S], prior_j2 [N-1][S][S], prior_b [N-1][S];
  fix_t coll_j [N][S], coll_b [N];
  fix_t theta_s [S], theta_g [S], sp_b [S], gp_b [S];

  always_comb
    for (int c = 0; c < S; c++) begin
      sp_b[c] = -fmul(sp_w, theta[0][c] - theta_s[c]);
      gp_b[c] = -fmul(sp_w, theta[N-1][c] - theta_g[c]);
    end

  // ---------------- inference block ----------------
  logic fg_start, fg_busy, fg_done;
  fix_t delta [N][S];
  logic [15:0] fg_par;
  fg_inference #(.DOF(DOF), .N(N), .NU(NU), .MAX_R(MAX_R), .MAX_C(MAX_C)) u_fg (
    .clk, .rst_n, .start(fg_start), .prior_j1, .prior_j2, .prior_b, .coll_j, .coll_b,
    .sp_w, .sp_b, .gp_b, .busy(fg_busy), .done(fg_done), .delta, .par_steps(fg_par)
  );

  // largest update component, for the convergence test
  fix_t dmax;
  always_comb begin
    dmax = '0;
    for (int v = 0; v < N; v++) for (int c = 0; c < S; c++)
      if (fabs(delta[v][c]) > dmax) dmax = fabs(delta[v][c]);
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; sdf_start <= 1'b0; fg_start <= 1'b0; rd_idx <= '0; fi <= '0; f_feed <= 1'b0;
      done <= 1'b0; converged <= 1'b0; iters <= '0; hinge_count <= '0; par_steps <= '0;
      for (int k = 0; k < 2; k++) begin pidx[k] <= '0; cidx[k] <= '0; end
      for (int v = 0; v < N; v++) for (int c = 0; c < S; c++) theta[v][c] <= '0;
      for (int c = 0; c < S; c++) begin theta_s[c] <= '0; theta_g[c] <= '0; end
    end else begin
      done      <= 1'b0;
      sdf_start <= 1'b0;
      fg_start  <= 1'b0;
      pidx[0] <= IW'(fi); pidx[1] <= pidx[0];
      cidx[0] <= IW'(fi); cidx[1] <= cidx[0];
      unique case (st)
        IDLE: if (start) begin
          sdf_start   <= 1'b1;
          converged   <= 1'b0;
          iters       <= '0;
          hinge_count <= '0;
          st          <= SDF;
        end
        SDF: if (sdf_done) begin
          rd_idx <= '0;
          st     <= INIT;
        end
        INIT: begin
          theta[rd_idx] <= rd_state;
          if (rd_idx == '0)              theta_s <= rd_state;
          if (int'(rd_idx) == N - 1) begin
            theta_g <= rd_state;
            fi      <= '0;
            f_feed  <= 1'b1;
            st      <= FACT;
          end else begin
            rd_idx <= rd_idx + 1'b1;
          end
        end
        FACT: begin
          // feed one state per cycle, then let the 2-stage pipelines drain
          if (int'(fi) == N - 1) f_feed <= 1'b0;
          fi <= fi + 1'b1;
          if (int'(fi) == N + 2) begin
            fg_start <= 1'b1;
            st       <= INFER;
          end
        end
        INFER: if (fg_done) begin
          par_steps <= fg_par;
          st        <= UPDATE;
        end
        UPDATE: begin
          for (int v = 0; v < N; v++) for (int c = 0; c < S; c++)
            theta[v][c] <= theta[v][c] + delta[v][c];
          iters <= iters + 8'd1;
          if (dmax < tol || int'(iters) + 1 >= MAX_ITER) begin
            converged <= (dmax < tol);
            done      <= 1'b1;
            st        <= IDLE;
          end else begin
            fi     <= '0;
            f_feed <= 1'b1;
            st     <= FACT;
          end
        end
        default: st <= IDLE;
      endcase
      if (cf_out && cf_e != '0) hinge_count <= hinge_count + 16'd1;
    end
  end

  // factor results into the store
  always_ff @(posedge clk) begin
    if (pf_out) begin
      prior_j1[pidx[1]] <= pf_j1;
      prior_j2[pidx[1]] <= pf_j2;
      prior_b[pidx[1]]  <= pf_e;
    end
    if (cf_out) begin
      coll_j[cidx[1]] <= cf_j;
      coll_b[cidx[1]] <= cf_e;
    end
  end
endmodule
