// fg_inference: factor graph inference block.
//
// Solves one Gauss-Newton linear system A*delta = b of the motion planning
// factor graph by variable elimination, with the two-sided (balancing)
// order: a forward set of QR + back substitution units eliminates
// theta_0, theta_1, ... while a backward set eliminates theta_{N-1},
// theta_{N-2}, ... at the same time; the middle state theta_{N/2} is
// eliminated last. The graph is a chain: prior factors between neighbours,
// one collision factor per state, and fixed-state priors on theta_0 (start)
// and theta_{N-1} (goal).
//
// Eliminating theta_i (neighbour theta_j): the local matrix A-bar is
// assembled from the factor carried over from the previous elimination (on
// theta_i), the collision row of theta_i and the prior factor between
// theta_i and theta_j, with columns [theta_i | theta_j | b]. The QR block
// eliminates the first block column (2*DOF columns). The first 2*DOF rows
// are the conditional of theta_i (stored for back substitution); the
// remaining rows restricted to [theta_j | b] are the new factor carried to
// the next step, so a side's carried factor grows by one row per step. The
// start/goal priors (weight sp_w * I) seed the two carried factors.
// After all eliminations, back substitution runs from the middle outwards,
// again on both sides in parallel.
//
// Interface: the factors (prior Jacobians and errors, collision rows,
// start/goal prior errors) are held stable from `start` until `done`;
// delta is valid at `done`. Per elimination step: about R*C cycles to load
// A-bar, the QR time, and 2*DOF*(2*DOF+1) cycles to unload it.
// The elimination procedure, the two-sided order and the two parallel unit
// sets follow the original BLITZCRANK design; the loading scheme and storage
// layout are this implementation's.
module fg_inference
  import blitz_pkg::*;
#(
  parameter int DOF   = 3,
  parameter int N     = 20,
  parameter int NU    = 4,
  parameter int MAX_R = 32,
  parameter int MAX_C = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t prior_j1 [N-1][2*DOF][2*DOF],
  input  fix_t prior_j2 [N-1][2*DOF][2*DOF],
  input  fix_t prior_b  [N-1][2*DOF],
  input  fix_t coll_j   [N][2*DOF],
  input  fix_t coll_b   [N],
  input  fix_t sp_w,
  input  fix_t sp_b     [2*DOF],
  input  fix_t gp_b     [2*DOF],
  output logic busy,
  output logic done,
  output fix_t delta    [N][2*DOF],
  output logic [15:0] par_steps    // elimination steps run on both sides at once
);
  localparam int S  = 2 * DOF;
  localparam int HN = N / 2;
  localparam int NW = $clog2(N + 1);

  typedef enum logic [2:0] {IDLE, LOAD, QR, UNLOAD, BS_START, BS_WAIT} st_e;
  st_e st;

  fix_t cond  [N][S][2*S+1];
  fix_t carry [2][MAX_R][S+1];
  logic [7:0] crows [2];

  logic [NW-1:0] s;          // elimination step / back substitution index
  logic          fin;        // final step (middle state)
  logic [7:0]    lr, lc;     // load / unload counters
  logic [7:0]    rr [2];     // rows of A-bar per side
  logic [7:0]    cc;         // columns of A-bar
  logic          act [2];    // side active in this step
  logic          qdone [2];

  // variables of this step
  int vi [2], vj [2];
  always_comb begin
    vi[0] = int'(s);           vj[0] = int'(s) + 1;
    vi[1] = N - 1 - int'(s);   vj[1] = N - 2 - int'(s);
    if (fin) vi[0] = HN;
  end

  // ---------------- A-bar assembly ----------------
  function automatic fix_t assemble(int side, int r, int c);
    int cr, pr, p;
    fix_t val;
    val = '0;
    cr  = int'(crows[side]);
    if (fin) begin
      if (r < int'(crows[0])) begin
        if (c < S) val = carry[0][r][c]; else if (c == S) val = carry[0][r][S];
      end else if (r < int'(crows[0]) + int'(crows[1])) begin
        if (c < S) val = carry[1][r - int'(crows[0])][c];
        else if (c == S) val = carry[1][r - int'(crows[0])][S];
      end else if (r == int'(crows[0]) + int'(crows[1])) begin
        if (c < S) val = coll_j[HN][c]; else if (c == S) val = coll_b[HN];
      end
    end else begin
      if (r < cr) begin
        if (c < S) val = carry[side][r][c]; else if (c == 2 * S) val = carry[side][r][S];
      end else if (r == cr) begin
        if (c < S) val = coll_j[vi[side]][c]; else if (c == 2 * S) val = coll_b[vi[side]];
      end else if (r < cr + 1 + S) begin
        pr = r - cr - 1;
        p  = (side == 0) ? vi[0] : vi[1] - 1;
        if (c == 2 * S)   val = prior_b[p][pr];
        else if (side == 0) val = (c < S) ? prior_j1[p][pr][c] : prior_j2[p][pr][c - S];
        else                val = (c < S) ? prior_j2[p][pr][c] : prior_j1[p][pr][c - S];
      end
    end
    return val;
  endfunction

  // ---------------- QR blocks ----------------
  logic       q_start [2], q_busy [2], q_done [2], q_we [2];
  fix_t       q_ld [2], q_rd [2];
  for (genvar g = 0; g < 2; g++) begin : g_qr
    qr_decomp #(.NU(NU), .MAX_R(MAX_R), .MAX_C(MAX_C)) u_qr (
      .clk, .rst_n, .start(q_start[g]), .n_rows(rr[g]), .n_cols(cc), .n_elim(8'(S)),
      .busy(q_busy[g]), .done(q_done[g]),
      .ld_we(q_we[g]), .ld_row(lr), .ld_col(lc), .ld_data(q_ld[g]),
      .rd_row(lr), .rd_col(lc), .rd_data(q_rd[g])
    );
    always_comb begin
      q_we[g] = (st == LOAD) && act[g] && (lr < rr[g]);
      q_ld[g] = assemble(g, int'(lr), int'(lc));
    end
  end

  // ---------------- back substitution ----------------
  logic b_start [2], b_busy [2], b_done [2];
  fix_t b_rii [2][S][S], b_rij [2][S][S], b_d [2][S], b_xj [2][S], b_xi [2][S];
  int   bv [2], bn [2];   // variable and neighbour of each back substitution unit
  always_comb begin
    bv[0] = HN - int'(s);  bn[0] = HN - int'(s) + 1;
    bv[1] = HN + int'(s);  bn[1] = HN + int'(s) - 1;
    if (s == '0) bn[0] = HN;   // middle state: no neighbour term (zeros in cond)
    for (int g = 0; g < 2; g++) begin
      int v, nb;
      v  = (bv[g] < 0) ? 0 : (bv[g] > N - 1) ? N - 1 : bv[g];
      nb = (bn[g] < 0) ? 0 : (bn[g] > N - 1) ? N - 1 : bn[g];
      for (int r = 0; r < S; r++) begin
        b_d[g][r]  = cond[v][r][2*S];
        b_xj[g][r] = (s == '0) ? '0 : delta[nb][r];
        for (int c = 0; c < S; c++) begin
          b_rii[g][r][c] = cond[v][r][c];
          b_rij[g][r][c] = cond[v][r][S+c];
        end
      end
    end
  end
  for (genvar g = 0; g < 2; g++) begin : g_bs
    back_subst #(.DOF(DOF)) u_bs (
      .clk, .rst_n, .start(b_start[g]), .r_ii(b_rii[g]), .r_ij(b_rij[g]),
      .d(b_d[g]), .x_j(b_xj[g]), .busy(b_busy[g]), .done(b_done[g]), .x_i(b_xi[g])
    );
  end

  assign busy = (st != IDLE);

  // carried-factor row counts after the current step
  logic [7:0] nc0, nc1;
  always_comb begin
    nc0 = act[0] ? rr[0] - 8'(S) : crows[0];
    nc1 = act[1] ? rr[1] - 8'(S) : crows[1];
  end

  logic [7:0] rmax;
  always_comb rmax = (act[1] && rr[1] > rr[0]) ? rr[1] : rr[0];


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; s <= '0; fin <= 1'b0; lr <= '0; lc <= '0; cc <= '0; done <= 1'b0;
      par_steps <= '0;
      for (int g = 0; g < 2; g++) begin
        rr[g] <= '0; act[g] <= 1'b0; qdone[g] <= 1'b0; q_start[g] <= 1'b0; b_start[g] <= 1'b0;
        crows[g] <= '0;
      end
      for (int v = 0; v < N; v++) for (int r = 0; r < S; r++) delta[v][r] <= '0;
    end else begin
      done <= 1'b0;
      for (int g = 0; g < 2; g++) begin q_start[g] <= 1'b0; b_start[g] <= 1'b0; end
      unique case (st)
        IDLE: if (start) begin
          // seed the carried factors with the start and goal priors
          for (int r = 0; r < MAX_R; r++) for (int c = 0; c <= S; c++) begin
            carry[0][r][c] <= '0;
            carry[1][r][c] <= '0;
          end
          for (int r = 0; r < S; r++) begin
            carry[0][r][r] <= sp_w;  carry[0][r][S] <= sp_b[r];
            carry[1][r][r] <= sp_w;  carry[1][r][S] <= gp_b[r];
          end
          crows[0] <= 8'(S);
          crows[1] <= 8'(S);
          s        <= '0;
          fin      <= 1'b0;
          act[0]   <= 1'b1;
          act[1]   <= (HN > 1);
          rr[0]    <= 8'(2 * S + 1);
          rr[1]    <= (HN > 1) ? 8'(2 * S + 1) : 8'd0;
          cc       <= 8'(2 * S + 1);
          lr       <= '0;
          lc       <= '0;
          par_steps <= '0;
          st       <= LOAD;
        end
        LOAD: begin
          if (lc == cc - 8'd1) begin
            lc <= '0;
            if (lr == rmax - 8'd1) begin
              lr <= '0;
              for (int g = 0; g < 2; g++) begin
                q_start[g] <= act[g];
                qdone[g]   <= !act[g];
              end
              if (act[0] && act[1]) par_steps <= par_steps + 16'd1;
              st <= QR;
            end else begin
              lr <= lr + 8'd1;
            end
          end else begin
            lc <= lc + 8'd1;
          end
        end
        QR: begin
          for (int g = 0; g < 2; g++) if (q_done[g]) qdone[g] <= 1'b1;
          if ((qdone[0] || q_done[0]) && (qdone[1] || q_done[1])) begin
            lr <= '0;
            lc <= '0;
            st <= UNLOAD;
          end
        end
        UNLOAD: begin
          for (int g = 0; g < 2; g++) begin
            if (act[g] && lr < rr[g]) begin
              if (lr < 8'(S)) begin
                if (fin) begin
                  if (lc < 8'(S)) cond[vi[g]][lr][lc] <= q_rd[g];
                  else begin
                    cond[vi[g]][lr][2*S] <= q_rd[g];
                    for (int c = S; c < 2 * S; c++) cond[vi[g]][lr][c] <= '0;
                  end
                end else begin
                  cond[vi[g]][lr][lc] <= q_rd[g];
                end
              end else if (!fin && lc >= 8'(S)) begin
                carry[g][lr - 8'(S)][lc - 8'(S)] <= q_rd[g];
              end
            end
          end
          if (lc == cc - 8'd1) begin
            lc <= '0;
            if (lr == rmax - 8'd1) begin
              lr <= '0;
              for (int g = 0; g < 2; g++) if (act[g]) crows[g] <= rr[g] - 8'(S);
              if (fin) begin
                s  <= '0;
                st <= BS_START;
              end else begin
                s  <= s + 1'b1;
                st <= LOAD;
                // rows of the next A-bar: carried factor + collision row + prior factor
                if (int'(s) + 1 == HN) begin
                  fin    <= 1'b1;
                  act[0] <= 1'b1;
                  act[1] <= 1'b0;
                  rr[0]  <= nc0 + nc1 + 8'd1;
                  rr[1]  <= '0;
                  cc     <= 8'(S + 1);
                end else begin
                  act[0] <= 1'b1;
                  act[1] <= (int'(s) + 1 < HN - 1);
                  rr[0]  <= nc0 + 8'(1 + S);
                  rr[1]  <= (int'(s) + 1 < HN - 1) ? nc1 + 8'(1 + S) : 8'd0;
                end
              end
            end else begin
              lr <= lr + 8'd1;
            end
          end else begin
            lc <= lc + 8'd1;
          end
        end
        BS_START: begin
          act[0]     <= 1'b1;
          act[1]     <= (s != '0) && (int'(s) < HN);
          b_start[0] <= 1'b1;
          b_start[1] <= (s != '0) && (int'(s) < HN);
          qdone[0]   <= 1'b0;
          qdone[1]   <= !((s != '0) && (int'(s) < HN));
          st         <= BS_WAIT;
        end
        BS_WAIT: begin
          for (int g = 0; g < 2; g++) if (b_done[g]) qdone[g] <= 1'b1;
          if ((qdone[0] || b_done[0]) && (qdone[1] || b_done[1])) begin
            for (int r = 0; r < S; r++) begin
              delta[bv[0]][r] <= b_xi[0][r];
              if (act[1]) delta[bv[1]][r] <= b_xi[1][r];
            end
            if (int'(s) == HN) begin
              st   <= IDLE;
              done <= 1'b1;
            end else begin
              s  <= s + 1'b1;
              st <= BS_START;
            end
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
