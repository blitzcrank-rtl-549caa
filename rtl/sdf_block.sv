// sdf_block: signed distance field (SDF) engine.
//
// Turns an occupancy grid G (8-bit occupancy per cell) into the signed
// distance field S, in four steps:
//   1. threshold G into the binary map M (1 = occupied, G > thr);
//   2. invert it into M' (1 = free);
//   3. for every 1 in M and in M', find the distance to the closest 0,
//      giving H and H' (row pass by NR K computing units, column pass by
//      NC H computing units);
//   4. S = H' - H. At every cell one of the two is 0, so a column job for M
//      writes -H to the occupied cells and a job for M' writes H' to the
//      free cells; no read-modify-write is needed.
// S is Q16.16 in cell units, positive in free space and negative inside
// obstacles.
//
// Interface: `start` begins; the block reads G one row per cycle through
// (g_row_addr, g_row) and raises `done` when S is complete. S is read
// through a 2x2 window port: (win_x, win_y) selects the cell whose
// neighbours to the right and below are also returned (clamped at the map
// border), as needed by bilinear interpolation.
// Timing: MAP_H load cycles, then about 2*MAP_H/NR row jobs of 2*MAP_W
// cycles and 2*MAP_W/NC column jobs of MAP_H*(MAP_H+36) cycles.
// The four steps, the K/H decomposition and the use of NR and NC parallel
// units follow the original BLITZCRANK design; the map size and unit counts are this
// implementation's defaults.
module sdf_block
  import blitz_pkg::*;
#(
  parameter int MAP_W = 64,
  parameter int MAP_H = 64,
  parameter int NR    = 4,
  parameter int NC    = 4,
  parameter int D_W   = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [7:0]                 thr,
  output logic [$clog2(MAP_H)-1:0]   g_row_addr,
  input  logic [7:0]                 g_row [MAP_W],
  output logic                       busy,
  output logic                       done,
  input  logic [$clog2(MAP_W)-1:0]   win_x,
  input  logic [$clog2(MAP_H)-1:0]   win_y,
  output fix_t                       win [4]   // (x,y) (x+1,y) (x,y+1) (x+1,y+1)
);
  localparam int XW = $clog2(MAP_W);
  localparam int YW = $clog2(MAP_H);
  localparam int KJ = 2 * MAP_H;   // row jobs: MAP_H rows of M, then of M'
  localparam int HJ = 2 * MAP_W;   // column jobs: MAP_W columns of M, then of M'
  localparam int JW = $clog2(KJ > HJ ? KJ + 1 : HJ + 1);

  typedef enum logic [1:0] {IDLE, LOAD, KPASS, HPASS} st_e;
  st_e st;

  logic [MAP_W-1:0] m   [MAP_H];          // binary map M
  logic [D_W-1:0]   kk  [2][MAP_H][MAP_W]; // K for M (0) and M' (1)
  fix_t             s   [MAP_H][MAP_W];

  // ---------------- load / threshold ----------------
  logic [YW-1:0] ld_row;
  assign g_row_addr = ld_row;

  // ---------------- K units ----------------
  logic            k_start [NR];
  logic            k_busy  [NR];
  logic            k_done  [NR];
  logic [D_W-1:0]  k_out   [NR][MAP_W];
  logic [MAP_W-1:0] k_rowin [NR];
  logic [JW-1:0]   k_job   [NR];
  logic            k_act   [NR];
  logic [JW-1:0]   k_next;            // next row job to hand out

  for (genvar u = 0; u < NR; u++) begin : g_kcu
    sdf_kcu #(.W(MAP_W), .D_W(D_W)) u_kcu (
      .clk, .rst_n, .start(k_start[u]), .row(k_rowin[u]),
      .busy(k_busy[u]), .done(k_done[u]), .k(k_out[u])
    );
  end

  // ---------------- H units ----------------
  logic            h_start [NC];
  logic            h_busy  [NC];
  logic            h_done  [NC];
  logic            h_ov    [NC];
  logic [YW-1:0]   h_orow  [NC];
  fix_t            h_odist [NC];
  logic [D_W-1:0]  h_colin [NC][MAP_H];
  logic [JW-1:0]   h_job   [NC];
  logic            h_act   [NC];
  logic [JW-1:0]   h_next;

  for (genvar u = 0; u < NC; u++) begin : g_hcu
    sdf_hcu #(.H(MAP_H), .D_W(D_W)) u_hcu (
      .clk, .rst_n, .start(h_start[u]), .kcol(h_colin[u]),
      .busy(h_busy[u]), .done(h_done[u]), .out_valid(h_ov[u]),
      .out_row(h_orow[u]), .out_dist(h_odist[u])
    );
  end

  // job input selection: the unit's current job picks M or M' and the index
  always_comb begin
    for (int u = 0; u < NR; u++) begin
      if (k_job[u] < JW'(MAP_H)) k_rowin[u] =  m[YW'(k_job[u])];
      else                       k_rowin[u] = ~m[YW'(k_job[u] - JW'(MAP_H))];
    end
    for (int u = 0; u < NC; u++) begin
      for (int r = 0; r < MAP_H; r++) begin
        if (h_job[u] < JW'(MAP_W)) h_colin[u][r] = kk[0][r][XW'(h_job[u])];
        else                       h_colin[u][r] = kk[1][r][XW'(h_job[u] - JW'(MAP_W))];
      end
    end
  end

  logic all_k_idle, all_h_idle;
  always_comb begin
    all_k_idle = 1'b1;
    for (int u = 0; u < NR; u++) if (k_act[u]) all_k_idle = 1'b0;
    all_h_idle = 1'b1;
    for (int u = 0; u < NC; u++) if (h_act[u]) all_h_idle = 1'b0;
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; ld_row <= '0; done <= 1'b0; k_next <= '0; h_next <= '0;
      for (int u = 0; u < NR; u++) begin k_start[u] <= 1'b0; k_job[u] <= '0; k_act[u] <= 1'b0; end
      for (int u = 0; u < NC; u++) begin h_start[u] <= 1'b0; h_job[u] <= '0; h_act[u] <= 1'b0; end
      for (int r = 0; r < MAP_H; r++) m[r] <= '0;
    end else begin
      done <= 1'b0;
      for (int u = 0; u < NR; u++) k_start[u] <= 1'b0;
      for (int u = 0; u < NC; u++) h_start[u] <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          ld_row <= '0;
          st     <= LOAD;
        end
        LOAD: begin
          for (int c = 0; c < MAP_W; c++) m[ld_row][c] <= (g_row[c] > thr);
          if (ld_row == YW'(MAP_H - 1)) begin
            st     <= KPASS;
            k_next <= '0;
          end else begin
            ld_row <= ld_row + 1'b1;
          end
        end
        KPASS: begin
          // hand out row jobs to idle units, retire finished ones
          logic [JW-1:0] nxt;
          nxt = k_next;
          for (int u = 0; u < NR; u++) begin
            if (k_act[u] && k_done[u]) k_act[u] <= 1'b0;
            if ((!k_act[u] || k_done[u]) && !k_start[u] && nxt < JW'(KJ)) begin
              k_job[u]   <= nxt;
              k_start[u] <= 1'b1;
              k_act[u]   <= 1'b1;
              nxt        = nxt + 1'b1;
            end
          end
          k_next <= nxt;
          if (nxt == JW'(KJ) && all_k_idle && k_next == JW'(KJ)) begin
            st     <= HPASS;
            h_next <= '0;
          end
        end
        HPASS: begin
          logic [JW-1:0] nxt;
          nxt = h_next;
          for (int u = 0; u < NC; u++) begin
            if (h_act[u] && h_done[u]) h_act[u] <= 1'b0;
            if ((!h_act[u] || h_done[u]) && !h_start[u] && nxt < JW'(HJ)) begin
              h_job[u]   <= nxt;
              h_start[u] <= 1'b1;
              h_act[u]   <= 1'b1;
              nxt        = nxt + 1'b1;
            end
          end
          h_next <= nxt;
          if (nxt == JW'(HJ) && all_h_idle && h_next == JW'(HJ)) begin
            st   <= IDLE;
            done <= 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  // K results into the K store
  always_ff @(posedge clk) begin
    for (int u = 0; u < NR; u++) begin
      if (k_done[u]) begin
        if (k_job[u] < JW'(MAP_H)) kk[0][YW'(k_job[u])]           <= k_out[u];
        else                       kk[1][YW'(k_job[u] - JW'(MAP_H))] <= k_out[u];
      end
    end
  end

  // H results into S: -H on occupied cells (M jobs), +H' on free cells (M' jobs)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < MAP_H; r++) for (int c = 0; c < MAP_W; c++) s[r][c] <= '0;
    end else begin
      for (int u = 0; u < NC; u++) begin
        if (h_ov[u]) begin
          if (h_job[u] < JW'(MAP_W)) begin
            if (m[h_orow[u]][XW'(h_job[u])])
              s[h_orow[u]][XW'(h_job[u])] <= -h_odist[u];
          end else begin
            if (!m[h_orow[u]][XW'(h_job[u] - JW'(MAP_W))])
              s[h_orow[u]][XW'(h_job[u] - JW'(MAP_W))] <= h_odist[u];
          end
        end
      end
    end
  end

  // 2x2 window read port, clamped at the right and bottom edges
  logic [XW-1:0] x1;
  logic [YW-1:0] y1;
  always_comb begin
    x1 = (win_x == XW'(MAP_W - 1)) ? win_x : win_x + 1'b1;
    y1 = (win_y == YW'(MAP_H - 1)) ? win_y : win_y + 1'b1;
    win[0] = s[win_y][win_x];
    win[1] = s[win_y][x1];
    win[2] = s[y1][win_x];
    win[3] = s[y1][x1];
  end
endmodule
