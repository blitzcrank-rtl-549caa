// sdf_hcu: H computing unit of the SDF block.
//
// For one column of the row-distance matrix K it computes, for every row i,
// the Euclidean distance to the closest 0 of the map:
//   H[i] = sqrt( min_j ( K[j]^2 + (i - j)^2 ) ).
// The minimum search visits one row j per cycle; the square root is taken
// by a fix_sqrt unit, so the result is Q16.16 in cell units. A K value of
// INF (no 0 in that row) is treated as very far away.
//
// Interface: `start` captures the column `kcol`; for each row the unit
// raises `out_valid` for one cycle with `out_row` and `out_dist`. `done`
// pulses after the last row. Latency is about H * (H + RAD_W/2 + 3) cycles
// per column. The column step (add the vertical distance, take the
// minimum) follows the original BLITZCRANK design; the brute-force search order is
// this implementation's choice.
module sdf_hcu
  import blitz_pkg::*;
#(
  parameter int H   = 64,
  parameter int D_W = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [D_W-1:0] kcol [H],
  output logic           busy,
  output logic           done,
  output logic           out_valid,
  output logic [$clog2(H)-1:0] out_row,
  output fix_t           out_dist
);
  localparam int IW  = $clog2(H);
  localparam int SQW = 2 * D_W + 2;   // width of a squared distance
  localparam int RAD_W = 64;

  typedef enum logic [1:0] {IDLE, SEARCH, ROOT} st_e;
  st_e st;
  logic [D_W-1:0] kc [H];
  logic [IW-1:0]  i, j;
  logic [SQW-1:0] best;

  logic [SQW-1:0] cand;
  logic [D_W-1:0] dy;
  always_comb begin
    dy   = (i >= j) ? D_W'(i - j) : D_W'(j - i);
    cand = SQW'(kc[j]) * SQW'(kc[j]) + SQW'(dy) * SQW'(dy);
  end

  logic sq_start, sq_busy, sq_done;
  logic [RAD_W/2-1:0] sq_root;
  fix_sqrt #(.RAD_W(RAD_W)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .rad(RAD_W'(best) << (2 * FRAC)),
    .busy(sq_busy), .done(sq_done), .root(sq_root)
  );

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; i <= '0; j <= '0; best <= '1; done <= 1'b0;
      sq_start <= 1'b0; out_valid <= 1'b0; out_row <= '0; out_dist <= '0;
      for (int r = 0; r < H; r++) kc[r] <= '0;
    end else begin
      done      <= 1'b0;
      sq_start  <= 1'b0;
      out_valid <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          kc   <= kcol;
          i    <= '0;
          j    <= '0;
          best <= '1;
          st   <= SEARCH;
        end
        SEARCH: begin
          if (cand < best) best <= cand;
          if (j == IW'(H - 1)) begin
            sq_start <= 1'b1;
            st       <= ROOT;
          end else begin
            j <= j + 1'b1;
          end
        end
        ROOT: if (sq_done) begin
          out_valid <= 1'b1;
          out_row   <= i;
          out_dist  <= fix_t'(sq_root);
          if (i == IW'(H - 1)) begin
            st   <= IDLE;
            done <= 1'b1;
          end else begin
            i    <= i + 1'b1;
            j    <= '0;
            best <= '1;
            st   <= SEARCH;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
