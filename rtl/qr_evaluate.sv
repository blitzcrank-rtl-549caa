// qr_evaluate: Evaluate unit of the QR decomposition block.
//
// Builds the Householder reflector that zeroes the entries of one column
// below its diagonal row k. For the column x (rows k..R-1) it computes
//   norm  = ||x(k:R-1)||,  alpha = -sign(x_k) * norm,
//   tau   = 1 / (norm * (norm + |x_k|)),
// so that with v = x - alpha*e_k the reflector is P = I - tau * v * v^T and
// P*x = alpha*e_k. The Update unit that asked keeps x, so only alpha and tau
// are returned. A zero column gives tau = 0 (P = I) and alpha = x_k.
//
// One Evaluate unit serves all NU Update units: each raises req[u] when its
// pivot column is buffered; a fixed-priority arbiter grants one, the unit
// reads that unit's column through (rd_addr -> rd_data[u]) one row per
// cycle, then takes a square root (32 cycles) and a division (80 cycles)
// and pulses done[u] with alpha and tau. Latency: (R - k) + about 116
// cycles. Formats: x, alpha Q16.16; tau Q24.40 (64 bits) so that it keeps
// its precision over a wide range of column norms.
// The Evaluate/Update split and the sharing of one Evaluate unit follow the
// original BLITZCRANK design; the arithmetic formulation is this design's.
module qr_evaluate
  import blitz_pkg::*;
#(
  parameter int NU = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NU-1:0]          req,
  input  logic [7:0]             k     [NU],   // pivot row of each requester
  input  logic [7:0]             n_rows,
  output logic [7:0]             rd_addr,
  input  fix_t                   rd_data [NU],
  output logic [NU-1:0]          done,
  output fix_t                   alpha,
  output logic signed [63:0]     tau,
  output logic                   busy
);
  localparam int UW = (NU > 1) ? $clog2(NU) : 1;

  typedef enum logic [2:0] {IDLE, SUM, ROOT, DIV, FIN, GAP} st_e;
  st_e st;
  logic [UW-1:0] g;
  acc_t          sumsq;
  fix_t          xk;
  logic [31:0]   norm;

  // square root of a Q32.32 sum of squares is the Q16.16 norm
  logic sq_start, sq_busy, sq_done;
  logic [31:0] sq_root;
  fix_sqrt #(.RAD_W(64)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .rad(64'(sumsq)), .busy(sq_busy),
    .done(sq_done), .root(sq_root)
  );

  // tau (Q24.40) = 2^72 / denom (Q32.32)
  logic dv_start, dv_busy, dv_done;
  logic [79:0] dv_quo;
  logic [63:0] denom;
  udiv #(.N_W(80), .D_W(64)) u_div (
    .clk, .rst_n, .start(dv_start), .num(80'h1 << 72), .den(denom),
    .busy(dv_busy), .done(dv_done), .quo(dv_quo)
  );

  logic [UW-1:0] pick;
  always_comb begin
    pick = '0;
    for (int u = NU - 1; u >= 0; u--) if (req[u]) pick = UW'(u);
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; g <= '0; sumsq <= '0; xk <= '0; norm <= '0; rd_addr <= '0;
      done <= '0; alpha <= '0; tau <= '0; sq_start <= 1'b0; dv_start <= 1'b0; denom <= '0;
    end else begin
      done     <= '0;
      sq_start <= 1'b0;
      dv_start <= 1'b0;
      unique case (st)
        IDLE: if (|req) begin
          g       <= pick;
          rd_addr <= k[pick];
          sumsq   <= '0;
          st      <= SUM;
        end
        SUM: begin
          sumsq <= sumsq + fmul_wide(rd_data[g], rd_data[g]);
          if (rd_addr == k[g]) xk <= rd_data[g];
          if (rd_addr == n_rows - 8'd1) begin
            sq_start <= 1'b1;
            st       <= ROOT;
          end else begin
            rd_addr <= rd_addr + 8'd1;
          end
        end
        ROOT: if (sq_done) begin
          norm  <= sq_root;
          denom <= 64'(sq_root) * 64'(sq_root + 32'(fabs(xk)));
          st    <= DIV;
          if (sq_root == '0) begin
            alpha <= xk;
            tau   <= '0;
            st    <= FIN;
          end else begin
            dv_start <= 1'b1;
          end
        end
        DIV: if (dv_done) begin
          alpha <= (xk >= 0) ? -fix_t'(norm) : fix_t'(norm);
          tau   <= (dv_quo[79:63] != '0) ? 64'sh7FFF_FFFF_FFFF_FFFF : $signed({1'b0, dv_quo[62:0]});
          st    <= FIN;
        end
        FIN: begin
          done[g] <= 1'b1;
          st      <= GAP;
        end
        GAP: st <= IDLE;   // lets the requester drop req before a new grant
        default: st <= IDLE;
      endcase
    end
  end
endmodule
