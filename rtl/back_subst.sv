// back_subst: back substitution unit.
//
// Solves one eliminated state from its conditional block row
//   R_ii * x_i + R_ij * x_j = d
// where R_ii (S x S, S = 2*DOF) is upper triangular and x_j, the already
// solved neighbour, is known. Rows are solved from the last to the first:
//   x_i[r] = (d[r] - sum_c R_ij[r][c] x_j[c] - sum_{c>r} R_ii[r][c] x_i[c]) / R_ii[r][r].
// The sum is accumulated one product per cycle (Q32.32) and the quotient
// comes from a sequential divider; a zero pivot gives x_i[r] = 0.
//
// Interface: inputs are held stable from `start` until `done`; x_i is valid
// when done pulses. Latency is about S * (2*S + 52) cycles.
// Back substitution after the elimination follows the original BLITZCRANK design;
// the row-serial MAC and divider are this implementation's.
module back_subst
  import blitz_pkg::*;
#(
  parameter int DOF = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t r_ii [2*DOF][2*DOF],
  input  fix_t r_ij [2*DOF][2*DOF],
  input  fix_t d    [2*DOF],
  input  fix_t x_j  [2*DOF],
  output logic busy,
  output logic done,
  output fix_t x_i  [2*DOF]
);
  localparam int S  = 2 * DOF;
  localparam int CW = $clog2(2 * S + 1);

  typedef enum logic [1:0] {IDLE, MAC, DIV} st_e;
  st_e st;
  int unsigned    r;
  logic [CW-1:0]  c;      // 0..S-1: R_ij columns, S..2S-1: R_ii columns
  acc_t           acc;
  logic           neg;

  logic dv_start, dv_busy, dv_done;
  logic [47:0] dv_quo;
  logic [47:0] dv_num;
  logic [31:0] dv_den;
  udiv #(.N_W(48), .D_W(32)) u_div (
    .clk, .rst_n, .start(dv_start), .num(dv_num), .den(dv_den),
    .busy(dv_busy), .done(dv_done), .quo(dv_quo)
  );

  acc_t term;
  fix_t num_fix;
  always_comb begin
    if (c < CW'(S)) term = fmul_wide(r_ij[r][int'(c)], x_j[int'(c)]);
    else if (int'(c) - S > int'(r)) term = fmul_wide(r_ii[r][int'(c) - S], x_i[int'(c) - S]);
    else term = '0;
    num_fix = fix_t'(acc >>> FRAC);
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; r <= 0; c <= '0; acc <= '0; neg <= 1'b0; done <= 1'b0;
      dv_start <= 1'b0; dv_num <= '0; dv_den <= '0;
      for (int i = 0; i < S; i++) x_i[i] <= '0;
    end else begin
      done     <= 1'b0;
      dv_start <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          r   <= S - 1;
          c   <= '0;
          acc <= acc_t'(d[S-1]) <<< FRAC;
          for (int i = 0; i < S; i++) x_i[i] <= '0;
          st  <= MAC;
        end
        MAC: begin
          acc <= acc - term;
          if (c == CW'(2 * S - 1)) begin
            // (acc - term) is the numerator; divide by the pivot
            automatic acc_t  nacc = acc - term;
            automatic fix_t  nf   = fix_t'(nacc >>> FRAC);
            automatic fix_t  p    = r_ii[r][r];
            neg      <= (nf < 0) != (p < 0);
            dv_num   <= 48'(fabs(nf)) << FRAC;
            dv_den   <= 32'(fabs(p));
            dv_start <= 1'b1;
            st       <= DIV;
          end else begin
            c <= c + 1'b1;
          end
        end
        DIV: if (dv_done) begin
          if (r_ii[r][r] == '0) x_i[r] <= '0;
          else                  x_i[r] <= neg ? -fix_t'(dv_quo) : fix_t'(dv_quo);
          if (r == 0) begin
            st   <= IDLE;
            done <= 1'b1;
          end else begin
            r   <= r - 1;
            c   <= '0;
            acc <= acc_t'(d[r-1]) <<< FRAC;
            st  <= MAC;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
