// udiv: iterative unsigned restoring divider.
//
// Computes quo = num / den and the remainder for an N_W-bit numerator and a
// D_W-bit denominator, one quotient bit per clock (N_W cycles). Division by
// zero returns an all-ones quotient. Used for the Householder scale factor
// and for back substitution; the original BLITZCRANK design does not say how
// division is done, so this is the simplest sequential form.
//
// Interface: pulse `start` while `busy` is low; `done` pulses once when
// `quo` is valid; `quo` holds until the next start.
module udiv #(
  parameter int N_W = 64,
  parameter int D_W = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] num,
  input  logic [D_W-1:0] den,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] quo
);
  localparam int CW = $clog2(N_W + 1);

  logic [N_W-1:0] n_sh, q;
  logic [D_W-1:0] d;
  logic [D_W:0]   r;
  logic [CW-1:0]  cnt;
  logic [D_W:0]   r_sh;

  always_comb r_sh = {r[D_W-1:0], n_sh[N_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_sh <= '0; q <= '0; d <= '0; r <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        n_sh <= num;
        d    <= den;
        r    <= '0;
        q    <= '0;
        cnt  <= CW'(N_W);
        busy <= 1'b1;
      end else if (busy) begin
        n_sh <= n_sh << 1;
        if (r_sh >= {1'b0, d}) begin
          r <= r_sh - {1'b0, d};
          q <= {q[N_W-2:0], 1'b1};
        end else begin
          r <= r_sh;
          q <= {q[N_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= (r_sh >= {1'b0, d}) ? {q[N_W-2:0], 1'b1} : {q[N_W-2:0], 1'b0};
        end
      end
    end
  end
endmodule
