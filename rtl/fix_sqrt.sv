// fix_sqrt: iterative unsigned integer square root.
//
// Computes root = floor(sqrt(rad)) for an unsigned RAD_W-bit radicand with
// the classic digit-by-digit (non-restoring, two bits per step) method. One
// result bit is produced per clock, so a result takes RAD_W/2 cycles after
// `start`. Fixed-point callers choose the scaling: the square root of a
// Q32.32 radicand is the Q16.16 root.
//
// Interface: pulse `start` with `rad` valid while `busy` is low; `done`
// pulses for one cycle with `root` valid, and `root` holds until the next
// start. Implementation detail chosen here; the algorithm is not specified
// by the original BLITZCRANK design, which only needs a norm and a distance.
module fix_sqrt #(
  parameter int RAD_W = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [RAD_W-1:0]     rad,
  output logic                 busy,
  output logic                 done,
  output logic [RAD_W/2-1:0]   root
);
  localparam int RW = RAD_W / 2;
  localparam int CW = $clog2(RW + 1);

  logic [RAD_W-1:0] x;       // remaining radicand bits, shifted out from the top
  logic [RW+1:0]    rem;     // partial remainder
  logic [RW-1:0]    q;       // partial root
  logic [CW-1:0]    cnt;

  logic [RW+1:0] rem_sh, trial;
  always_comb begin
    rem_sh = {rem[RW-1:0], x[RAD_W-1 -: 2]};
    trial  = {q, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; rem <= '0; q <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x    <= rad;
        rem  <= '0;
        q    <= '0;
        cnt  <= CW'(RW);
        busy <= 1'b1;
      end else if (busy) begin
        x <= x << 2;
        if (rem_sh >= trial) begin
          rem <= rem_sh - trial;
          q   <= {q[RW-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          q   <= {q[RW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= (rem_sh >= trial) ? {q[RW-2:0], 1'b1} : {q[RW-2:0], 1'b0};
        end
      end
    end
  end
endmodule
