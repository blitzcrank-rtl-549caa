// sdf_kcu: K computing unit of the SDF block.
//
// For one row of a binary map it finds, for every cell holding 1, the
// distance along the row to the closest cell holding 0 (cells holding 0 get
// 0). It makes a forward scan (distance since the last 0 seen to the left)
// and a backward scan (distance to the next 0 on the right, keeping the
// smaller). A row with no 0 at all gives INF = 2^D_W - 1 in every cell.
//
// Timing: `start` loads `row`; the result `k` is valid when `done` pulses,
// 2*W + 1 cycles later, and holds until the next start. The row-wise first
// step of the distance transform follows the original BLITZCRANK design; the two
// scans are this implementation's choice.
module sdf_kcu #(
  parameter int W   = 64,
  parameter int D_W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [W-1:0]        row,
  output logic                busy,
  output logic                done,
  output logic [D_W-1:0]      k [W]
);
  localparam logic [D_W-1:0] INF = '1;
  localparam int IW = $clog2(W);

  typedef enum logic [1:0] {IDLE, FWD, BWD} st_e;
  st_e st;
  logic [W-1:0]   bits;
  logic [IW-1:0]  idx;
  logic [D_W-1:0] run;   // running distance carried by the scan

  function automatic logic [D_W-1:0] inc_sat(logic [D_W-1:0] v);
    return (v == INF) ? INF : v + 1'b1;
  endfunction

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; bits <= '0; idx <= '0; run <= INF; done <= 1'b0;
      for (int i = 0; i < W; i++) k[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          bits <= row;
          idx  <= '0;
          run  <= INF;
          st   <= FWD;
        end
        FWD: begin
          if (!bits[idx]) begin
            k[idx] <= '0;
            run    <= '0;
          end else begin
            k[idx] <= inc_sat(run);
            run    <= inc_sat(run);
          end
          if (idx == IW'(W - 1)) begin
            st  <= BWD;
            run <= INF;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        BWD: begin
          if (!bits[idx]) begin
            run <= '0;
          end else begin
            if (inc_sat(run) < k[idx]) k[idx] <= inc_sat(run);
            run <= (inc_sat(run) < k[idx]) ? inc_sat(run) : k[idx];
          end
          if (idx == '0) begin
            st   <= IDLE;
            done <= 1'b1;
          end else begin
            idx <= idx - 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
