// sync_fifo: small synchronous FIFO with a valid/ready interface on both
// sides, used between the Update units of the QR block.
//
// Storage is a circular buffer of DEPTH entries (DEPTH a power of two).
// A write happens when in_valid && in_ready, a read when out_valid &&
// out_ready; both may happen in the same cycle. out_data shows the oldest
// entry combinationally (first-word fall-through), so an element can pass
// from one unit to the next with one cycle of latency.
module sync_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  localparam int AW = $clog2(DEPTH);
  T mem [DEPTH];
  logic [AW:0] wp, rp;

  assign in_ready  = (wp - rp) != (AW+1)'(DEPTH);
  assign out_valid = (wp != rp);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;

  // the fill level never exceeds the depth
  a_level: assert property (@(posedge clk) disable iff (!rst_n)
                            (wp - rp) <= (AW+1)'(DEPTH));
endmodule
