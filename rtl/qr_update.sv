// qr_update: Update unit of the QR decomposition block.
//
// Applies one Householder reflector P = I - tau*v*v^T (step k) to a stream
// of matrix columns. Columns arrive one element per cycle, rows in order,
// through a valid/ready input; each column is buffered while the dot product
// v.a is accumulated, then streamed out as a - v*(tau * v.a).
//   * columns with index < k pass unchanged (already final);
//   * the column with index k is the pivot: the unit asks the shared
//     Evaluate unit for alpha and tau, forms v from the buffered column and
//     emits the pivot column as alpha on row k and zeros below it;
//   * when the unit is inactive in this pass, every column passes unchanged.
// Units are chained through FIFOs, so while unit u updates later columns the
// Evaluate unit can already build the reflector of unit u+1 from the pivot
// column unit u has just produced.
//
// Timing: R cycles to take in a column, one cycle to form the scale
// factor, R cycles to emit it (no overlap). `cfg_load` (pulse) sets the
// step k, the row count and `active` for a new pass and clears the
// reflector. The streaming/FIFO organisation follows the original
// BLITZCRANK design; buffer sizes and the handshake are this implementation's.
module qr_update
  import blitz_pkg::*;
#(
  parameter int MAX_R = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_load,
  input  logic [7:0]         cfg_k,
  input  logic [7:0]         cfg_rows,
  input  logic               cfg_active,
  // column stream in
  input  logic               in_valid,
  output logic               in_ready,
  input  qr_elem_t           in_data,
  // column stream out
  output logic               out_valid,
  input  logic               out_ready,
  output qr_elem_t           out_data,
  // Evaluate unit
  output logic               ev_req,
  output logic [7:0]         ev_k,
  input  logic [7:0]         ev_addr,
  output fix_t               ev_data,
  input  logic               ev_done,
  input  fix_t               ev_alpha,
  input  logic signed [63:0] ev_tau
);
  typedef enum logic [2:0] {LOAD, DECIDE, EVAL, SCALE, EMIT} st_e;
  st_e st;

  fix_t               buf_a [MAX_R];
  fix_t               v     [MAX_R];
  logic [7:0]         k, rows, col, idx;
  logic               active;
  logic signed [63:0] tau;
  acc_t               dot;
  fix_t               f;
  fix_t               alpha;
  logic               pivot_out;   // emitting the pivot column
  logic               pass_out;    // emitting unchanged

  assign in_ready = (st == LOAD);
  assign ev_req   = (st == EVAL);
  assign ev_k     = k;
  assign ev_data  = buf_a[ev_addr[$clog2(MAX_R)-1:0]];

  logic signed [127:0] prod;
  always_comb prod = 128'(dot) * 128'(tau);

  // output element
  always_comb begin
    out_valid     = (st == EMIT);
    out_data.col  = col;
    out_data.row  = idx;
    if (pass_out)
      out_data.data = buf_a[idx[$clog2(MAX_R)-1:0]];
    else if (pivot_out)
      out_data.data = (idx < k) ? buf_a[idx[$clog2(MAX_R)-1:0]] : (idx == k) ? alpha : '0;
    else
      out_data.data = buf_a[idx[$clog2(MAX_R)-1:0]] - fmul(v[idx[$clog2(MAX_R)-1:0]], f);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= LOAD; k <= '0; rows <= 8'd1; col <= '0; idx <= '0; active <= 1'b0;
      tau <= '0; dot <= '0; f <= '0; alpha <= '0; pivot_out <= 1'b0; pass_out <= 1'b0;
      for (int i = 0; i < MAX_R; i++) begin buf_a[i] <= '0; v[i] <= '0; end
    end else if (cfg_load) begin
      st <= LOAD; k <= cfg_k; rows <= cfg_rows; active <= cfg_active; idx <= '0; dot <= '0;
      tau <= '0;
      for (int i = 0; i < MAX_R; i++) v[i] <= '0;
    end else begin
      unique case (st)
        LOAD: if (in_valid) begin
          buf_a[in_data.row[$clog2(MAX_R)-1:0]] <= in_data.data;
          dot <= dot + fmul_wide(v[in_data.row[$clog2(MAX_R)-1:0]], in_data.data);
          col <= in_data.col;
          if (in_data.row == rows - 8'd1) st <= DECIDE;
        end
        DECIDE: begin
          pivot_out <= 1'b0;
          pass_out  <= 1'b0;
          if (!active || col < k) begin
            pass_out <= 1'b1;
            idx      <= '0;
            st       <= EMIT;
          end else if (col == k) begin
            pivot_out <= 1'b1;
            st        <= EVAL;
          end else begin
            st <= SCALE;
          end
        end
        EVAL: if (ev_done) begin
          alpha <= ev_alpha;
          tau   <= ev_tau;
          for (int i = 0; i < MAX_R; i++) begin
            if (8'(i) < k || 8'(i) >= rows) v[i] <= '0;
            else if (8'(i) == k)           v[i] <= buf_a[i] - ev_alpha;
            else                           v[i] <= buf_a[i];
          end
          idx <= '0;
          st  <= EMIT;
        end
        SCALE: begin
          f   <= fix_t'(prod >>> 56);   // Q32.32 * Q24.40 -> Q16.16
          idx <= '0;
          st  <= EMIT;
        end
        EMIT: if (out_ready) begin
          if (idx == rows - 8'd1) begin
            st  <= LOAD;
            dot <= '0;
          end else begin
            idx <= idx + 8'd1;
          end
        end
        default: st <= LOAD;
      endcase
    end
  end
endmodule
