// qr_decomp: QR decomposition block of the factor graph inference block.
//
// Performs the partial Householder QR of the local matrix A-bar (the
// factors next to the variable being eliminated, with the right-hand side b
// as its last column) in place: the first n_elim columns are reduced to
// upper-triangular form, and every later column, b included, is updated by
// the same reflectors.
//
// Organisation: one Evaluate unit and NU Update units chained through
// FIFOs. A pass handles NU elimination steps k0 .. k0+NU-1: a reader
// streams columns k0 .. n_cols-1 of the matrix buffer, column by column and
// row by row, into the first FIFO; Update unit u applies reflector k0+u and
// passes the column to the next FIFO; the last unit's stream is written back
// to the buffer. Unit u gets its reflector from the Evaluate unit as soon as
// its pivot column (column k0+u) has passed the units before it, so the
// Evaluate phase of step k+1 overlaps the Update phase of step k. When
// n_elim exceeds NU the units are reused in further passes
// (time-multiplexed).
//
// Interface: while idle, the matrix is written through (ld_we, ld_row,
// ld_col, ld_data) and read through (rd_row, rd_col -> rd_data).
// `start` with n_rows, n_cols and n_elim runs the decomposition; `done`
// pulses at the end. One pass costs about (n_cols-k0)*(2*n_rows+2) cycles
// plus the pipeline fill and the Evaluate latency of its steps.
// The Evaluate/Update pipeline, NU time-multiplexed units and FIFO chaining
// follow the original BLITZCRANK design; NU = 4, the buffer size and the stream
// format are this implementation's choices.
module qr_decomp
  import blitz_pkg::*;
#(
  parameter int NU    = 4,
  parameter int MAX_R = 32,
  parameter int MAX_C = 13
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] n_rows,
  input  logic [7:0] n_cols,
  input  logic [7:0] n_elim,
  output logic       busy,
  output logic       done,
  input  logic       ld_we,
  input  logic [7:0] ld_row,
  input  logic [7:0] ld_col,
  input  fix_t       ld_data,
  input  logic [7:0] rd_row,
  input  logic [7:0] rd_col,
  output fix_t       rd_data
);
  localparam int RW = $clog2(MAX_R);
  localparam int CW = $clog2(MAX_C);

  fix_t mat [MAX_R][MAX_C];

  typedef enum logic [1:0] {IDLE, CFG, RUN} st_e;
  st_e st;
  logic [7:0] k0, rcol, rrow;
  logic       rd_done;
  logic [15:0] wr_left;

  // chain: fifo[u] feeds unit u; unit u feeds fifo[u+1]; fifo[NU] feeds the writer
  logic     f_iv [NU+1], f_ir [NU+1], f_ov [NU+1], f_or [NU+1];
  qr_elem_t f_id [NU+1], f_od [NU+1];

  for (genvar u = 0; u <= NU; u++) begin : g_fifo
    sync_fifo #(.T(qr_elem_t), .DEPTH(4)) u_fifo (
      .clk, .rst_n, .in_valid(f_iv[u]), .in_ready(f_ir[u]), .in_data(f_id[u]),
      .out_valid(f_ov[u]), .out_ready(f_or[u]), .out_data(f_od[u])
    );
  end

  logic [NU-1:0]       ev_req, ev_done;
  logic [7:0]          ev_k    [NU];
  fix_t                ev_data [NU];
  logic [7:0]          ev_addr;
  fix_t                ev_alpha;
  logic signed [63:0]  ev_tau;
  logic                ev_busy;
  logic                cfg_load;

  for (genvar u = 0; u < NU; u++) begin : g_upd
    logic [7:0] step;
    assign step = k0 + 8'(u);
    qr_update #(.MAX_R(MAX_R)) u_upd (
      .clk, .rst_n, .cfg_load, .cfg_k(step), .cfg_rows(n_rows),
      .cfg_active(step < n_elim),
      .in_valid(f_ov[u]), .in_ready(f_or[u]), .in_data(f_od[u]),
      .out_valid(f_iv[u+1]), .out_ready(f_ir[u+1]), .out_data(f_id[u+1]),
      .ev_req(ev_req[u]), .ev_k(ev_k[u]), .ev_addr, .ev_data(ev_data[u]),
      .ev_done(ev_done[u]), .ev_alpha, .ev_tau
    );
  end

  qr_evaluate #(.NU(NU)) u_eval (
    .clk, .rst_n, .req(ev_req), .k(ev_k), .n_rows, .rd_addr(ev_addr),
    .rd_data(ev_data), .done(ev_done), .alpha(ev_alpha), .tau(ev_tau), .busy(ev_busy)
  );

  // reader: matrix buffer -> first FIFO
  always_comb begin
    f_iv[0]      = (st == RUN) && !rd_done;
    f_id[0].data = mat[rrow[RW-1:0]][rcol[CW-1:0]];
    f_id[0].col  = rcol;
    f_id[0].row  = rrow;
  end
  // writer: last FIFO -> matrix buffer
  assign f_or[NU] = (st == RUN);

  assign busy     = (st != IDLE);
  assign cfg_load = (st == CFG);
  assign rd_data  = mat[rd_row[RW-1:0]][rd_col[CW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; k0 <= '0; rcol <= '0; rrow <= '0; rd_done <= 1'b0; wr_left <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          k0 <= '0;
          if (n_elim == '0) done <= 1'b1;
          else              st   <= CFG;
        end
        CFG: begin
          rcol    <= k0;
          rrow    <= '0;
          rd_done <= 1'b0;
          wr_left <= 16'(n_cols - k0) * 16'(n_rows);
          st      <= RUN;
        end
        RUN: begin
          if (f_iv[0] && f_ir[0]) begin
            if (rrow == n_rows - 8'd1) begin
              rrow <= '0;
              if (rcol == n_cols - 8'd1) rd_done <= 1'b1;
              else                       rcol <= rcol + 8'd1;
            end else begin
              rrow <= rrow + 8'd1;
            end
          end
          if (f_ov[NU]) begin
            wr_left <= wr_left - 16'd1;
            if (wr_left == 16'd1) begin
              if (k0 + 8'(NU) >= n_elim) begin
                st   <= IDLE;
                done <= 1'b1;
              end else begin
                k0 <= k0 + 8'(NU);
                st <= CFG;
              end
            end
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == IDLE && ld_we)
      mat[ld_row[RW-1:0]][ld_col[CW-1:0]] <= ld_data;
    else if (st == RUN && f_ov[NU])
      mat[f_od[NU].row[RW-1:0]][f_od[NU].col[CW-1:0]] <= f_od[NU].data;
  end
endmodule
