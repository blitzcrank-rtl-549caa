// tb_qr_update: drives one Update unit directly. It streams a pivot column
// and two further columns, answers the Evaluate request with alpha and tau
// computed in the testbench, applies back-pressure on the output, and
// checks the emitted columns against P = I - tau*v*v^T in real arithmetic.
// A last column with an index below k must pass unchanged.
module tb_qr_update;
  import blitz_pkg::*;
  localparam int MAX_R = 8, R = 6, K = 1;
  logic clk = 0, rst_n = 0, cfg_load = 0, cfg_active = 1;
  logic [7:0] cfg_k = 8'(K), cfg_rows = 8'(R);
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  qr_elem_t in_data, out_data;
  logic ev_req, ev_done = 0;
  logic [7:0] ev_k, ev_addr = '0;
  fix_t ev_data, ev_alpha = '0;
  logic signed [63:0] ev_tau = '0;
  real a [4][R];
  real v [R];
  real al, tau;
  int colid [4] = '{1, 2, 3, 0};
  int checks = 0, failures = 0;

  qr_update #(.MAX_R(MAX_R)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real nrm = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_load = 1; @(negedge clk); cfg_load = 0;
    for (int c = 0; c < 4; c++) for (int r = 0; r < R; r++)
      a[c][r] = real'($signed($urandom_range(0, 8 * 65536)) - 4 * 65536) / 65536.0;
    for (int r = K; r < R; r++) nrm += a[0][r] ** 2;
    nrm = $sqrt(nrm);
    al  = (a[0][K] >= 0) ? -nrm : nrm;
    tau = 1.0 / (nrm * (nrm + (a[0][K] >= 0 ? a[0][K] : -a[0][K])));
    for (int r = 0; r < R; r++) v[r] = (r < K) ? 0.0 : a[0][r];
    v[K] = a[0][K] - al;
    for (int c = 0; c < 4; c++) begin
      // feed one column
      for (int r = 0; r < R; r++) begin
        while (!in_ready) @(negedge clk);
        in_valid = 1;
        in_data.data = fix_t'($rtoi(a[c][r] * 65536.0));
        in_data.col  = 8'(colid[c]);
        in_data.row  = 8'(r);
        @(negedge clk);
        in_valid = 0;
      end
      if (c == 0) begin
        while (!ev_req) @(negedge clk);
        ev_alpha = fix_t'($rtoi(al * 65536.0));
        ev_tau   = longint'(tau * (2.0 ** 40));
        ev_done  = 1; @(negedge clk); ev_done = 0;
      end
      // collect it, with a stall every other cycle
      for (int r = 0; r < R; r++) begin
        real e, g, dot;
        dot = 0.0;
        out_ready = 0; @(negedge clk);
        out_ready = 1;
        while (!out_valid) @(negedge clk);
        for (int i = 0; i < R; i++) dot += v[i] * a[c][i];
        if (c == 3)      e = a[c][r];
        else if (c == 0) e = (r < K) ? a[c][r] : (r == K) ? al : 0.0;
        else             e = a[c][r] - tau * v[r] * dot;
        g = real'(out_data.data) / 65536.0;
        checks++;
        if (g - e > 2e-3 || e - g > 2e-3 || out_data.row != 8'(r) || out_data.col != 8'(colid[c])) begin
          failures++;
          $display("col %0d row %0d got %f exp %f", c, r, g, e);
        end
        @(negedge clk);
      end
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
