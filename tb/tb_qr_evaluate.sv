// tb_qr_evaluate: presents random columns from two requesters and checks
// alpha = -sign(x_k)*||x(k:)|| and tau = 1/(||x||(||x||+|x_k|)) against real
// arithmetic, the zero-column case (tau = 0) and that only the granted
// requester gets `done`.
module tb_qr_evaluate;
  import blitz_pkg::*;
  localparam int NU = 2;
  logic clk = 0, rst_n = 0, busy;
  logic [NU-1:0] req = '0, done;
  logic [7:0] k [NU];
  logic [7:0] n_rows, rd_addr;
  fix_t rd_data [NU];
  fix_t alpha;
  logic signed [63:0] tau;
  fix_t col [NU][16];
  int checks = 0, failures = 0;

  qr_evaluate #(.NU(NU)) dut (.*);
  always #5 clk = ~clk;
  always_comb for (int u = 0; u < NU; u++) rd_data[u] = col[u][rd_addr[3:0]];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    n_rows = 8'd12;
    for (int t = 0; t < 10; t++) begin
      int u;
      real nrm, xk, ea, et;
      u = t % NU;
      nrm = 0.0;
      k[u] = 8'(t % 5);
      for (int i = 0; i < 16; i++) col[u][i] = fix_t'($signed($urandom_range(0, 20 * 65536)) - 10 * 65536);
      if (t == 7) for (int i = 0; i < 16; i++) col[u][i] = '0;
      for (int i = int'(k[u]); i < 12; i++) nrm += (real'(col[u][i]) / 65536.0) ** 2;
      nrm = $sqrt(nrm);
      xk = real'(col[u][k[u]]) / 65536.0;
      ea = (nrm == 0.0) ? xk : (xk >= 0.0 ? -nrm : nrm);
      et = (nrm == 0.0) ? 0.0 : 1.0 / (nrm * (nrm + (xk >= 0 ? xk : -xk)));
      @(negedge clk); req[u] = 1;
      while (done == '0) @(negedge clk);
      checks++;
      if (done != NU'(1 << u)) failures++;
      req[u] = 0;
      checks++;
      if (real'(alpha) / 65536.0 - ea > 1e-3 || ea - real'(alpha) / 65536.0 > 1e-3) begin
        failures++; $display("alpha %f exp %f", real'(alpha) / 65536.0, ea);
      end
      checks++;
      if (real'(tau) / (2.0 ** 40) - et > 1e-6 + 1e-4 * et || et - real'(tau) / (2.0 ** 40) > 1e-6 + 1e-4 * et) begin
        failures++; $display("tau %g exp %g", real'(tau) / (2.0 ** 40), et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
