// tb_input_buffer: writes a random map and random states through the host
// ports, then reads every map row through the row port and every state
// through the state port and compares them with a copy kept by the
// testbench.
module tb_input_buffer;
  import blitz_pkg::*;
  localparam int DOF = 2, N = 5, MW = 8, MH = 4;
  logic clk = 0, map_we = 0, st_we = 0;
  logic [2:0] map_x;
  logic [1:0] map_y, row_addr;
  logic [7:0] map_data, row_data [MW];
  logic [2:0] st_idx, rd_idx;
  logic [1:0] st_comp;
  fix_t st_data, rd_state [2*DOF];
  logic [7:0] gm [MH][MW];
  fix_t tm [N][2*DOF];
  int checks = 0, failures = 0;

  input_buffer #(.DOF(DOF), .N(N), .MAP_W(MW), .MAP_H(MH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < MH; y++) for (int x = 0; x < MW; x++) begin
      gm[y][x] = 8'($urandom);
      @(negedge clk); map_we = 1; map_x = 3'(x); map_y = 2'(y); map_data = gm[y][x];
    end
    @(negedge clk); map_we = 0;
    for (int i = 0; i < N; i++) for (int c = 0; c < 2 * DOF; c++) begin
      tm[i][c] = fix_t'($urandom);
      @(negedge clk); st_we = 1; st_idx = 3'(i); st_comp = 2'(c); st_data = tm[i][c];
    end
    @(negedge clk); st_we = 0;
    for (int y = 0; y < MH; y++) begin
      row_addr = 2'(y); #1;
      for (int x = 0; x < MW; x++) begin
        checks++;
        if (row_data[x] != gm[y][x]) begin failures++; $display("map %0d %0d", y, x); end
      end
    end
    for (int i = 0; i < N; i++) begin
      rd_idx = 3'(i); #1;
      for (int c = 0; c < 2 * DOF; c++) begin
        checks++;
        if (rd_state[c] != tm[i][c]) begin failures++; $display("state %0d %0d", i, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
