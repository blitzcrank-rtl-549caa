// input_buffer: on-chip input storage of the accelerator.
//
// Holds what the host loads before a planning run: the occupancy grid map G
// (MAP_H x MAP_W cells, 8-bit occupancy each) and the initial trajectory
// Theta (N states of 2*DOF Q16.16 values). The host writes one map cell or
// one state component per cycle. The SDF block reads a whole map row per
// cycle (row-parallel port, combinational); the controller reads one state
// vector per cycle (combinational).
// The buffer's role follows the original BLITZCRANK design; its organisation and
// ports are this implementation's choices.
module input_buffer
  import blitz_pkg::*;
#(
  parameter int DOF   = 3,
  parameter int N     = 20,
  parameter int MAP_W = 64,
  parameter int MAP_H = 64
) (
  input  logic                       clk,
  input  logic                       map_we,
  input  logic [$clog2(MAP_W)-1:0]   map_x,
  input  logic [$clog2(MAP_H)-1:0]   map_y,
  input  logic [7:0]                 map_data,
  input  logic                       st_we,
  input  logic [$clog2(N)-1:0]       st_idx,
  input  logic [$clog2(2*DOF)-1:0]   st_comp,
  input  fix_t                       st_data,
  input  logic [$clog2(MAP_H)-1:0]   row_addr,
  output logic [7:0]                 row_data [MAP_W],
  input  logic [$clog2(N)-1:0]       rd_idx,
  output fix_t                       rd_state [2*DOF]
);
  logic [7:0] g     [MAP_H][MAP_W];
  fix_t       theta [N][2*DOF];

  always_ff @(posedge clk) begin
    if (map_we) g[map_y][map_x] <= map_data;
    if (st_we)  theta[st_idx][st_comp] <= st_data;
  end

  assign row_data = g[row_addr];
  assign rd_state = theta[rd_idx];
endmodule
