// xy_route: static dimension-order route computation of one switch.
//
// Given the destination endpoint of a head flit, picks the output port of the
// switch at (X, Y): first along X (east/west), then along Y (north/south,
// y grows southwards, tile 0 in the north-west corner), then to the local
// network interface selected by the endpoint's low bit (0: core NI on port
// NI1, 1: L2 NI on port NI2). The published design says only that routing is
// static; dimension-order XY routing is this implementation's choice, being
// deadlock-free on a mesh without virtual channels. Purely combinational.
module xy_route #(
  parameter int unsigned MESH_X = ccnoc_pkg::MESH_X,
  parameter int unsigned MESH_Y = ccnoc_pkg::MESH_Y,
  parameter int unsigned X      = 0,
  parameter int unsigned Y      = 0
) (
  input  logic [ccnoc_pkg::EP_W-1:0]   dst,
  output ccnoc_pkg::port_e             port
);
  import ccnoc_pkg::*;

  localparam int unsigned TW = EP_W - 1;

  logic [TW-1:0] tile;
  int unsigned   dx, dy;

  assign tile = dst[EP_W-1:1];

  always_comb begin
    dx = int'(tile) % MESH_X;
    dy = int'(tile) / MESH_X;
    if (dx > X)       port = P_E;
    else if (dx < X)  port = P_W;
    else if (dy > Y)  port = P_S;
    else if (dy < Y)  port = P_N;
    else if (dst[0])  port = P_NI2;
    else              port = P_NI1;
  end

endmodule
