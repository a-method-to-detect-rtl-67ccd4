// route_compute: routing function of one router of the ECCJR mesh.
//
// Minimal dimension-order routing, modified so that packets are drawn
// through junction routers (the routers that carry JTEC decoders and
// encoders): while both X and Y still have to be travelled, the packet takes
// its Y step if the neighbour in that direction is a junction router and
// its X step otherwise; once one coordinate matches, it moves along the
// other. This reproduces the highlighted example path 7 -> 8 -> 9 -> 15 ->
// 21 -> 22 -> 23 -> 29 of the 6x6 network. The method states the goal
// (modified XY order, frequent passage through junction routers) but not
// the rule; the rule is this design's. Destination coordinates beyond the
// mesh (a corrupted header) are clamped to the mesh edge.
//
// Interface: the router's position and the junction map are parameters;
// dst_x_i/dst_y_i -> port_o (eccjr_pkg::port_e). Combinational.
module route_compute
  import eccjr_pkg::*;
#(
  parameter int unsigned MESH_X = 6,
  parameter int unsigned MESH_Y = 6,
  parameter int unsigned X      = 0,
  parameter int unsigned Y      = 0,
  parameter logic [MESH_X*MESH_Y-1:0] JR_MAP = JR_MAP_6X6
) (
  input  logic [COORD_W-1:0] dst_x_i,
  input  logic [COORD_W-1:0] dst_y_i,
  output port_e              port_o
);

  localparam logic [COORD_W-1:0] XC = COORD_W'(X);
  localparam logic [COORD_W-1:0] YC = COORD_W'(Y);
  localparam logic [COORD_W-1:0] XMAX = COORD_W'(MESH_X - 1);
  localparam logic [COORD_W-1:0] YMAX = COORD_W'(MESH_Y - 1);
  // Is the north / south neighbour a junction router?
  localparam bit JR_NORTH = (Y + 1 < MESH_Y) ? JR_MAP[(Y + 1) * MESH_X + X] : 1'b0;
  localparam bit JR_SOUTH = (Y > 0)          ? JR_MAP[(Y - 1) * MESH_X + X] : 1'b0;

  logic [COORD_W-1:0] dx, dy;
  port_e xdir, ydir;

  always_comb begin
    dx   = (dst_x_i > XMAX) ? XMAX : dst_x_i;
    dy   = (dst_y_i > YMAX) ? YMAX : dst_y_i;
    xdir = (dx > XC) ? PORT_EAST  : PORT_WEST;
    ydir = (dy > YC) ? PORT_NORTH : PORT_SOUTH;
    if (dx == XC && dy == YC)  port_o = PORT_LOCAL;
    else if (dx == XC)         port_o = ydir;
    else if (dy == YC)         port_o = xdir;
    else if ((ydir == PORT_NORTH) ? JR_NORTH : JR_SOUTH) port_o = ydir;
    else                       port_o = xdir;
  end

endmodule
