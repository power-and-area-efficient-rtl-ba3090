// route_compute: routing computation (RC) for a head flit.
//
// Dimension-ordered XY routing on a 2-D mesh: the packet first travels along
// X until its column matches, then along Y, and leaves at the local port when
// both match. Y grows towards north. The router's own coordinates are inputs,
// so one netlist serves every mesh position. The routing algorithm is this
// design's choice; the router only needs one output port per packet.
// Purely combinational; the router registers the result (RC stage).
module route_compute
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);
  always_comb begin
    if (dst_x > cur_x)      out_port = PORT_EAST;
    else if (dst_x < cur_x) out_port = PORT_WEST;
    else if (dst_y > cur_y) out_port = PORT_NORTH;
    else if (dst_y < cur_y) out_port = PORT_SOUTH;
    else                    out_port = PORT_LOCAL;
  end
endmodule
