// apcr_route: XY route computation with lookahead.
//
// route_here is the output port at the router at (cur_x, cur_y) for a packet
// to (dst_x, dst_y): first along x (east or west), then along y (north or
// south), local when both match. route_next is the same computation done for
// the neighbour reached through out_port, which is what lookahead routing
// stores in a head flit before it leaves: the next router then knows its
// output port without a routing stage of its own. The mesh uses +x = east and
// +y = south; that orientation is this design's choice. Purely combinational.
module apcr_route
  import apcr_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  port_e              out_port,
  output port_e              route_here,
  output port_e              route_next
);
  function automatic port_e xy(logic [COORD_W-1:0] cx, logic [COORD_W-1:0] cy,
                               logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    if (dx > cx)      return PORT_EAST;
    else if (dx < cx) return PORT_WEST;
    else if (dy > cy) return PORT_SOUTH;
    else if (dy < cy) return PORT_NORTH;
    else              return PORT_LOCAL;
  endfunction

  logic [COORD_W-1:0] nx, ny;

  always_comb begin
    nx = cur_x;
    ny = cur_y;
    unique case (out_port)
      PORT_EAST:  nx = cur_x + 1'b1;
      PORT_WEST:  nx = cur_x - 1'b1;
      PORT_SOUTH: ny = cur_y + 1'b1;
      PORT_NORTH: ny = cur_y - 1'b1;
      default: ;
    endcase
    route_here = xy(cur_x, cur_y, dst_x, dst_y);
    route_next = xy(nx, ny, dst_x, dst_y);
  end

endmodule
