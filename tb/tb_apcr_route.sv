// tb_apcr_route: exhaustive check of XY routing and of the lookahead route
// over an 8x8 mesh, every destination and every output port, against an
// independent model (x first, then y; east = +x, south = +y).
module tb_apcr_route;
  import apcr_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port, route_here, route_next;
  int checks = 0, failures = 0;

  apcr_route dut (.*);

  function automatic port_e model(int cx, int cy, int dx, int dy);
    if (dx != cx) return (dx > cx) ? PORT_EAST : PORT_WEST;
    if (dy != cy) return (dy > cy) ? PORT_SOUTH : PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++) for (int cy = 0; cy < 8; cy++)
    for (int dx = 0; dx < 8; dx++) for (int dy = 0; dy < 8; dy++) begin
      port_e here;
      int nx, ny;
      here = model(cx, cy, dx, dy);
      nx = cx + (here == PORT_EAST) - (here == PORT_WEST);
      ny = cy + (here == PORT_SOUTH) - (here == PORT_NORTH);
      cur_x = COORD_W'(cx); cur_y = COORD_W'(cy);
      dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
      out_port = here;
      #1;
      checks++;
      if (route_here != here || route_next != model(nx, ny, dx, dy)) begin
        failures++;
        if (failures < 10)
          $display("(%0d,%0d)->(%0d,%0d): here %0d/%0d next %0d/%0d", cx, cy, dx, dy,
                   route_here, here, route_next, model(nx, ny, dx, dy));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
