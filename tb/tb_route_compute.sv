// tb_route_compute: exhaustive check of XY routing over all router and
// destination positions of an 8x8 mesh against an independent rule:
// X first (east if the destination is further right), then Y (north if
// further up), local when both match.
module tb_route_compute;
  import noc_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port;
  int checks = 0, failures = 0;

  route_compute dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++)
      for (int cy = 0; cy < 8; cy++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            port_e e;
            cur_x = COORD_W'(cx); cur_y = COORD_W'(cy);
            dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
            #1;
            if (dx != cx)      e = (dx > cx) ? PORT_EAST : PORT_WEST;
            else if (dy != cy) e = (dy > cy) ? PORT_NORTH : PORT_SOUTH;
            else               e = PORT_LOCAL;
            checks++;
            if (out_port != e) begin
              failures++;
              if (failures < 10) $display("(%0d,%0d)->(%0d,%0d): got %s exp %s",
                                          cx, cy, dx, dy, out_port.name(), e.name());
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
