// tb_xy_route: exhaustive check of XY route computation on a 4 x 4 mesh.
//
// Every (switch, destination) pair is applied. Expected port: east/west while
// the columns differ, then south/north while the rows differ (row 0 is the
// north edge), then local. A second check walks each route hop by hop and
// requires arrival in exactly |dx| + |dy| hops.
module tb_xy_route;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  port_e p;

  xy_route dut (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .out_port(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++)
      for (int tx = 0; tx < 4; tx++) for (int ty = 0; ty < 4; ty++) begin
        port_e e;
        int hops, ax, ay;
        cx = COORD_W'(x); cy = COORD_W'(y); dx = COORD_W'(tx); dy = COORD_W'(ty); #1;
        if (tx > x) e = PORT_EAST; else if (tx < x) e = PORT_WEST;
        else if (ty > y) e = PORT_SOUTH; else if (ty < y) e = PORT_NORTH; else e = PORT_LOCAL;
        checks++;
        if (p != e) begin failures++; $display("(%0d,%0d)->(%0d,%0d) got %s exp %s", x, y, tx, ty, p.name(), e.name()); end
        // Walk the route.
        ax = x; ay = y; hops = 0;
        while (hops < 10) begin
          cx = COORD_W'(ax); cy = COORD_W'(ay); #1;
          if (p == PORT_LOCAL) break;
          case (p)
            PORT_EAST:  ax++;
            PORT_WEST:  ax--;
            PORT_SOUTH: ay++;
            default:    ay--;
          endcase
          hops++;
        end
        checks++;
        if (ax != tx || ay != ty || hops != (tx > x ? tx - x : x - tx) + (ty > y ? ty - y : y - ty)) begin
          failures++; $display("walk (%0d,%0d)->(%0d,%0d) ended (%0d,%0d) in %0d hops", x, y, tx, ty, ax, ay, hops);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
