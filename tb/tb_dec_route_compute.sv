// tb_dec_route_compute: exhaustive check of route computation on an 8x8 mesh
// and an 8x8 torus (and a 5x3 torus for odd ring sizes). The expected port
// is derived from signed hop distances: on the mesh the sign of dx then dy;
// on the torus the shorter of the two ways round each ring, East/North on a
// tie.
module tb_dec_route_compute;
  import dec_pkg::*;

  int checks = 0, failures = 0;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  port_e p_mesh, p_torus, p_odd;

  dec_route_compute #(.K_X(8), .K_Y(8), .TORUS(1'b0)) u_mesh  (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .port(p_mesh));
  dec_route_compute #(.K_X(8), .K_Y(8), .TORUS(1'b1)) u_torus (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .port(p_torus));
  dec_route_compute #(.K_X(5), .K_Y(3), .TORUS(1'b1)) u_odd   (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .port(p_odd));

  function automatic port_e ref_route(int kx, int ky, bit torus, int x0, int y0, int x1, int y1);
    int ddx, ddy, fx, fy;
    ddx = x1 - x0; ddy = y1 - y0;
    if (!torus) begin
      if (ddx > 0) return PORT_E;
      if (ddx < 0) return PORT_W;
      if (ddy > 0) return PORT_N;
      if (ddy < 0) return PORT_S;
      return PORT_LOCAL;
    end
    fx = ((ddx % kx) + kx) % kx;   // hops going East
    fy = ((ddy % ky) + ky) % ky;   // hops going North
    if (fx != 0) return (fx <= kx - fx) ? PORT_E : PORT_W;
    if (fy != 0) return (fy <= ky - fy) ? PORT_N : PORT_S;
    return PORT_LOCAL;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        for (int c = 0; c < 8; c++)
          for (int d = 0; d < 8; d++) begin
            cx = COORD_W'(a); cy = COORD_W'(b); dx = COORD_W'(c); dy = COORD_W'(d);
            #1;
            checks++;
            if (p_mesh != ref_route(8, 8, 0, a, b, c, d)) begin
              failures++;
              $display("mesh (%0d,%0d)->(%0d,%0d) got %s", a, b, c, d, p_mesh.name());
            end
            checks++;
            if (p_torus != ref_route(8, 8, 1, a, b, c, d)) begin
              failures++;
              $display("torus (%0d,%0d)->(%0d,%0d) got %s", a, b, c, d, p_torus.name());
            end
            if (a < 5 && c < 5 && b < 3 && d < 3) begin
              checks++;
              if (p_odd != ref_route(5, 3, 1, a, b, c, d)) begin
                failures++;
                $display("torus5x3 (%0d,%0d)->(%0d,%0d) got %s", a, b, c, d, p_odd.name());
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
