// dec_route_compute: route computation of a DeC sub-router.
//
// Mesh (TORUS=0): dimension-order X-Y routing. The flit first travels along
// x (East when the destination x is larger, West when smaller), then along y
// (North when larger, South when smaller); at its destination it asks for
// Local.
// Torus (TORUS=1): still X first, then Y, but each dimension picks the
// shorter way round its ring of K nodes, using the wrap-around links. When
// both ways are equally long (destination exactly K/2 away) this design goes
// East or North.
// Purely combinational; the coordinate convention is x to the East, y to
// the North.
//
// X-Y routing on the mesh and lowest hop count on the torus follow the
// original design; the East/North tie-break is this design's choice.
module dec_route_compute
  import dec_pkg::*;
#(
  parameter int K_X   = 8,
  parameter int K_Y   = 8,
  parameter bit TORUS = 1'b0
) (
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              port
);

  // Hops needed going in the positive direction (East / North) round a ring.
  function automatic logic [COORD_W:0] fwd_dist(logic [COORD_W-1:0] cur,
                                                logic [COORD_W-1:0] dst,
                                                logic [COORD_W:0] k);
    logic [COORD_W:0] d;
    if (dst >= cur) d = {1'b0, dst} - {1'b0, cur};
    else            d = {1'b0, dst} + k - {1'b0, cur};
    return d;
  endfunction

  logic [COORD_W:0] dx, dy;

  always_comb begin
    dx   = fwd_dist(cur_x, dst_x, (COORD_W+1)'(K_X));
    dy   = fwd_dist(cur_y, dst_y, (COORD_W+1)'(K_Y));
    port = PORT_LOCAL;
    if (!TORUS) begin
      if      (dst_x > cur_x) port = PORT_E;
      else if (dst_x < cur_x) port = PORT_W;
      else if (dst_y > cur_y) port = PORT_N;
      else if (dst_y < cur_y) port = PORT_S;
    end else begin
      if (dx != '0)      port = (2 * dx <= (COORD_W+1)'(K_X)) ? PORT_E : PORT_W;
      else if (dy != '0) port = (2 * dy <= (COORD_W+1)'(K_Y)) ? PORT_N : PORT_S;
    end
  end

endmodule
