// dec_noc: bufferless network-on-chip with M bridged subnetworks
// (Deflection Containment, DeC).
//
// K_X x K_Y nodes, each a dec_ni network interface and a dec_router with one
// sub-router per subnetwork. The M subnetworks are complete, independent
// 2-D meshes (TORUS=0) or tori (TORUS=1) of 128-bit links plus 32-bit
// header wires; they meet only inside each node, where the bypass ring
// lets a contending flit change subnetwork instead of being deflected.
// Node n sits at x = n % K_X, y = n / K_X; x grows to the East and y to the
// North. On a mesh, links that would leave the grid are absent; on a torus
// the edge nodes are joined by wrap-around links.
//
// Interface per node: a packet port (pkt_*) into the network interface and
// one ejection flit per subnetwork (ej_flit, valid inside) straight from
// the sub-routers; packets are not reassembled. The cnt_* outputs are
// running totals since reset of injected and ejected flits, deflections,
// bypass-ring transfers and injection attempts refused because a router
// was full. A flit needs three cycles per hop and one extra cycle for a
// bypass transfer.
//
// The subnetworks, the mesh and torus topologies and the 8x8 DeC2 default
// follow the original design; the coordinate convention, the packet port
// and the event counters are this design's choices.
module dec_noc
  import dec_pkg::*;
#(
  parameter int K_X    = 8,
  parameter int K_Y    = 8,
  parameter bit TORUS  = 1'b0,
  parameter int M      = NUM_SUBNETS,
  parameter int QDEPTH = 8,
  localparam int NODES = K_X * K_Y
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NODES-1:0]            pkt_valid,
  output logic [NODES-1:0]            pkt_ready,
  input  logic [COORD_W-1:0]          pkt_dst_x [NODES],
  input  logic [COORD_W-1:0]          pkt_dst_y [NODES],
  input  logic [LEN_W-1:0]            pkt_len   [NODES],
  input  logic [PKT_FLITS*DATA_W-1:0] pkt_data  [NODES],
  output flit_t                       ej_flit   [NODES][M],
  output logic [31:0]                 cnt_inject,
  output logic [31:0]                 cnt_eject,
  output logic [31:0]                 cnt_deflect,
  output logic [31:0]                 cnt_bypass,
  output logic [31:0]                 cnt_throttle
);

  flit_t      out_link    [NODES][M][NUM_DIRS];
  flit_t      in_link     [NODES][M][NUM_DIRS];
  logic [2:0] load        [NODES][M];
  logic [M-1:0] inj_valid [NODES];
  flit_t      inj_flit    [NODES][M];
  logic [M-1:0] inj_grant [NODES];
  logic [2:0] ev_deflect  [NODES][M];
  logic [M-1:0] ev_bypass [NODES];
  logic [M-1:0] ev_eject  [NODES];
  logic [M-1:0] ev_inject [NODES];
  logic [M-1:0] ev_throttle [NODES];

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam int X  = n % K_X;
    localparam int Y  = n / K_X;
    localparam int NE = Y * K_X + ((X + 1) % K_X);          // East neighbour
    localparam int NW = Y * K_X + ((X + K_X - 1) % K_X);    // West neighbour
    localparam int NN = ((Y + 1) % K_Y) * K_X + X;          // North neighbour
    localparam int NS = ((Y + K_Y - 1) % K_Y) * K_X + X;    // South neighbour
    localparam bit HAS_E = TORUS || (X < K_X - 1);
    localparam bit HAS_W = TORUS || (X > 0);
    localparam bit HAS_N = TORUS || (Y < K_Y - 1);
    localparam bit HAS_S = TORUS || (Y > 0);

    for (genvar m = 0; m < M; m++) begin : g_sub
      // The flit arriving from direction d left the neighbour there through
      // that neighbour's opposite port.
      assign in_link[n][m][2'(PORT_E)] = HAS_E ? out_link[NE][m][2'(PORT_W)] : '0;
      assign in_link[n][m][2'(PORT_W)] = HAS_W ? out_link[NW][m][2'(PORT_E)] : '0;
      assign in_link[n][m][2'(PORT_N)] = HAS_N ? out_link[NN][m][2'(PORT_S)] : '0;
      assign in_link[n][m][2'(PORT_S)] = HAS_S ? out_link[NS][m][2'(PORT_N)] : '0;
    end

    dec_ni #(.M(M), .QDEPTH(QDEPTH)) u_ni (
      .clk       (clk),
      .rst_n     (rst_n),
      .my_x      (COORD_W'(X)),
      .my_y      (COORD_W'(Y)),
      .pkt_valid (pkt_valid[n]),
      .pkt_ready (pkt_ready[n]),
      .pkt_dst_x (pkt_dst_x[n]),
      .pkt_dst_y (pkt_dst_y[n]),
      .pkt_len   (pkt_len[n]),
      .pkt_data  (pkt_data[n]),
      .load      (load[n]),
      .inj_valid (inj_valid[n]),
      .inj_flit  (inj_flit[n]),
      .inj_grant (inj_grant[n])
    );

    dec_router #(.K_X(K_X), .K_Y(K_Y), .TORUS(TORUS), .M(M)) u_router (
      .clk         (clk),
      .rst_n       (rst_n),
      .cur_x       (COORD_W'(X)),
      .cur_y       (COORD_W'(Y)),
      .in_link     (in_link[n]),
      .out_link    (out_link[n]),
      .inj_valid   (inj_valid[n]),
      .inj_flit    (inj_flit[n]),
      .inj_grant   (inj_grant[n]),
      .ej_flit     (ej_flit[n]),
      .load        (load[n]),
      .ev_deflect  (ev_deflect[n]),
      .ev_bypass   (ev_bypass[n]),
      .ev_eject    (ev_eject[n]),
      .ev_inject   (ev_inject[n]),
      .ev_throttle (ev_throttle[n])
    );
  end

  // Network-wide event totals.
  logic [31:0] sum_inj, sum_ej, sum_defl, sum_byp, sum_thr;

  always_comb begin
    sum_inj = '0; sum_ej = '0; sum_defl = '0; sum_byp = '0; sum_thr = '0;
    for (int n = 0; n < NODES; n++)
      for (int m = 0; m < M; m++) begin
        sum_inj  = sum_inj  + 32'(ev_inject[n][m]);
        sum_ej   = sum_ej   + 32'(ev_eject[n][m]);
        sum_defl = sum_defl + 32'(ev_deflect[n][m]);
        sum_byp  = sum_byp  + 32'(ev_bypass[n][m]);
        sum_thr  = sum_thr  + 32'(ev_throttle[n][m]);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_inject   <= '0;
      cnt_eject    <= '0;
      cnt_deflect  <= '0;
      cnt_bypass   <= '0;
      cnt_throttle <= '0;
    end else begin
      cnt_inject   <= cnt_inject   + sum_inj;
      cnt_eject    <= cnt_eject    + sum_ej;
      cnt_deflect  <= cnt_deflect  + sum_defl;
      cnt_bypass   <= cnt_bypass   + sum_byp;
      cnt_throttle <= cnt_throttle + sum_thr;
    end
  end

endmodule
