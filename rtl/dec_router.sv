// dec_router: DeC router of one node, M sub-routers bridged by a bypass ring.
//
// Each of the M subnetworks has its own physical sub-router at this node,
// with its own links to the four neighbours. The Bypass output of
// sub-router m is wired to the bypass input of sub-router (m+1) mod M, so
// the bypass channels form a one-directional ring through all subnetworks
// of the node. A flit that loses contention in one subnetwork moves over
// this ring into the next subnetwork and competes there one cycle later,
// instead of being deflected away from its destination.
// Injection and ejection are per subnetwork; load reports how many flits
// each sub-router holds in stage 2, for the network interface to pick the
// least loaded subnetwork. Timing is that of dec_subrouter.
//
// The bypass ring follows the original design; its direction (m to m+1) is
// this design's choice.
module dec_router
  import dec_pkg::*;
#(
  parameter int K_X   = 8,
  parameter int K_Y   = 8,
  parameter bit TORUS = 1'b0,
  parameter int M     = NUM_SUBNETS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  flit_t              in_link     [M][NUM_DIRS],
  output flit_t              out_link    [M][NUM_DIRS],
  input  logic [M-1:0]       inj_valid,
  input  flit_t              inj_flit    [M],
  output logic [M-1:0]       inj_grant,
  output flit_t              ej_flit     [M],
  output logic [2:0]         load        [M],
  output logic [2:0]         ev_deflect  [M],
  output logic [M-1:0]       ev_bypass,
  output logic [M-1:0]       ev_eject,
  output logic [M-1:0]       ev_inject,
  output logic [M-1:0]       ev_throttle
);

  flit_t byp_out [M];

  for (genvar m = 0; m < M; m++) begin : g_sub
    dec_subrouter #(.K_X(K_X), .K_Y(K_Y), .TORUS(TORUS)) u_sub (
      .clk         (clk),
      .rst_n       (rst_n),
      .cur_x       (cur_x),
      .cur_y       (cur_y),
      .in_link     (in_link[m]),
      .out_link    (out_link[m]),
      .byp_in      (byp_out[(m + M - 1) % M]),
      .byp_out     (byp_out[m]),
      .inj_valid   (inj_valid[m]),
      .inj_flit    (inj_flit[m]),
      .inj_grant   (inj_grant[m]),
      .ej_flit     (ej_flit[m]),
      .load        (load[m]),
      .ev_deflect  (ev_deflect[m]),
      .ev_bypass   (ev_bypass[m]),
      .ev_eject    (ev_eject[m]),
      .ev_inject   (ev_inject[m]),
      .ev_throttle (ev_throttle[m])
    );
  end

endmodule
