// dec_subrouter: bufferless two-stage router of one DeC subnetwork.
//
// A sub-router holds no buffers, only pipeline registers of one flit each:
//   link register  latches the four neighbour links (N,S,E,W);
//   stage 1        computes each flit's desired port (X-Y routing, or the
//                  shortest way round on a torus) and ranks the four flits
//                  with a two-stage partial permutation network, so the
//                  oldest flit ends on channel 0;
//   stage register holds the four ranked channels;
//   stage 2        adds the flit arriving on the bypass ring as channel 4
//                  (route recomputed here, lowest priority), ejects one
//                  local flit, injects one flit from the node if a channel
//                  is free, allocates ports in parallel and switches the
//                  flits through the crossbar;
//   output register drives the four links and the bypass channel.
// A hop therefore takes three cycles. A flit that lost contention is sent to
// the Bypass port when that port is free; the next subnetwork's sub-router
// of the same node takes it straight into its own stage 2 one cycle later,
// where it competes for its port again instead of travelling a detour.
//
// Every flit must leave every cycle. Ports that do not exist at mesh edges
// are never allocated, and injection is held off when the router already
// holds as many flits as it has output ports.
//
// The ev_* outputs are per-cycle event flags of this design, used to count
// deflections, bypasses, ejections, injections and throttled injections.
// Pipeline registers load their data only for valid flits (clock-enable
// form of clock gating); only valid bits are reset.
//
// The two stages, their contents and the one-cycle bypass follow the
// original design; the register placement, the bypassed flit entering stage
// 2 directly and the event outputs are this design's choices.
module dec_subrouter
  import dec_pkg::*;
#(
  parameter int K_X   = 8,
  parameter int K_Y   = 8,
  parameter bit TORUS = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  flit_t              in_link  [NUM_DIRS],
  output flit_t              out_link [NUM_DIRS],
  input  flit_t              byp_in,
  output flit_t              byp_out,
  input  logic               inj_valid,
  input  flit_t              inj_flit,
  output logic               inj_grant,
  output flit_t              ej_flit,
  output logic [2:0]         load,
  output logic [2:0]         ev_deflect,
  output logic               ev_bypass,
  output logic               ev_eject,
  output logic               ev_inject,
  output logic               ev_throttle
);

  // ---------------------------------------------------------------- edges
  logic [NUM_CH-1:0] port_avail;
  logic [2:0]        num_ports;

  always_comb begin
    port_avail           = '1;
    port_avail[PORT_N]   = TORUS || (cur_y < COORD_W'(K_Y - 1));
    port_avail[PORT_S]   = TORUS || (cur_y != '0);
    port_avail[PORT_E]   = TORUS || (cur_x < COORD_W'(K_X - 1));
    port_avail[PORT_W]   = TORUS || (cur_x != '0);
    num_ports            = '0;
    for (int p = 0; p < NUM_CH; p++)
      if (port_avail[p]) num_ports = num_ports + 3'd1;
  end

  // -------------------------------------------------------- link register
  flit_t r0 [NUM_DIRS];

  always_ff @(posedge clk) begin
    for (int d = 0; d < NUM_DIRS; d++) begin
      if (!rst_n) r0[d].valid <= 1'b0;
      else        r0[d].valid <= in_link[d].valid && port_avail[d];
      if (in_link[d].valid) begin
        r0[d].hdr  <= in_link[d].hdr;
        r0[d].data <= in_link[d].data;
      end
    end
  end

  // -------------------------------------------------------------- stage 1
  chan_t s1_ch     [NUM_DIRS];
  chan_t s1_sorted [NUM_DIRS];

  for (genvar d = 0; d < NUM_DIRS; d++) begin : g_rc
    port_e rc_port;
    dec_route_compute #(.K_X(K_X), .K_Y(K_Y), .TORUS(TORUS)) u_rc (
      .cur_x (cur_x), .cur_y (cur_y),
      .dst_x (r0[d].hdr.dst_x), .dst_y (r0[d].hdr.dst_y),
      .port  (rc_port)
    );
    assign s1_ch[d].f   = r0[d];
    assign s1_ch[d].req = rc_port;
  end

  dec_partial_perm_net u_ppn (.in_ch(s1_ch), .out_ch(s1_sorted));

  // ------------------------------------------------------- stage register
  chan_t r1 [NUM_DIRS];

  always_ff @(posedge clk) begin
    for (int d = 0; d < NUM_DIRS; d++) begin
      if (!rst_n) r1[d].f.valid <= 1'b0;
      else        r1[d].f.valid <= s1_sorted[d].f.valid;
      if (s1_sorted[d].f.valid) begin
        r1[d].f.hdr  <= s1_sorted[d].f.hdr;
        r1[d].f.data <= s1_sorted[d].f.data;
        r1[d].req    <= s1_sorted[d].req;
      end
    end
  end

  // -------------------------------------------------------------- stage 2
  port_e byp_port, inj_port;
  chan_t s2_ch  [NUM_CH];
  chan_t s2_ej  [NUM_CH];
  chan_t s2_inj [NUM_CH];
  chan_t inj_ch;

  dec_route_compute #(.K_X(K_X), .K_Y(K_Y), .TORUS(TORUS)) u_rc_byp (
    .cur_x (cur_x), .cur_y (cur_y),
    .dst_x (byp_in.hdr.dst_x), .dst_y (byp_in.hdr.dst_y),
    .port  (byp_port)
  );
  dec_route_compute #(.K_X(K_X), .K_Y(K_Y), .TORUS(TORUS)) u_rc_inj (
    .cur_x (cur_x), .cur_y (cur_y),
    .dst_x (inj_flit.hdr.dst_x), .dst_y (inj_flit.hdr.dst_y),
    .port  (inj_port)
  );

  always_comb begin
    for (int d = 0; d < NUM_DIRS; d++) s2_ch[d] = r1[d];
    s2_ch[NUM_DIRS].f   = byp_in;
    s2_ch[NUM_DIRS].req = byp_port;
    inj_ch.f            = inj_flit;
    inj_ch.req          = inj_port;
  end

  always_comb begin
    load = '0;
    for (int i = 0; i < NUM_CH; i++)
      if (s2_ch[i].f.valid) load = load + 3'd1;
  end

  dec_ejector u_ej (.ch_in(s2_ch), .ch_out(s2_ej), .ej_flit(ej_flit));

  dec_injector u_inj (
    .ch_in     (s2_ej),
    .inj_valid (inj_valid),
    .inj_ch    (inj_ch),
    .num_ports (num_ports),
    .ch_out    (s2_inj),
    .inj_grant (inj_grant),
    .throttle  (ev_throttle)
  );

  logic [NUM_CH-1:0] pa_valid, pa_alloc_valid, pa_step1;
  port_e             pa_req   [NUM_CH];
  port_e             pa_alloc [NUM_CH];
  flit_t             xb_in    [NUM_CH];
  flit_t             xb_out   [NUM_CH];

  always_comb begin
    for (int i = 0; i < NUM_CH; i++) begin
      pa_valid[i] = s2_inj[i].f.valid;
      pa_req[i]   = s2_inj[i].req;
      xb_in[i]    = s2_inj[i].f;
    end
  end

  dec_port_alloc u_pa (
    .valid       (pa_valid),
    .req         (pa_req),
    .port_avail  (port_avail),
    .alloc       (pa_alloc),
    .alloc_valid (pa_alloc_valid),
    .step1_ok    (pa_step1)
  );

  dec_crossbar u_xb (
    .ch          (xb_in),
    .alloc       (pa_alloc),
    .alloc_valid (pa_alloc_valid),
    .out         (xb_out)
  );

  always_comb begin
    ev_deflect = '0;
    for (int i = 0; i < NUM_CH; i++)
      if (pa_valid[i] && !pa_step1[i] && pa_alloc[i] != pa_req[i] && pa_alloc[i] != PORT_BYP)
        ev_deflect = ev_deflect + 3'd1;
    ev_bypass = xb_out[PORT_BYP].valid;
    ev_eject  = ej_flit.valid;
    ev_inject = inj_grant;
  end

  // ------------------------------------------------------ output register
  flit_t r2 [NUM_CH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NUM_CH; p++) begin
      if (!rst_n) r2[p].valid <= 1'b0;
      else        r2[p].valid <= xb_out[p].valid;
      if (xb_out[p].valid) begin
        r2[p].hdr  <= xb_out[p].hdr;
        r2[p].data <= xb_out[p].data;
      end
    end
  end

  always_comb begin
    for (int d = 0; d < NUM_DIRS; d++) out_link[d] = r2[d];
    byp_out = r2[PORT_BYP];
  end

  // Every flit in stage 2 must be given a port: bufferless operation.
  a_all_allocated: assert property (@(posedge clk) disable iff (!rst_n)
    (pa_valid & ~pa_alloc_valid) == '0);

endmodule
