// tb_dec_subrouter: directed scenarios on two sub-routers of an 8x8 mesh, one
// inside the grid at (3,3) and one in the corner at (0,0).
//   A  a lone flit crosses in 3 cycles (link + two router stages)
//   B  two flits want East: the older gets it, the younger takes Bypass
//   C  three flits want East: East, Bypass, and one deflected to North
//   D  a local flit is ejected in stage 2, 2 cycles after arriving
//   E  two local flits: the older is ejected, the other is bypassed
//   F  a flit from the bypass ring leaves 1 cycle later on its port
//   G  an injected flit leaves 1 cycle after its grant
//   H  five flits fill the router: injection is throttled and all five leave
//   I  corner router: only North, East and Bypass exist; a third contender
//      is deflected North and injection is throttled at three flits
// Every flit is tagged in its payload; a monitor records where and when
// each tag leaves, and the expected port and cycle are checked.
module tb_dec_subrouter;
  import dec_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // two DUTs, index 0 at (3,3), index 1 at (0,0)
  flit_t in_link [2][NUM_DIRS];
  flit_t out_link [2][NUM_DIRS];
  flit_t byp_in [2], byp_out [2], inj_flit [2], ej_flit [2];
  logic [1:0] inj_valid, inj_grant, ev_bypass, ev_eject, ev_inject, ev_throttle;
  logic [2:0] load [2], ev_deflect [2];
  int n_defl [2];

  for (genvar u = 0; u < 2; u++) begin : g_dut
    dec_subrouter #(.K_X(8), .K_Y(8), .TORUS(1'b0)) dut (
      .clk(clk), .rst_n(rst_n),
      .cur_x(u == 0 ? 4'd3 : 4'd0), .cur_y(u == 0 ? 4'd3 : 4'd0),
      .in_link(in_link[u]), .out_link(out_link[u]),
      .byp_in(byp_in[u]), .byp_out(byp_out[u]),
      .inj_valid(inj_valid[u]), .inj_flit(inj_flit[u]), .inj_grant(inj_grant[u]),
      .ej_flit(ej_flit[u]), .load(load[u]),
      .ev_deflect(ev_deflect[u]), .ev_bypass(ev_bypass[u]), .ev_eject(ev_eject[u]),
      .ev_inject(ev_inject[u]), .ev_throttle(ev_throttle[u]));
  end

  // where (port, 5 = ejected) and when each tag left
  int seen_port [int];
  int seen_cyc  [int];
  int seen_cnt  [int];

  always @(negedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) begin
      for (int d = 0; d < NUM_DIRS; d++)
        if (out_link[u][d].valid) note(int'(out_link[u][d].data[31:0]), d);
      if (byp_out[u].valid) note(int'(byp_out[u].data[31:0]), int'(PORT_BYP));
      if (ej_flit[u].valid) note(int'(ej_flit[u].data[31:0]), int'(PORT_LOCAL));
      n_defl[u] += int'(ev_deflect[u]);
    end
  end

  function automatic void note(int tag, int port);
    seen_port[tag] = port;
    seen_cyc[tag]  = cyc;
    seen_cnt[tag]  = seen_cnt.exists(tag) ? seen_cnt[tag] + 1 : 1;
  endfunction

  function automatic flit_t mk(int dx, int dy, int ts, int tag);
    flit_t f;
    f = '0;
    f.valid     = 1'b1;
    f.hdr.dst_x = COORD_W'(dx);
    f.hdr.dst_y = COORD_W'(dy);
    f.hdr.ts    = TS_W'(ts);
    f.data      = DATA_W'(tag);
    return f;
  endfunction

  task automatic clear_inputs();
    for (int u = 0; u < 2; u++) begin
      for (int d = 0; d < NUM_DIRS; d++) in_link[u][d] = '0;
      byp_in[u] = '0; inj_flit[u] = '0;
    end
    inj_valid = '0;
  endtask

  task automatic expect_tag(int tag, int port, int c0, int lat);
    checks++;
    if (!seen_port.exists(tag)) begin
      failures++; $display("tag %0d never left", tag);
    end else if (seen_cnt[tag] != 1) begin
      failures++; $display("tag %0d left %0d times", tag, seen_cnt[tag]);
    end else if (seen_port[tag] != port || (lat >= 0 && seen_cyc[tag] - c0 != lat)) begin
      failures++;
      $display("tag %0d: port %0d after %0d cycles, expected port %0d after %0d",
               tag, seen_port[tag], seen_cyc[tag] - c0, port, lat);
    end
  endtask

  task automatic step(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, d0;
    n_defl = '{0, 0};
    clear_inputs();
    step(3);
    rst_n = 1;
    step(2);

    // A
    c0 = cyc; in_link[0][PORT_W] = mk(6, 3, 5, 1);
    step(1); clear_inputs(); step(5);
    expect_tag(1, PORT_E, c0, 3);

    // B
    c0 = cyc; in_link[0][PORT_W] = mk(6, 3, 20, 11); in_link[0][PORT_N] = mk(7, 5, 10, 12);
    step(1); clear_inputs(); step(5);
    expect_tag(12, PORT_E, c0, 3);
    expect_tag(11, PORT_BYP, c0, 3);

    // C
    d0 = n_defl[0];
    c0 = cyc; in_link[0][PORT_W] = mk(6, 3, 30, 21); in_link[0][PORT_N] = mk(6, 3, 31, 22);
    in_link[0][PORT_S] = mk(6, 3, 29, 23);
    step(1); clear_inputs(); step(5);
    expect_tag(23, PORT_E, c0, 3);
    checks++;
    if (!((seen_port[21] == PORT_BYP && seen_port[22] == PORT_N) ||
          (seen_port[22] == PORT_BYP && seen_port[21] == PORT_N))) begin
      failures++; $display("C: losers went to %0d and %0d", seen_port[21], seen_port[22]);
    end
    checks++;
    if (n_defl[0] - d0 != 1) begin failures++; $display("C: %0d deflections counted", n_defl[0] - d0); end

    // D
    c0 = cyc; in_link[0][PORT_E] = mk(3, 3, 40, 31);
    step(1); clear_inputs(); step(5);
    expect_tag(31, PORT_LOCAL, c0, 2);

    // E
    c0 = cyc; in_link[0][PORT_E] = mk(3, 3, 51, 41); in_link[0][PORT_S] = mk(3, 3, 50, 42);
    step(1); clear_inputs(); step(5);
    expect_tag(42, PORT_LOCAL, c0, 2);
    expect_tag(41, PORT_BYP, c0, 3);

    // F
    c0 = cyc; byp_in[0] = mk(3, 5, 60, 51);
    step(1); clear_inputs(); step(4);
    expect_tag(51, PORT_N, c0, 1);

    // G
    c0 = cyc; inj_valid[0] = 1'b1; inj_flit[0] = mk(0, 3, 70, 61);
    #1;
    checks++;
    if (!inj_grant[0]) begin failures++; $display("G: injection refused in an empty router"); end
    step(1); clear_inputs(); step(4);
    expect_tag(61, PORT_W, c0, 1);

    // H: four links now, bypass flit and injection two cycles later
    c0 = cyc;
    in_link[0][PORT_N] = mk(3, 0, 80, 71); in_link[0][PORT_S] = mk(3, 7, 81, 72);
    in_link[0][PORT_E] = mk(0, 3, 82, 73); in_link[0][PORT_W] = mk(7, 3, 83, 74);
    step(1); clear_inputs(); step(1);
    byp_in[0] = mk(3, 7, 84, 75); inj_valid[0] = 1'b1; inj_flit[0] = mk(5, 5, 85, 76);
    #1;
    checks++;
    if (inj_grant[0] || !ev_throttle[0] || load[0] != 3'd5) begin
      failures++; $display("H: grant %0b throttle %0b load %0d", inj_grant[0], ev_throttle[0], load[0]);
    end
    step(1);
    byp_in[0] = '0;
    #1;
    checks++;
    if (!inj_grant[0]) begin failures++; $display("H: injection not granted once the router drained"); end
    step(1); clear_inputs(); step(4);
    expect_tag(71, PORT_S, c0, 3);
    expect_tag(74, PORT_E, c0, 3);
    expect_tag(76, PORT_E, c0, 4);
    checks++;
    if (!(seen_cnt.exists(72) && seen_cnt.exists(73) && seen_cnt.exists(75))) begin
      failures++; $display("H: a flit was lost");
    end

    // I: corner (0,0), three flits for (5,0)
    d0 = n_defl[1];
    c0 = cyc; in_link[1][PORT_N] = mk(5, 0, 90, 81); in_link[1][PORT_E] = mk(5, 0, 91, 82);
    step(1); clear_inputs(); step(1);
    byp_in[1] = mk(5, 0, 89, 83); inj_valid[1] = 1'b1; inj_flit[1] = mk(1, 1, 95, 84);
    #1;
    checks++;
    if (inj_grant[1]) begin failures++; $display("I: corner router accepted a fourth flit"); end
    step(1); clear_inputs(); step(4);
    expect_tag(81, PORT_E, c0, 3);
    checks++;
    if (!((seen_port[82] == PORT_BYP && seen_port[83] == PORT_N) ||
          (seen_port[83] == PORT_BYP && seen_port[82] == PORT_N))) begin
      failures++; $display("I: losers went to %0d and %0d", seen_port[82], seen_port[83]);
    end
    checks++;
    if (n_defl[1] - d0 != 1) begin failures++; $display("I: %0d deflections", n_defl[1] - d0); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
