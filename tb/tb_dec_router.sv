// tb_dec_router: a DeC2 router at (3,3) of an 8x8 mesh.
//   1  two flits contend for East in subnetwork 0: the older leaves there
//      after 3 cycles, the younger crosses the bypass ring and leaves East in
//      subnetwork 1 one cycle later (4 cycles), not deflected
//   2  the same in subnetwork 1: the loser comes back to subnetwork 0
//   3  a bypassed flit meets an older flit of the other subnetwork that wants
//      the same port: it loses again and rides the ring back to subnetwork 0
//   4  each subnetwork ejects and injects on its own
module tb_dec_router;
  import dec_pkg::*;

  localparam int M = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  flit_t in_link [M][NUM_DIRS];
  flit_t out_link [M][NUM_DIRS];
  logic [M-1:0] inj_valid, inj_grant, ev_bypass, ev_eject, ev_inject, ev_throttle;
  flit_t inj_flit [M], ej_flit [M];
  logic [2:0] load [M], ev_deflect [M];
  int n_byp = 0, n_defl = 0;

  dec_router #(.K_X(8), .K_Y(8), .TORUS(1'b0), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .cur_x(4'd3), .cur_y(4'd3),
    .in_link(in_link), .out_link(out_link),
    .inj_valid(inj_valid), .inj_flit(inj_flit), .inj_grant(inj_grant),
    .ej_flit(ej_flit), .load(load), .ev_deflect(ev_deflect), .ev_bypass(ev_bypass),
    .ev_eject(ev_eject), .ev_inject(ev_inject), .ev_throttle(ev_throttle));

  int seen_sub [int], seen_port [int], seen_cyc [int];

  always @(negedge clk) if (rst_n) begin
    for (int m = 0; m < M; m++) begin
      for (int d = 0; d < NUM_DIRS; d++)
        if (out_link[m][d].valid) note(int'(out_link[m][d].data[31:0]), m, d);
      if (ej_flit[m].valid) note(int'(ej_flit[m].data[31:0]), m, int'(PORT_LOCAL));
      n_byp  += int'(ev_bypass[m]);
      n_defl += int'(ev_deflect[m]);
    end
  end

  function automatic void note(int tag, int m, int port);
    seen_sub[tag] = m; seen_port[tag] = port; seen_cyc[tag] = cyc;
  endfunction

  function automatic flit_t mk(int dx, int dy, int ts, int tag);
    flit_t f;
    f = '0; f.valid = 1'b1;
    f.hdr.dst_x = COORD_W'(dx); f.hdr.dst_y = COORD_W'(dy); f.hdr.ts = TS_W'(ts);
    f.data = DATA_W'(tag);
    return f;
  endfunction

  task automatic clear_inputs();
    for (int m = 0; m < M; m++) begin
      for (int d = 0; d < NUM_DIRS; d++) in_link[m][d] = '0;
      inj_flit[m] = '0;
    end
    inj_valid = '0;
  endtask

  task automatic expect_tag(int tag, int m, int port, int c0, int lat);
    checks++;
    if (!seen_sub.exists(tag) || seen_sub[tag] != m || seen_port[tag] != port ||
        seen_cyc[tag] - c0 != lat) begin
      failures++;
      if (seen_sub.exists(tag))
        $display("tag %0d: sub %0d port %0d after %0d; expected sub %0d port %0d after %0d",
                 tag, seen_sub[tag], seen_port[tag], seen_cyc[tag] - c0, m, port, lat);
      else $display("tag %0d never left", tag);
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
    int c0;
    clear_inputs();
    step(3); rst_n = 1; step(2);

    // 1
    c0 = cyc;
    in_link[0][PORT_W] = mk(6, 3, 10, 1); in_link[0][PORT_S] = mk(7, 3, 11, 2);
    step(1); clear_inputs(); step(6);
    expect_tag(1, 0, PORT_E, c0, 3);
    expect_tag(2, 1, PORT_E, c0, 4);

    // 2
    c0 = cyc;
    in_link[1][PORT_E] = mk(3, 7, 21, 3); in_link[1][PORT_W] = mk(3, 6, 20, 4);
    step(1); clear_inputs(); step(6);
    expect_tag(4, 1, PORT_N, c0, 3);
    expect_tag(3, 0, PORT_N, c0, 4);

    // 3: bypassed flit (ts 31) meets subnetwork-1 flit (ts 30, older) wanting East
    c0 = cyc;
    in_link[0][PORT_W] = mk(6, 3, 29, 5); in_link[0][PORT_N] = mk(6, 3, 31, 6);
    step(1);
    clear_inputs();
    in_link[1][PORT_N] = mk(6, 3, 30, 7);
    step(1); clear_inputs(); step(6);
    expect_tag(5, 0, PORT_E, c0, 3);
    expect_tag(7, 1, PORT_E, c0, 4);
    // the loser is bypassed again, back to subnetwork 0, and leaves East there
    expect_tag(6, 0, PORT_E, c0, 5);

    // 4: ejection and injection in both subnetworks
    c0 = cyc;
    in_link[0][PORT_E] = mk(3, 3, 40, 8); in_link[1][PORT_E] = mk(3, 3, 41, 9);
    inj_valid = 2'b11; inj_flit[0] = mk(3, 0, 42, 10); inj_flit[1] = mk(3, 7, 43, 11);
    #1;
    checks++;
    if (inj_grant != 2'b11) begin failures++; $display("4: injection refused"); end
    step(1); clear_inputs(); step(6);
    expect_tag(8, 0, PORT_LOCAL, c0, 2);
    expect_tag(9, 1, PORT_LOCAL, c0, 2);
    expect_tag(10, 0, PORT_S, c0, 1);
    expect_tag(11, 1, PORT_N, c0, 1);

    checks++;
    if (n_byp < 3) begin failures++; $display("only %0d bypass transfers", n_byp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
