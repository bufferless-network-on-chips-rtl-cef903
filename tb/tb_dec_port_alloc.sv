// tb_dec_port_alloc: the five-flit example of the parallel allocator
// (flit0 West, flit1 East, flit2 North, flit3 East, flit4 East must end as
// West, Bypass, North, South, East), then random requests, occupancy and
// port masks compared with a sequential reference: STEP 1 grants unique
// requests and channel 0, then failed flits in channel order take the free
// ports in the order Bypass, North, South, East, West.
module tb_dec_port_alloc;
  import dec_pkg::*;

  int checks = 0, failures = 0;
  logic [NUM_CH-1:0] valid, port_avail, alloc_valid, step1_ok;
  port_e req [NUM_CH];
  port_e alloc [NUM_CH];

  dec_port_alloc dut (.valid(valid), .req(req), .port_avail(port_avail),
                      .alloc(alloc), .alloc_valid(alloc_valid), .step1_ok(step1_ok));

  task automatic check_ref();
    port_e order [NUM_CH];
    bit    used [NUM_CH];
    bit    ok1;
    int    nxt;
    order = '{PORT_BYP, PORT_N, PORT_S, PORT_E, PORT_W};
    for (int p = 0; p < NUM_CH; p++) used[p] = 0;
    // STEP 1 reference
    for (int i = 0; i < NUM_CH; i++) begin
      ok1 = valid[i] && req[i] inside {PORT_N, PORT_S, PORT_E, PORT_W};
      if (i != 0)
        for (int j = 0; j < NUM_CH; j++)
          if (j != i && valid[j] && req[j] == req[i]) ok1 = 0;
      if (ok1) used[int'(req[i])] = 1;
      checks++;
      if (step1_ok[i] != ok1) begin
        failures++;
        $display("step1 ch%0d exp %0b got %0b", i, ok1, step1_ok[i]);
      end else if (ok1) begin
        checks++;
        if (!alloc_valid[i] || alloc[i] != req[i]) begin
          failures++;
          $display("ch%0d should keep %s, got %s", i, req[i].name(), alloc[i].name());
        end
      end
    end
    // STEP 2 reference: sequential walk over the free list
    nxt = 0;
    for (int i = 0; i < NUM_CH; i++)
      if (valid[i] && !step1_ok[i]) begin
        while (nxt < NUM_CH && (!port_avail[int'(order[nxt])] || used[int'(order[nxt])])) nxt++;
        checks++;
        if (nxt >= NUM_CH) begin
          if (alloc_valid[i]) begin failures++; $display("ch%0d got a port from nowhere", i); end
        end else begin
          if (!alloc_valid[i] || alloc[i] != order[nxt]) begin
            failures++;
            $display("ch%0d exp %s got %s", i, order[nxt].name(), alloc[i].name());
          end
          nxt++;
        end
      end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example
    valid = '1; port_avail = '1;
    req = '{PORT_W, PORT_E, PORT_N, PORT_E, PORT_E};
    #1;
    checks++;
    if (alloc != '{PORT_W, PORT_BYP, PORT_N, PORT_S, PORT_E} || alloc_valid != '1) begin
      failures++;
      $display("example: %s %s %s %s %s", alloc[0].name(), alloc[1].name(), alloc[2].name(),
               alloc[3].name(), alloc[4].name());
    end
    check_ref();
    // random
    for (int t = 0; t < 20000; t++) begin
      valid      = NUM_CH'($urandom);
      port_avail = NUM_CH'($urandom) | 5'b10000;
      for (int i = 0; i < NUM_CH; i++) begin
        int r;
        r = $urandom_range(0, 5);
        req[i] = (r == 4) ? PORT_LOCAL : port_e'(r);
      end
      #1;
      check_ref();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
