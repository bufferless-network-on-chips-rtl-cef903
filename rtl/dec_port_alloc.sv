// dec_port_alloc: parallel port allocator of a DeC sub-router.
//
// Channel i holds a flit (valid[i]) that wants port req[i]; channel 0 holds
// the highest-priority flit. All channels are allocated at once, in two
// steps that do not depend on each other's results sequentially:
//   STEP 1  A flit gets its requested direction if no other flit asks for
//           the same one. The flit on channel 0 gets its request in any case,
//           so a contended port goes to nobody but channel 0.
//   STEP 2  Every flit that failed STEP 1 (including a Local request the
//           ejector did not serve) counts how many failed flits sit on lower
//           channels, k. It then takes the k-th port that is still free, in
//           the fixed order Bypass, North, South, East, West. The first
//           failed flit thus lands on Bypass whenever Bypass is free.
// port_avail masks ports that do not exist (mesh edges). If the number of
// flits does not exceed the available ports, every flit gets a distinct
// port. Combinational.
//
// Both steps and the search order follow the original design; building its
// lookup table from prefix counts and masking absent edge ports are this
// design's choices.
module dec_port_alloc
  import dec_pkg::*;
(
  input  logic [NUM_CH-1:0] valid,
  input  port_e             req        [NUM_CH],
  input  logic [NUM_CH-1:0] port_avail,   // indexed by port_e (N,S,E,W,BYP)
  output port_e             alloc      [NUM_CH],
  output logic [NUM_CH-1:0] alloc_valid,
  output logic [NUM_CH-1:0] step1_ok
);

  // STEP 2 search order: Bypass, North, South, East, West.
  localparam port_e ORDER [NUM_CH] = '{PORT_BYP, PORT_N, PORT_S, PORT_E, PORT_W};

  logic [NUM_CH-1:0] taken;        // ports granted in STEP 1
  logic [NUM_CH-1:0] failed;
  logic [2:0]        k     [NUM_CH]; // failed flits on lower channels
  logic [2:0]        rank  [NUM_CH]; // free ports earlier in ORDER
  logic [NUM_CH-1:0] free_o;         // free flag in ORDER position

  always_comb begin
    // STEP 1
    for (int i = 0; i < NUM_CH; i++) begin
      logic clash;
      clash = 1'b0;
      for (int j = 0; j < NUM_CH; j++)
        if (j != i && valid[j] && req[j] == req[i]) clash = 1'b1;
      step1_ok[i] = valid[i] && (req[i] != PORT_LOCAL) && (req[i] != PORT_BYP) &&
                    ((i == 0) || !clash);
    end
    taken = '0;
    for (int i = 0; i < NUM_CH; i++)
      if (step1_ok[i]) taken[req[i]] = 1'b1;

    // STEP 2: rank of each free port in the search order
    for (int o = 0; o < NUM_CH; o++) begin
      free_o[o] = port_avail[ORDER[o]] && !taken[ORDER[o]];
      rank[o]   = '0;
      for (int p = 0; p < o; p++)
        if (port_avail[ORDER[p]] && !taken[ORDER[p]]) rank[o] = rank[o] + 3'd1;
    end
    for (int i = 0; i < NUM_CH; i++) begin
      failed[i] = valid[i] && !step1_ok[i];
      k[i]      = '0;
      for (int j = 0; j < i; j++)
        if (valid[j] && !step1_ok[j]) k[i] = k[i] + 3'd1;
    end

    for (int i = 0; i < NUM_CH; i++) begin
      alloc[i]       = req[i];
      alloc_valid[i] = step1_ok[i];
      if (failed[i]) begin
        alloc[i] = PORT_LOCAL;
        for (int o = 0; o < NUM_CH; o++)
          if (free_o[o] && rank[o] == k[i]) begin
            alloc[i]       = ORDER[o];
            alloc_valid[i] = 1'b1;
          end
      end
    end
  end

endmodule
