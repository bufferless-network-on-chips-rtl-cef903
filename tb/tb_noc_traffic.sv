// tb_noc_traffic: traffic generator and scoreboard for one dec_noc.
//
// Runs the synthetic patterns used to evaluate the network, one after the
// other, then a saturating burst, then lets the network drain:
//   uniform random  destination drawn uniformly among the other nodes
//   tornado         each coordinate moves by (k-1)/2 modulo k
//   bit complement  each coordinate is inverted (x -> K_X-1-x)
// Half of the packets are 1-flit control packets, half 4-flit data packets.
// Every flit's payload encodes its source, packet serial number and sequence
// number; each ejected flit is checked against the node it left at, the
// header and the payload, and every accepted packet must be delivered
// exactly once. Reports flit latency, and the network counters.
module tb_noc_traffic
  import dec_pkg::*;
#(
  parameter int K_X        = 4,
  parameter int K_Y        = 4,
  parameter int M          = NUM_SUBNETS,
  parameter int PHASE_CYC  = 300,
  parameter int RATE_PCT   = 10,    // offered packets per node per 100 cycles
  parameter int BURST_CYC  = 100,
  parameter int DRAIN_CYC  = 4000,
  parameter string NAME    = "noc",
  localparam int NODES     = K_X * K_Y
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic [NODES-1:0]            pkt_valid,
  input  logic [NODES-1:0]            pkt_ready,
  output logic [COORD_W-1:0]          pkt_dst_x [NODES],
  output logic [COORD_W-1:0]          pkt_dst_y [NODES],
  output logic [LEN_W-1:0]            pkt_len   [NODES],
  output logic [PKT_FLITS*DATA_W-1:0] pkt_data  [NODES],
  input  flit_t                       ej_flit   [NODES][M],
  input  logic [31:0]                 cnt_inject,
  input  logic [31:0]                 cnt_eject,
  output int                          checks,
  output int                          failures,
  output logic                        done
);

  int    serial [NODES];
  bit    accept [NODES];
  int    pending [longint];          // (src, serial) -> flits still expected
  int    tstamp  [longint];          // (src, serial) -> acceptance cycle
  int    cyc = 0, n_pkts = 0, n_flits_rx = 0;
  longint lat_sum = 0;
  int    rate, pattern;              // pattern: 0 UR, 1 TR, 2 BC, 3 none

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [DATA_W-1:0] payload(int src, int ser, int seq);
    logic [31:0] h;
    h = 32'(src) * 32'h9E3779B1 ^ 32'(ser) * 32'h85EBCA77 ^ 32'(seq) * 32'hC2B2AE3D;
    return {h, ~h, 16'(src), 16'(ser), 30'(0), 2'(seq)};
  endfunction

  task automatic new_packet(int n);
    int x, y, dx, dy, len, dn;
    x = n % K_X; y = n / K_X;
    case (pattern)
      0: begin
        do dn = $urandom_range(0, NODES - 1); while (dn == n);
        dx = dn % K_X; dy = dn / K_X;
      end
      1: begin dx = (x + (K_X - 1) / 2) % K_X; dy = (y + (K_Y - 1) / 2) % K_Y; end
      default: begin dx = K_X - 1 - x; dy = K_Y - 1 - y; end
    endcase
    if (dx == x && dy == y) begin dx = (x + 1) % K_X; end
    len = ($urandom_range(0, 1) != 0) ? PKT_FLITS : 1;
    pkt_valid[n] = 1'b1;
    pkt_dst_x[n] = COORD_W'(dx);
    pkt_dst_y[n] = COORD_W'(dy);
    pkt_len[n]   = LEN_W'(len);
    for (int s = 0; s < PKT_FLITS; s++) pkt_data[n][s*DATA_W +: DATA_W] = payload(n, serial[n], s);
  endtask

  // offer side: decisions at the falling edge, acceptance at the rising edge
  always @(negedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++) begin
        pkt_valid[n] = 1'b0; pkt_len[n] = '0; pkt_dst_x[n] = '0; pkt_dst_y[n] = '0;
        pkt_data[n] = '0; accept[n] = 0;
      end
    end else begin
      for (int n = 0; n < NODES; n++) begin
        if (accept[n]) begin
          longint key;
          key = longint'(n) * 1000000 + serial[n];
          pending[key] = int'(pkt_len[n]);
          tstamp[key]  = cyc;
          n_pkts++;
          serial[n]++;
          pkt_valid[n] = 1'b0;
        end
        if (!pkt_valid[n] && pattern < 3 && $urandom_range(0, 99) < rate) new_packet(n);
        accept[n] = pkt_valid[n] && pkt_ready[n];
      end
    end
  end

  // ejection side
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++)
      for (int m = 0; m < M; m++)
        if (ej_flit[n][m].valid) begin
          flit_t f;
          int src, ser, seq;
          longint key;
          f   = ej_flit[n][m];
          src = int'(f.data[63:48]);
          ser = int'(f.data[47:32]);
          seq = int'(f.hdr.seq);
          key = longint'(src) * 1000000 + ser;
          checks++;
          n_flits_rx++;
          if (int'(f.hdr.dst_x) != n % K_X || int'(f.hdr.dst_y) != n / K_X ||
              int'(f.hdr.src_x) != src % K_X || int'(f.hdr.src_y) != src / K_X ||
              f.data != payload(src, ser, seq)) begin
            failures++;
            $display("%s: corrupt or misrouted flit at node %0d (src %0d serial %0d seq %0d)",
                     NAME, n, src, ser, seq);
          end else if (!pending.exists(key) || pending[key] == 0) begin
            failures++;
            $display("%s: unexpected flit src %0d serial %0d seq %0d", NAME, src, ser, seq);
          end else begin
            pending[key]--;
            lat_sum += longint'(cyc - tstamp[key]);
          end
        end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int n = 0; n < NODES; n++) serial[n] = 0;
    pattern = 3; rate = 0;
    @(posedge rst_n);
    rate = RATE_PCT;
    for (int p = 0; p < 3; p++) begin
      pattern = p;
      repeat (PHASE_CYC) @(posedge clk);
    end
    // saturating burst of uniform random traffic
    pattern = 0; rate = 100;
    repeat (BURST_CYC) @(posedge clk);
    pattern = 3;
    // drain
    for (int i = 0; i < DRAIN_CYC; i++) begin
      @(posedge clk);
      if (pkt_valid == '0 && cnt_eject == cnt_inject && n_flits_rx == int'(cnt_eject)) begin
        int left;
        left = 0;
        foreach (pending[k]) left += pending[k];
        if (left == 0) break;
      end
    end
    repeat (5) @(posedge clk);
    begin
      int left;
      left = 0;
      foreach (pending[k]) left += pending[k];
      checks++;
      if (left != 0 || pkt_valid != '0) begin
        failures++;
        $display("%s: %0d flits undelivered", NAME, left);
      end
      checks++;
      if (cnt_inject != cnt_eject || int'(cnt_eject) != n_flits_rx) begin
        failures++;
        $display("%s: injected %0d ejected %0d received %0d", NAME, cnt_inject, cnt_eject, n_flits_rx);
      end
    end
    $display("%s: %0d packets, %0d flits delivered, mean flit latency %0d cycles",
             NAME, n_pkts, n_flits_rx, (n_flits_rx > 0) ? int'(lat_sum / n_flits_rx) : 0);
    done = 1;
  end

endmodule
