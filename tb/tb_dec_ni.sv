// tb_dec_ni: network interface with two subnetwork queues of 8 flits.
//   1  with the routers reporting loads 3 and 1 and no grants, a 4-flit packet
//      goes entirely to queue 1
//   2  with equal loads the next packet is spread over both queues
//   3  queue 1 fills up at 8 flits, after which flits go to queue 0 despite
//      its higher load
// Queue contents are observed by granting and counting what leaves.
//   4  random packets, loads and grants: every flit must come out once, with
//      the right header (source, destination, sequence number, time stamp
//      equal to the acceptance cycle) and payload slice, in order per queue
module tb_dec_ni;
  import dec_pkg::*;

  localparam int M = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pkt_valid, pkt_ready;
  logic [COORD_W-1:0] pkt_dst_x, pkt_dst_y;
  logic [LEN_W-1:0] pkt_len;
  logic [PKT_FLITS*DATA_W-1:0] pkt_data;
  logic [2:0] load [M];
  logic [M-1:0] inj_valid, inj_grant;
  flit_t inj_flit [M];

  dec_ni #(.M(M), .QDEPTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .my_x(4'd5), .my_y(4'd2),
    .pkt_valid(pkt_valid), .pkt_ready(pkt_ready), .pkt_dst_x(pkt_dst_x), .pkt_dst_y(pkt_dst_y),
    .pkt_len(pkt_len), .pkt_data(pkt_data), .load(load),
    .inj_valid(inj_valid), .inj_flit(inj_flit), .inj_grant(inj_grant));

  int now = 0;                       // cycles since reset release
  always @(posedge clk) if (rst_n) now <= now + 1;

  flit_t expect_q [$];               // flits that must appear (any order across queues)
  int popped [M];

  // pop side: record and match every flit leaving a queue
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < M; m++)
      if (inj_valid[m] && inj_grant[m]) begin
        int hit;
        hit = -1;
        popped[m]++;
        foreach (expect_q[i]) if (hit < 0 && expect_q[i] == inj_flit[m]) hit = i;
        checks++;
        if (hit < 0) begin
          failures++;
          $display("unexpected flit from queue %0d: seq %0d ts %0d", m, inj_flit[m].hdr.seq, inj_flit[m].hdr.ts);
        end else expect_q.delete(hit);
      end
  end

  task automatic send(int len, int dx, int dy);
    pkt_valid = 1'b1; pkt_len = LEN_W'(len);
    pkt_dst_x = COORD_W'(dx); pkt_dst_y = COORD_W'(dy);
    for (int w = 0; w < PKT_FLITS * DATA_W / 32; w++) pkt_data[w*32 +: 32] = $urandom;
    do @(posedge clk); while (!pkt_ready);
    // accepted at this edge: queue the expected flits
    for (int s = 0; s < len; s++) begin
      flit_t f;
      f.valid = 1'b1;
      f.hdr.dst_x = COORD_W'(dx); f.hdr.dst_y = COORD_W'(dy);
      f.hdr.src_x = 4'd5; f.hdr.src_y = 4'd2;
      f.hdr.seq = SEQ_W'(s); f.hdr.ts = TS_W'(now);
      f.data = pkt_data[s*DATA_W +: DATA_W];
      expect_q.push_back(f);
    end
    #1 pkt_valid = 1'b0;
  endtask

  // let both queues empty and compare how many flits each one held
  task automatic drain_check(string what, int exp0, int exp1);
    int p0, p1;
    repeat (5) @(posedge clk); #1;
    p0 = popped[0]; p1 = popped[1];
    inj_grant = '1;
    repeat (12) @(posedge clk); #1;
    inj_grant = '0;
    checks++;
    if (popped[0] - p0 != exp0 || popped[1] - p1 != exp1) begin
      failures++;
      $display("%s: queues held %0d and %0d flits, expected %0d and %0d",
               what, popped[0] - p0, popped[1] - p1, exp0, exp1);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    popped = '{0, 0};
    pkt_valid = 0; pkt_len = 0; pkt_dst_x = 0; pkt_dst_y = 0; pkt_data = '0;
    load = '{3'd3, 3'd1}; inj_grant = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // 1
    send(4, 1, 1);
    drain_check("1", 0, 4);
    // 2
    load = '{3'd2, 3'd2};
    send(4, 2, 2);
    drain_check("2", 2, 2);
    // 3: twelve flits, queue 1 holds only eight
    load = '{3'd4, 3'd0};
    send(4, 3, 3);
    send(4, 4, 4);
    send(4, 5, 5);
    repeat (5) @(posedge clk); #1;
    checks++;
    if (inj_valid != 2'b11) begin failures++; $display("3: both queues should hold flits"); end
    drain_check("3", 4, 8);
    // 4: random traffic with random grants
    fork
      begin
        for (int p = 0; p < 300; p++)
          send(($urandom_range(0, 1) != 0) ? 4 : 1, $urandom_range(0, 7), $urandom_range(0, 7));
      end
      begin
        repeat (2500) begin
          @(posedge clk); #1;
          inj_grant = M'($urandom);
          load = '{3'($urandom_range(0, 5)), 3'($urandom_range(0, 5))};
        end
      end
    join
    inj_grant = '1;
    repeat (40) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("%0d flits never left", expect_q.size()); end
    checks++;
    if (popped[0] < 100 || popped[1] < 100) begin failures++; $display("unbalanced: %0d %0d", popped[0], popped[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
