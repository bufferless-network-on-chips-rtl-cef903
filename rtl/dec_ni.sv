// dec_ni: network interface of a DeC node.
//
// Accepts one packet at a time (pkt_valid/pkt_ready) of pkt_len flits,
// 1 for a 16-byte control packet and 4 for a 64-byte data packet, and
// serialises it, one flit per cycle, into M injection queues, one per
// subnetwork. Every flit carries the full header: destination, source
// (this node), sequence number and the time stamp of the cycle the packet
// was accepted, which orders flits oldest-first in the routers.
// Each flit goes to the queue of the subnetwork whose sub-router at this
// node currently holds the fewest flits (load); ties go to the shorter
// queue, then to the lower subnetwork. Full queues are skipped; when all
// are full the serialiser waits. Separate queues avoid head-of-line
// blocking between subnetworks: each queue head is offered to its own
// sub-router (inj_valid/inj_flit) and leaves when inj_grant is high.
// The next packet is accepted in the cycle the last flit of the current
// one is queued. The 14-bit time stamp counter runs freely from reset, so
// all nodes reset together share the same time.
//
// Per-subnetwork queues and least-load subnetwork selection follow the
// original design; the queue depth, choosing at enqueue time, the
// tie-breaks and one-flit-per-cycle serialisation are this design's.
module dec_ni
  import dec_pkg::*;
#(
  parameter int M      = NUM_SUBNETS,
  parameter int QDEPTH = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [COORD_W-1:0]          my_x,
  input  logic [COORD_W-1:0]          my_y,
  input  logic                        pkt_valid,
  output logic                        pkt_ready,
  input  logic [COORD_W-1:0]          pkt_dst_x,
  input  logic [COORD_W-1:0]          pkt_dst_y,
  input  logic [LEN_W-1:0]            pkt_len,
  input  logic [PKT_FLITS*DATA_W-1:0] pkt_data,
  input  logic [2:0]                  load      [M],
  output logic [M-1:0]                inj_valid,
  output flit_t                       inj_flit  [M],
  input  logic [M-1:0]                inj_grant
);

  localparam int CW = $clog2(QDEPTH + 1);
  localparam int SW = (M > 1) ? $clog2(M) : 1;

  logic [TS_W-1:0]             now;
  logic                        busy;
  logic [COORD_W-1:0]          cur_dst_x, cur_dst_y;
  logic [LEN_W-1:0]            cur_len;
  logic [SEQ_W-1:0]            cur_idx;
  logic [TS_W-1:0]             cur_ts;
  logic [PKT_FLITS*DATA_W-1:0] cur_data;

  logic [M-1:0]  q_full;
  logic [CW-1:0] q_count [M];
  logic [M-1:0]  q_push;
  logic          can_push, last_push;
  logic [SW-1:0] sel;
  flit_t         new_flit;

  // Subnetwork selection: lowest load, then shortest queue, then lowest index.
  always_comb begin
    can_push = 1'b0;
    sel      = '0;
    for (int m = 0; m < M; m++) begin
      if (!q_full[m]) begin
        if (!can_push ||
            load[m] < load[sel] ||
            (load[m] == load[sel] && q_count[m] < q_count[sel])) begin
          sel      = SW'(m);
          can_push = 1'b1;
        end
      end
    end
    can_push  = can_push && busy;
    last_push = can_push && ({1'b0, cur_idx} == LEN_W'(cur_len - LEN_W'(1)));
    pkt_ready = !busy || last_push;
    q_push    = '0;
    if (can_push) q_push[sel] = 1'b1;

    new_flit.valid     = 1'b1;
    new_flit.hdr.dst_x = cur_dst_x;
    new_flit.hdr.dst_y = cur_dst_y;
    new_flit.hdr.src_x = my_x;
    new_flit.hdr.src_y = my_y;
    new_flit.hdr.seq   = cur_idx;
    new_flit.hdr.ts    = cur_ts;
    new_flit.data      = cur_data[cur_idx*DATA_W +: DATA_W];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      now     <= '0;
      busy    <= 1'b0;
      cur_idx <= '0;
    end else begin
      now <= now + TS_W'(1);
      if (can_push) cur_idx <= cur_idx + SEQ_W'(1);
      if (last_push) busy <= 1'b0;
      if (pkt_valid && pkt_ready) begin
        busy      <= (pkt_len != '0);
        cur_idx   <= '0;
        cur_dst_x <= pkt_dst_x;
        cur_dst_y <= pkt_dst_y;
        cur_len   <= pkt_len;
        cur_ts    <= now;
        cur_data  <= pkt_data;
      end
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_q
    logic q_head_valid;
    dec_inj_queue #(.DEPTH(QDEPTH)) u_q (
      .clk        (clk),
      .rst_n      (rst_n),
      .push       (q_push[m]),
      .din        (new_flit),
      .pop        (inj_grant[m]),
      .head       (inj_flit[m]),
      .head_valid (q_head_valid),
      .full       (q_full[m]),
      .count      (q_count[m])
    );
    assign inj_valid[m] = q_head_valid;
  end

  a_len_ok: assert property (@(posedge clk) disable iff (!rst_n)
    pkt_valid |-> (pkt_len <= LEN_W'(PKT_FLITS)));

endmodule
