// dec_injector: local injection of a DeC sub-router.
//
// Runs after ejection. The flit at the head of the node's injection queue
// (inj_valid, inj_ch with its route already computed) is granted when the
// router holds fewer flits than it has output ports (num_ports: 5 inside
// the network, fewer at mesh edges), so that every flit still finds a port.
// It is written into the highest-numbered empty channel, which keeps it
// behind the flits already in the network in allocation order. When the
// router is full the injection is throttled: inj_grant stays low and the
// flit waits in its queue for the next cycle. Combinational.
//
// Injection into a free channel at lowest priority, with throttling when
// none is free, follows the original design; the port-count test and the
// choice of channel are this design's.
module dec_injector
  import dec_pkg::*;
(
  input  chan_t      ch_in  [NUM_CH],
  input  logic       inj_valid,
  input  chan_t      inj_ch,
  input  logic [2:0] num_ports,
  output chan_t      ch_out [NUM_CH],
  output logic       inj_grant,
  output logic       throttle
);

  logic [2:0] occupied;
  logic       placed;

  always_comb begin
    occupied = '0;
    for (int i = 0; i < NUM_CH; i++)
      if (ch_in[i].f.valid) occupied = occupied + 3'd1;
    inj_grant = inj_valid && (occupied < num_ports);
    throttle  = inj_valid && !inj_grant;
    placed    = 1'b0;
    for (int i = NUM_CH - 1; i >= 0; i--) begin
      ch_out[i] = ch_in[i];
      if (inj_grant && !placed && !ch_in[i].f.valid) begin
        placed          = 1'b1;
        ch_out[i]       = inj_ch;
        ch_out[i].f.valid = 1'b1;
      end
    end
  end

endmodule
