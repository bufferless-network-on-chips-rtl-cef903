// dec_ejector: local ejection of a DeC sub-router.
//
// Among the five stage-2 channels it picks the locally destined flit
// (request Local) on the lowest channel, i.e. the highest-priority one,
// hands it to the node on ej_flit and empties that channel. Other local
// flits stay in their channels and are later bypassed or deflected by the
// port allocator. One flit is ejected per cycle, and the node is assumed
// always able to take it. Combinational.
//
// One ejection per cycle, before injection, follows the original design;
// choosing the lowest channel is this design's choice.
module dec_ejector
  import dec_pkg::*;
(
  input  chan_t ch_in  [NUM_CH],
  output chan_t ch_out [NUM_CH],
  output flit_t ej_flit
);

  logic found;

  always_comb begin
    found   = 1'b0;
    ej_flit = '0;
    for (int i = 0; i < NUM_CH; i++) begin
      ch_out[i] = ch_in[i];
      if (!found && ch_in[i].f.valid && ch_in[i].req == PORT_LOCAL) begin
        found          = 1'b1;
        ej_flit        = ch_in[i].f;
        ch_out[i].f.valid = 1'b0;
      end
    end
  end

endmodule
