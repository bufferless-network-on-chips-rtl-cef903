// dec_crossbar: 5x5 crossbar of a DeC sub-router.
//
// Each output port (North, South, East, West, Bypass) takes the flit of the
// channel whose allocation names it. The allocator gives every port to at
// most one channel, so each output is a plain AND-OR multiplexer; an output
// nobody was given carries an empty (invalid) flit. Combinational.
//
// The crossbar follows the original design; the AND-OR form is this
// design's choice.
module dec_crossbar
  import dec_pkg::*;
(
  input  flit_t             ch          [NUM_CH],
  input  port_e             alloc       [NUM_CH],
  input  logic [NUM_CH-1:0] alloc_valid,
  output flit_t             out         [NUM_CH]   // indexed by port_e
);

  always_comb begin
    for (int p = 0; p < NUM_CH; p++) begin
      out[p] = '0;
      for (int i = 0; i < NUM_CH; i++)
        if (alloc_valid[i] && ch[i].valid && alloc[i] == port_e'(p))
          out[p] = out[p] | ch[i];
    end
  end

endmodule
