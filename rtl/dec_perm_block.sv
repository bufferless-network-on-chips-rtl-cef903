// dec_perm_block: one 2x2 permutation block of the partial permutation
// network. It passes its two channels straight through, or swaps them, so
// that hi carries the higher-priority one (occupied before empty, then the
// older time stamp). On equal priority it passes. Combinational.
//
// Pass-or-swap by time stamp follows the original design; treating an empty
// channel as lowest priority and passing on ties is this design's choice.
module dec_perm_block
  import dec_pkg::*;
(
  input  chan_t a,
  input  chan_t b,
  output chan_t hi,
  output chan_t lo
);

  logic swap;

  always_comb begin
    swap = flit_beats(b.f, a.f);
    hi   = swap ? b : a;
    lo   = swap ? a : b;
  end

endmodule
