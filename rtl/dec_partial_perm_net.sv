// dec_partial_perm_net: two-stage partial permutation network that ranks the
// four flits arriving from the neighbouring routers.
//
// Only the highest-priority flit has to be found, so two stages of 2x2
// permutation blocks suffice instead of a full sorter. Stage A compares
// channels (0,1) and (2,3); stage B compares the two winners, giving the
// overall winner on out_ch[0], and the two losers. After the network the
// oldest occupied flit is always on channel 0; the other three are only
// partially ordered. Combinational; each channel carries the flit and the
// port it requested.
//
// A two-stage network that only guarantees the top channel follows the
// original design; the exact pairing of channels is this design's choice.
module dec_partial_perm_net
  import dec_pkg::*;
(
  input  chan_t in_ch  [NUM_DIRS],
  output chan_t out_ch [NUM_DIRS]
);

  chan_t a_hi0, a_lo0, a_hi1, a_lo1;

  dec_perm_block u_a0 (.a(in_ch[0]), .b(in_ch[1]), .hi(a_hi0), .lo(a_lo0));
  dec_perm_block u_a1 (.a(in_ch[2]), .b(in_ch[3]), .hi(a_hi1), .lo(a_lo1));
  dec_perm_block u_b0 (.a(a_hi0),    .b(a_hi1),    .hi(out_ch[0]), .lo(out_ch[1]));
  dec_perm_block u_b1 (.a(a_lo0),    .b(a_lo1),    .hi(out_ch[2]), .lo(out_ch[3]));

endmodule
