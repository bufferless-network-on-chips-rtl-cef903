// dec_pkg: types and constants shared by the Deflection Containment (DeC)
// bufferless network-on-chip.
//
// The network is split into NUM_SUBNETS physical subnetworks whose data paths
// together are AGG_DATA_W bits wide (256 bits, two subnetworks of 128 bits in
// the main DeC2 configuration). Every flit travels with its own 32-bit header
// on a separate set of wires: destination, source, sequence number inside the
// packet and a time stamp used for oldest-first priority. The header field
// widths are this design's choice; only the 4-byte total is fixed.
//
// Port numbering is used both for router outputs and for the direction a
// flit arrives from: in_link[PORT_E] is the flit coming from the East
// neighbour. PORT_BYP is the bypass channel to the next subnetwork of the
// same node, PORT_LOCAL a request to be ejected.
//
// The 256-bit aggregate width, the 128-bit DeC2 flit and the 4-byte header
// follow the original DeC design; the header fields and the 14-bit,
// wrap-aware time stamp are this design's choice.
package dec_pkg;

  localparam int AGG_DATA_W  = 256;                      // all subnetworks together
  localparam int NUM_SUBNETS = 2;                        // DeC2
  localparam int DATA_W      = AGG_DATA_W / NUM_SUBNETS; // payload bits per flit
  localparam int COORD_W     = 4;                        // up to 16x16 nodes
  localparam int SEQ_W       = 2;                        // up to 4 flits per packet
  localparam int TS_W        = 14;                       // time stamp bits
  localparam int PKT_FLITS   = 4;                        // 64-byte data packet
  localparam int LEN_W       = 3;                        // packet length field, 1..PKT_FLITS

  localparam int NUM_DIRS = 4;                           // N, S, E, W
  localparam int NUM_CH   = 5;                           // 4 neighbours + bypass

  typedef enum logic [2:0] {
    PORT_N     = 3'd0,
    PORT_S     = 3'd1,
    PORT_E     = 3'd2,
    PORT_W     = 3'd3,
    PORT_BYP   = 3'd4,
    PORT_LOCAL = 3'd5
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [SEQ_W-1:0]   seq;
    logic [TS_W-1:0]    ts;
  } hdr_t;                                               // 32 bits

  typedef struct packed {
    logic              valid;
    hdr_t              hdr;
    logic [DATA_W-1:0] data;
  } flit_t;

  // A flit inside a router together with the port it wants.
  typedef struct packed {
    flit_t f;
    port_e req;
  } chan_t;

  // True when time stamp a is strictly older than b. Stamps wrap, so the
  // comparison is done on the modular difference; it is exact for flits
  // whose ages differ by less than 2^(TS_W-1) cycles.
  function automatic logic ts_older(logic [TS_W-1:0] a, logic [TS_W-1:0] b);
    logic [TS_W-1:0] d;
    d = a - b;
    return d[TS_W-1];
  endfunction

  // True when flit a must win over flit b: an occupied channel beats an
  // empty one, then the older flit wins.
  function automatic logic flit_beats(flit_t a, flit_t b);
    if (a.valid != b.valid) return a.valid;
    return a.valid && ts_older(a.hdr.ts, b.hdr.ts);
  endfunction

endpackage
