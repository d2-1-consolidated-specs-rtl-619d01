// comm_pkg: types and helpers shared by the Communication IP (Routing IP).
// A packet is a 128-bit header, LENGTH payload words and one footer word, all
// DATA_W = 128 bits wide. The header layout below follows the packet-header bit
// map of the IP (virtual channel, PID/channel id, coordinate, intra-tile port,
// out-of-lattice flag, packet type, length, destination virtual address,
// number of hops, ECC); the exact field boundaries were read from that map and
// the unnamed bits are kept as reserved. The coordinate is split into three
// 5-bit fields {Z, Y, X}; LENGTH counts 128-bit payload words. Both are this
// design's reading.
package comm_pkg;
  localparam int unsigned DATA_W   = 128;
  localparam int unsigned COORD_W  = 5;    // bits per torus dimension
  localparam int unsigned MAX_DIMS = 3;

  typedef struct packed {
    logic [9:0]  ecc_cr;           // [127:118]
    logic [7:0]  num_hops;         // [117:110]
    logic [45:0] dest_vaddr;       // [109:64]
    logic [1:0]  rsvd1;            // [63:62]
    logic [13:0] length;           // [61:48]  payload words
    logic [4:0]  pkt_type;         // [47:43]
    logic        out_of_lattice;   // [42]
    logic        rsvd0;            // [41]
    logic [4:0]  intratile_port;   // [40:36]
    logic [14:0] coord;            // [35:21]  {Z, Y, X}
    logic [16:0] pid_ch;           // [20:4]   destination channel id
    logic [3:0]  vchannel;         // [3:0]
  } comm_hdr_t;

  function automatic logic [COORD_W-1:0] coord_of(logic [14:0] c, int unsigned d);
    return c[d*COORD_W +: COORD_W];
  endfunction
endpackage
