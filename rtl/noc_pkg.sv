// noc_pkg: types and constants shared by the Id-tag multicast router.
//
// A flit is {type, Id-tag, data word}: B_total = B_type + B_tag + B_word.
// The four flit types (header, databody, tail, response) and the Id-tag
// field follow the packet format of the design; the field widths, the port
// numbering and the layout of the address fields inside a header word are
// this implementation's choices.
//
// Header / response word layout (B_WORD = 32):
//   [31:28] source x   [27:24] source y
//   [23:20] target x   [19:16] target y   [15:0] reserved (carried unchanged)
// Databody / tail word: 32 bits of payload.
package noc_pkg;

  // Flit type field (B_type = 2).
  typedef enum logic [1:0] {
    FT_HEADER   = 2'd0,
    FT_DATABODY = 2'd1,
    FT_TAIL     = 2'd2,
    FT_RESPONSE = 2'd3
  } flit_type_e;

  // Width of the Id-tag field: enough for up to 16 Id slots per link.
  localparam int unsigned TAG_W  = 4;
  localparam int unsigned B_WORD = 32;
  localparam int unsigned COORD_W = 4;

  // Router ports, in the order East, North, West, South, Local.
  localparam int unsigned N_PORTS = 5;
  localparam int unsigned PORT_W  = 3;
  localparam int unsigned P_EAST  = 0;
  localparam int unsigned P_NORTH = 1;
  localparam int unsigned P_WEST  = 2;
  localparam int unsigned P_SOUTH = 3;
  localparam int unsigned P_LOCAL = 4;

  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [N_PORTS-1:0] portvec_t;   // one bit per output direction
  typedef logic [PORT_W-1:0]  port_t;      // port number 0..N_PORTS-1
  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    flit_type_e        ftype;
    tag_t              id;
    logic [B_WORD-1:0] word;
  } flit_t;

  // Per-router event flags, one bit per port, for observing the mechanisms
  // of the router (all are single-cycle pulses or levels of that cycle).
  typedef struct packed {
    portvec_t held;        // input n holds a partly granted flit
    portvec_t multicast;   // input n routed a flit to more than one output
    portvec_t contention;  // output m has more than one request
    portvec_t allocated;   // output m gave a header a new Id slot
    portvec_t runout;      // output m found no free Id slot for a header
    portvec_t dropped;     // output m dropped a databody/tail flit
  } router_status_t;

  // Header word fields.
  function automatic coord_t hdr_src_x(logic [B_WORD-1:0] w); return w[31:28]; endfunction
  function automatic coord_t hdr_src_y(logic [B_WORD-1:0] w); return w[27:24]; endfunction
  function automatic coord_t hdr_dst_x(logic [B_WORD-1:0] w); return w[23:20]; endfunction
  function automatic coord_t hdr_dst_y(logic [B_WORD-1:0] w); return w[19:16]; endfunction

  function automatic logic [B_WORD-1:0] make_hdr_word(coord_t sx, coord_t sy,
                                                      coord_t dx, coord_t dy,
                                                      logic [15:0] resv);
    return {sx, sy, dx, dy, resv};
  endfunction

endpackage
