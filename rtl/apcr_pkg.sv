// apcr_pkg: shared constants and types of the Adaptive Physical Channel
// Regulator (APCR) router and its mesh.
//
// The router design space is described by the five-tuple <d, v, l, f, p>:
// VC depth d (flits), VCs per port v, packet length l (flits), flit size f and
// phit size p (link width). The main configuration is d = 4, v = 4, f = 128 bits
// and p = 512 bits, so a link is cut into p/f = 4 sub-channels of one flit each.
// Packets are 1 flit (control) or 5 flits (data). The router has 5 ports
// (local, north, east, south, west) and routes XY in a 2D mesh.
//
// Each flit carries, besides its f data bits, a 2-bit type and the 3-bit
// lookahead route (output port at the router that receives it). A head flit
// holds its destination coordinates in the low data bits. These sideband fields
// and the coordinate encoding are this design's own choice.
package apcr_pkg;

  // ---- GNRD configuration (main design point) ----
  localparam int unsigned NUM_PORTS = 5;    // 5x5 router for a 2D mesh
  localparam int unsigned NUM_VC    = 4;    // v: virtual channels per input port
  localparam int unsigned VC_DEPTH  = 4;    // d: flits per VC
  localparam int unsigned FLIT_W    = 128;  // f: flit size in bits
  localparam int unsigned PHIT_W    = 512;  // p: link width in bits
  localparam int unsigned NUM_SUB   = PHIT_W / FLIT_W;  // sub-channels per link
  localparam int unsigned COORD_W   = 4;    // bits per mesh coordinate

  localparam int unsigned PORT_W = $clog2(NUM_PORTS);
  localparam int unsigned VC_W   = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;
  localparam int unsigned CNT_W  = $clog2(NUM_SUB + 1);  // 0..NUM_SUB flits

  // Regulation scheme of the switch allocator.
  typedef enum logic [1:0] {
    SCHEME_MONOPOLIZING    = 2'd0,
    SCHEME_FAIR_SHARING    = 2'd1,
    SCHEME_CHANNEL_STEALING = 2'd2
  } scheme_e;

  // Router ports. XY routing: +x is east, +y is south.
  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FLIT_BODY     = 2'b00,
    FLIT_HEAD     = 2'b01,
    FLIT_TAIL     = 2'b10,
    FLIT_HEADTAIL = 2'b11   // single-flit packet
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    port_e             route;   // lookahead route, meaningful in head flits
    logic [FLIT_W-1:0] data;    // head: data[COORD_W-1:0] = dest x, next COORD_W = dest y
  } flit_t;

  // One flit-wide sub-channel of a link.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;       // VC of the receiving input port
    flit_t           flit;
  } subch_t;

  // A phit-wide link: NUM_SUB sub-channels. Flits of one VC sent in the same
  // cycle occupy sub-channels in ascending order, oldest flit first.
  typedef subch_t [NUM_SUB-1:0] link_t;

  // Credit return of one input port: flits freed per VC in one cycle.
  typedef logic [NUM_VC-1:0][CNT_W-1:0] credit_t;

  function automatic logic is_head(flit_type_e t);
    return t == FLIT_HEAD || t == FLIT_HEADTAIL;
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return t == FLIT_TAIL || t == FLIT_HEADTAIL;
  endfunction

  function automatic logic [COORD_W-1:0] dest_x(flit_t f);
    return f.data[COORD_W-1:0];
  endfunction

  function automatic logic [COORD_W-1:0] dest_y(flit_t f);
    return f.data[2*COORD_W-1:COORD_W];
  endfunction

endpackage
