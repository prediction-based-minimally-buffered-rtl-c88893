// minbd_pkg: types, constants and helper functions shared by the MinBD
// (minimally-buffered deflection) router and its mesh.
//
// A flit is a single self-routed network word: a valid bit, destination and
// source coordinates, an age (number of router hops taken so far, saturating)
// and a payload. The age is the arbitration priority everywhere in the
// router: an older flit beats a younger one, and a tie goes to the lower slot
// index. The flit layout, the coordinate widths, the payload width and the
// oldest-first priority are this design's choices; the router only needs
// some priority that is the same for ejection and for routing arbitration.
//
// Ports are numbered North=0, East=1, South=2, West=3. x grows towards East,
// y grows towards South.
package minbd_pkg;

  localparam int unsigned NPORTS = 4;   // network ports of a 2D-mesh router
  localparam int unsigned COORD_W = 3;  // up to an 8x8 mesh
  localparam int unsigned AGE_W   = 8;
  localparam int unsigned DATA_W  = 32;

  typedef logic [COORD_W-1:0] coord_t;

  typedef enum logic [1:0] {
    PORT_N = 2'd0,
    PORT_E = 2'd1,
    PORT_S = 2'd2,
    PORT_W = 2'd3
  } port_e;

  typedef struct packed {
    logic              valid;
    coord_t            dst_x;
    coord_t            dst_y;
    coord_t            src_x;
    coord_t            src_y;
    logic [AGE_W-1:0]  age;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Side-buffer status level sent to neighbouring routers.
  typedef enum logic [1:0] {
    SB_EMPTY = 2'd0,
    SB_LOW   = 2'd1,   // occupied, below half
    SB_HIGH  = 2'd2,   // half or more, not full
    SB_FULL  = 2'd3
  } sb_status_e;

  localparam flit_t FLIT_NONE = '0;

  // Per-cycle event strobes of one router, for counting in simulation and
  // for performance counters.
  typedef struct packed {
    logic [2:0] deflect;     // flits leaving on a non-productive port
    logic       buffered;    // a deflected flit was moved into the side buffer
    logic       buf_refused; // a flit was deflected while the side buffer was full
    logic       reinject;    // the side buffer's head re-entered the pipeline
    logic       redirect;    // the redirection block forced a slot free
    logic       eject;       // a flit was delivered to the local node
    logic       inject;      // a new flit entered from the local node
    logic       inj_blocked; // a new flit was offered but got no slot
    logic       inj_held;    // a new flit was offered while inj_hold was set
  } router_ev_t;

  // True when flit a has strictly higher priority than flit b
  // (valid beats invalid, then older beats younger).
  function automatic logic prio_higher(flit_t a, flit_t b);
    if (a.valid != b.valid) return a.valid;
    return a.age > b.age;
  endfunction

  function automatic logic at_dest(flit_t f, coord_t x, coord_t y);
    return f.valid && f.dst_x == x && f.dst_y == y;
  endfunction

  // Productive direction under dimension-order (X then Y) routing.
  // A flit already at its destination has none; PORT_N is returned then and
  // the caller treats it as deflected whatever port it gets.
  function automatic port_e route_dor(flit_t f, coord_t x, coord_t y);
    if (f.dst_x > x) return PORT_E;
    if (f.dst_x < x) return PORT_W;
    if (f.dst_y > y) return PORT_S;
    return PORT_N;
  endfunction

  function automatic logic [AGE_W-1:0] age_inc(logic [AGE_W-1:0] a);
    return (a == '1) ? a : a + 1'b1;
  endfunction

endpackage
