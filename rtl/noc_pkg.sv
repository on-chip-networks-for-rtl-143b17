// noc_pkg: types and constants shared by the routers, meshes, BAN links and
// the ENC migration controller.
//
// A flit carries its own routing fields (destination and source coordinates)
// so that every flit of a packet is self-describing; routers look at them only
// on the head flit. The source fields double as the native-core coordinates of
// a migrating thread context. Field widths are this design's choice: 4-bit
// coordinates cover the 11x10 and 8x8 meshes, 3-bit VC numbers cover the
// 8 virtual channels of the PROM configuration, and the payload is 32 bits.
package noc_pkg;

  localparam int COORD_W = 4;
  localparam int VC_W    = 3;
  localparam int DATA_W  = 32;
  localparam int NPORT   = 5;

  // Router ports. y grows towards north, x towards east.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // Routing functions a router can be built with.
  typedef enum logic [1:0] {
    RT_DOR_XY = 2'd0,
    RT_DOR_YX = 2'd1,
    RT_PROM   = 2'd2
  } routing_e;

  // PROM variants: uniform (f = 0), fixed f, O1TURN-like (f = infinity) and
  // variable parametrized PROM (f = fmax * x * y / N).
  typedef enum logic [1:0] {
    PROM_UNIFORM = 2'd0,
    PROM_FIXED   = 2'd1,
    PROM_O1TURN  = 2'd2,
    PROM_V       = 2'd3
  } prom_mode_e;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [VC_W-1:0]   vc;     // virtual channel at the receiving input port
    coord_t            dx;     // destination x
    coord_t            dy;     // destination y
    coord_t            sx;     // source x (native core x for thread contexts)
    coord_t            sy;     // source y (native core y for thread contexts)
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

endpackage
