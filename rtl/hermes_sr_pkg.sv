// hermes_sr_pkg -- shared types and constants of the Hermes-SR network-on-chip.
//
// A Hermes-SR router has five ports: four mesh neighbours and the local
// processing element. Port numbering (EAST, WEST, NORTH, SOUTH, LOCAL) and the
// encoding of a source-route flit are this design's own choices; the packet
// layout itself follows the Hermes-SR description:
//
//   flit 0 .. k-1 : route flits, one per router on the path, each naming the
//                   output port that router must use (the last one is LOCAL)
//   flit k        : route terminator flag
//   flit k+1      : payload size in flits
//   flit k+2 ..   : payload
//
// Each router consumes (removes) the first route flit it sees, so the packet
// shrinks by one flit per hop and the destination element receives the
// terminator, the size flit and the payload.
package hermes_sr_pkg;

  localparam int unsigned NPORTS = 5;   // east, west, north, south, local
  localparam int unsigned PORT_W = 3;   // bits of a port code in a route flit

  typedef enum logic [PORT_W-1:0] {
    PORT_EAST  = 3'd0,
    PORT_WEST  = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;

  // Code in the low PORT_W bits of a flit that marks the end of the route.
  localparam logic [PORT_W-1:0] ROUTE_END = 3'd7;

endpackage
