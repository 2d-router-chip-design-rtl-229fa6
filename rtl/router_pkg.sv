// router_pkg: types and constants shared by the five-port 2D router.
//
// The router has five ports, named after the mesh directions plus the local
// processing element. A 3-bit port code picks one of them; the code values
// 000 east, 001 west, 010 north, 011 south and 100 local are the ones used in
// the published simulation of the chip. The codes 101, 110 and 111 select no
// port; treating them as "no operation" is this design's choice. The 64-bit
// packet width is the chip's own.
package router_pkg;

  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned SEL_W     = 3;
  localparam int unsigned DATA_W    = 64;

  typedef enum logic [SEL_W-1:0] {
    PORT_EAST  = 3'b000,
    PORT_WEST  = 3'b001,
    PORT_NORTH = 3'b010,
    PORT_SOUTH = 3'b011,
    PORT_LOCAL = 3'b100
  } port_e;

endpackage
