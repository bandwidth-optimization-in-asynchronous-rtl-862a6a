// noc_pkg: types and sizes shared by every block of the asynchronous NoC.
//
// A packet is a single flit. The flit carries its source route on separate
// wires next to the payload: the most-significant route bit steers the flit
// at the next switch, and each switch rotates the route left by one so that
// the following bit moves into the most-significant position.
//
// The flit format (route bits in parallel with the data bits, one flit per
// packet) follows the router description. The payload width and the number
// of route bits are not fixed by it: DATA_W = 32 is this design's choice, and
// ROUTE_W = 8 covers the 5 router hops of the longest path in the MPEG4
// network with room to spare.
package noc_pkg;

  parameter int unsigned DATA_W  = 32;
  parameter int unsigned ROUTE_W = 8;

  typedef logic [ROUTE_W-1:0] route_t;
  typedef logic [DATA_W-1:0]  data_t;

  typedef struct packed {
    route_t route;
    data_t  data;
  } flit_t;

  // Route after one switch: rotate left so the next steering bit is the MSB.
  function automatic route_t swizzle(route_t r);
    return {r[ROUTE_W-2:0], r[ROUTE_W-1]};
  endfunction

endpackage
