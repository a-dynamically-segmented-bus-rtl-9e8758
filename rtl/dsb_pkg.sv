// Shared types and helpers of the dynamically segmented bus (DS-Bus).
//
// The DS-Bus is a ring of N bus segments, one per processing element (PE),
// joined by N switches. Switch i sits between segment i and segment
// (i+1) mod N. A request names a bus section by its Left and Right ends;
// the section runs from Left counter-clockwise (increasing index, wrapping
// at N) to Right. Operations are Write, Read and Broadcast as in the
// architecture; the IDLE code, the field widths and the field order of the
// request and of the bus message are choices of this implementation.
package dsb_pkg;

  // Control-signal group of the bus: the operation carried by a section.
  // IDLE is zero so that an undriven (wired-OR) section reads as idle.
  typedef enum logic [1:0] {
    OP_IDLE      = 2'd0,
    OP_WRITE     = 2'd1,
    OP_READ      = 2'd2,
    OP_BROADCAST = 2'd3
  } dsb_op_e;

  // Distance from a to b going counter-clockwise on a ring of n positions.
  function automatic int unsigned ring_dist(int unsigned a, int unsigned b,
                                            int unsigned n);
    return (b + n - a) % n;
  endfunction

endpackage
