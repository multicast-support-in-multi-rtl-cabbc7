// imrr_pkg: sizes and helpers shared by the IMRR multicast switch.
//
// N_PORTS (16) and RTT_SLOTS (4) are the switch size and the selector round-trip
// time evaluated for this scheduler; CELL_BITS is a 64-byte cell. FIFO_DEPTH is this
// design's own choice. The population count is used for the fanout weight that an
// input selector attaches to its request.
package imrr_pkg;

  parameter int unsigned N_PORTS    = 16;   // inputs = outputs
  parameter int unsigned RTT_SLOTS  = 4;    // request-to-grant round trip, in slots
  parameter int unsigned QPS_DEF    = 1;    // queues visited per slot (1, or 2 for k = 2(RTT+1))
  parameter int unsigned CELL_BITS  = 512;  // 64-byte cell
  parameter int unsigned FIFO_DEPTH = 32;   // cells per multicast FIFO (own choice)

  // Number of ones in the low n bits of v (v up to 64 bits wide).
  function automatic int unsigned popcount(input logic [63:0] v, input int unsigned n);
    int unsigned c;
    c = 0;
    for (int unsigned b = 0; b < 64; b++)
      if (b < n && v[b]) c++;
    return c;
  endfunction

endpackage
