// Shared types of the MCNS (modified memory-space-memory Clos-network switch).
//
// A cell is the fixed-length unit switched in one time slot. Only its header
// is modelled: the destination output module (OM) and the output port inside
// that OM, plus a source port number and a sequence number that travel with
// the cell so that order and loss can be checked at the outputs. Field widths
// are fixed so that every module size up to n = 256 shares one type; the
// payload itself is not carried.
package mcns_pkg;

  typedef struct packed {
    logic        valid;  // slot carries a cell
    logic [7:0]  om;     // destination output module, 0 .. n-1
    logic [7:0]  port;   // output port inside that OM, 0 .. n-1
    logic [15:0] src;    // switch input port the cell entered at
    logic [15:0] seq;    // per-source sequence number
  } cell_t;

endpackage
