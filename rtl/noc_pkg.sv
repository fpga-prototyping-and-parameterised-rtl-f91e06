// noc_pkg: constants shared by the mesh network-on-chip.
//
// The router has five bidirectional ports. Their numbering is fixed across the
// whole design and follows the waveforms of the reference router: East=0,
// West=1, North=2, South=3, Local=4. North points towards increasing Y, East
// towards increasing X. A header flit carries the destination address in its
// lower half: X in bits [FDW/2-1:FDW/4], Y in bits [FDW/4-1:0]; the upper
// half is ignored. The second flit of a packet holds the number of payload
// flits that follow it.
package noc_pkg;

  localparam int NPORTS = 5;

  typedef enum logic [2:0] {
    PORT_EAST  = 3'd0,
    PORT_WEST  = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;

endpackage
