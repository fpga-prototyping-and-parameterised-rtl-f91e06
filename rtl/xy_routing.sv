// xy_routing: deterministic XY routing decision for one header flit.
//
// The destination X and Y are read from the lower half of the header flit
// (X in bits [FDW/2-1:FDW/4], Y in bits [FDW/4-1:0]). X is resolved first:
// a larger destination X goes East, a smaller one West. Only when X matches
// is Y compared: larger goes North, smaller South, and equal delivers to the
// Local port. Purely combinational; X_ADDR/Y_ADDR are this router's own
// coordinates. The field layout of the header is this design's reading of the
// reference waveforms (header 0xF5 addresses node (1,1), 0xFA node (2,2)).
// In a router at X_ADDR = 0 or Y_ADDR = 0 one of the comparisons is constant
// (nothing is smaller than 0), which lint reports and synthesis removes; the
// upper half of the header is deliberately not looked at.
module xy_routing
  import noc_pkg::*;
#(
  parameter int FDW    = 8,
  parameter int X_ADDR = 0,
  parameter int Y_ADDR = 0
) (
  input  logic [FDW-1:0] header,
  output port_e          out_port
);

  localparam int CB = FDW / 4;

  logic [CB-1:0] dx, dy, px, py;

  assign dx = header[2*CB-1:CB];
  assign dy = header[CB-1:0];
  assign px = CB'(X_ADDR);
  assign py = CB'(Y_ADDR);

  always_comb begin
    if (dx > px)      out_port = PORT_EAST;
    else if (dx < px) out_port = PORT_WEST;
    else if (dy > py) out_port = PORT_NORTH;
    else if (dy < py) out_port = PORT_SOUTH;
    else              out_port = PORT_LOCAL;
  end

endmodule
