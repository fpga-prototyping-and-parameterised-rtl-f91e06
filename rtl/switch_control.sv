// switch_control: the router's control logic (routing and lane allocation).
//
// Every input lane whose head flit is an unrouted header raises a request.
// A round-robin arbiter picks one request per cycle, the XY routing unit
// decides its output port from the header, and if that output port has a
// free virtual channel the lowest-numbered free one is allocated: the
// connection table entry (output port, output lane) -> input lane is written
// at the clock edge and the input lane gets grant in the same cycle. If no
// lane is free, nothing is granted and the arbiter moves on, so a blocked
// header does not hold back headers bound elsewhere. A connection is cleared
// when its input lane signals the last flit of the packet (release).
//
// Input lanes are numbered i = port*NUM_VC + lane. One routing decision per
// cycle and lowest-free lane allocation are this design's choices; the
// reference describes an arbiter that admits incoming packets to the XY
// routing algorithm.
module switch_control
  import noc_pkg::*;
#(
  parameter int FDW    = 8,
  parameter int NUM_VC = 2,
  parameter int X_ADDR = 0,
  parameter int Y_ADDR = 0,
  localparam int NIN   = NPORTS * NUM_VC,
  localparam int IW    = $clog2(NIN)
) (
  input  logic           clock,
  input  logic           reset,
  input  logic [NIN-1:0] req,
  input  logic [FDW-1:0] header [NIN],
  input  logic [NIN-1:0] release_i,
  output logic [NIN-1:0] grant,
  // connection table: for each output port and output lane
  output logic [NUM_VC-1:0] conn_valid [NPORTS],
  output logic [IW-1:0]     conn_src   [NPORTS][NUM_VC]
);

  logic [NIN-1:0] arb_gnt;
  logic [IW-1:0]  arb_idx;
  logic           arb_any;
  port_e          route;
  logic           lane_free;
  logic [(NUM_VC>1?$clog2(NUM_VC):1)-1:0] free_lane;

  rr_arbiter #(.N(NIN)) u_arb (
    .clock   (clock),
    .reset   (reset),
    .req     (req),
    .advance (1'b1),
    .gnt     (arb_gnt),
    .gnt_idx (arb_idx),
    .any     (arb_any)
  );

  xy_routing #(.FDW(FDW), .X_ADDR(X_ADDR), .Y_ADDR(Y_ADDR)) u_route (
    .header   (header[arb_idx]),
    .out_port (route)
  );

  // lowest free lane of the selected output port
  always_comb begin
    lane_free = 1'b0;
    free_lane = '0;
    for (int l = NUM_VC - 1; l >= 0; l--) begin
      if (!conn_valid[route][l]) begin
        lane_free = 1'b1;
        free_lane = l[$bits(free_lane)-1:0];
      end
    end
  end

  assign grant = (arb_any && lane_free) ? arb_gnt : '0;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      for (int p = 0; p < NPORTS; p++) begin
        conn_valid[p] <= '0;
        for (int l = 0; l < NUM_VC; l++) conn_src[p][l] <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        for (int l = 0; l < NUM_VC; l++) begin
          if (conn_valid[p][l] && release_i[conn_src[p][l]]) conn_valid[p][l] <= 1'b0;
        end
      end
      if (arb_any && lane_free) begin
        conn_valid[route][free_lane] <= 1'b1;
        conn_src[route][free_lane]   <= arb_idx;
      end
    end
  end

endmodule
