// noc_mesh: MESH_X x MESH_Y two-dimensional mesh network-on-chip (3x3 by default).
//
// Node n = y*MESH_X + x holds a hermes_router with address (x, y) and a
// network_interface to the core at that node. Neighbouring routers are
// joined by a pair of opposite links: East output of (x,y) feeds the West
// input of (x+1,y), North output of (x,y) feeds the South input of (x,y+1),
// and the credits flow back the other way. Router ports on the edge of the
// mesh have no neighbour: their inputs are tied idle and their credits tied
// low, which XY routing never needs, so a corner router effectively has
// three ports and a centre router five.
//
// The cores are not part of this design: every node's two valid/ready flit
// streams (core_in_* into the network, core_out_* out of it) are ports of
// this module. A core sends a packet as header (destination X in bits
// [FDW/2-1:FDW/4], Y in [FDW/4-1:0]), size flit n, then n payload flits; the
// destination core receives the same flits.
//
// Parameters: FDW flit width, FBD buffer depth in flits, NUM_VC virtual
// channels per link; defaults are 8, 16 and 2, the configuration of the
// reference simulations. The header can address 2**(FDW/4) columns and rows.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int MESH_X = 3,
  parameter int MESH_Y = 3,
  parameter int FDW    = 8,
  parameter int FBD    = 16,
  parameter int NUM_VC = 2,
  localparam int NN    = MESH_X * MESH_Y
) (
  input  logic           clock,
  input  logic           reset,
  input  logic           core_in_valid  [NN],
  input  logic [FDW-1:0] core_in_flit   [NN],
  output logic           core_in_ready  [NN],
  output logic           core_out_valid [NN],
  output logic [FDW-1:0] core_out_flit  [NN],
  input  logic           core_out_ready [NN]
);

  if (MESH_X > 2 ** (FDW / 4) || MESH_Y > 2 ** (FDW / 4)) begin : g_size_check
    $error("noc_mesh: the header of an FDW-bit flit cannot address this mesh");
  end

  // router-side link signals, indexed [node][port]
  logic              r_rx       [NN][NPORTS];
  logic [NUM_VC-1:0] r_lane_rx  [NN][NPORTS];
  logic [FDW-1:0]    r_data_in  [NN][NPORTS];
  logic [NUM_VC-1:0] r_credit_o [NN][NPORTS];
  logic              r_tx       [NN][NPORTS];
  logic [NUM_VC-1:0] r_lane_tx  [NN][NPORTS];
  logic [FDW-1:0]    r_data_out [NN][NPORTS];
  logic [NUM_VC-1:0] r_credit_i [NN][NPORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int N = y * MESH_X + x;

      hermes_router #(
        .FDW(FDW), .FBD(FBD), .NUM_VC(NUM_VC), .X_ADDR(x), .Y_ADDR(y)
      ) u_router (
        .clock    (clock),
        .reset    (reset),
        .rx       (r_rx[N]),
        .lane_rx  (r_lane_rx[N]),
        .data_in  (r_data_in[N]),
        .credit_o (r_credit_o[N]),
        .tx       (r_tx[N]),
        .lane_tx  (r_lane_tx[N]),
        .data_out (r_data_out[N]),
        .credit_i (r_credit_i[N])
      );

      network_interface #(.FDW(FDW), .FBD(FBD), .NUM_VC(NUM_VC)) u_ni (
        .clock          (clock),
        .reset          (reset),
        .core_in_valid  (core_in_valid[N]),
        .core_in_flit   (core_in_flit[N]),
        .core_in_ready  (core_in_ready[N]),
        .core_out_valid (core_out_valid[N]),
        .core_out_flit  (core_out_flit[N]),
        .core_out_ready (core_out_ready[N]),
        .tx             (r_rx[N][PORT_LOCAL]),
        .lane_tx        (r_lane_rx[N][PORT_LOCAL]),
        .data_out       (r_data_in[N][PORT_LOCAL]),
        .credit_i       (r_credit_o[N][PORT_LOCAL]),
        .rx             (r_tx[N][PORT_LOCAL]),
        .lane_rx        (r_lane_tx[N][PORT_LOCAL]),
        .data_in        (r_data_out[N][PORT_LOCAL]),
        .credit_o       (r_credit_i[N][PORT_LOCAL])
      );

      // East side: link to (x+1, y) or tied off
      if (x < MESH_X - 1) begin : g_east
        assign r_rx[N][PORT_EAST]       = r_tx[N+1][PORT_WEST];
        assign r_lane_rx[N][PORT_EAST]  = r_lane_tx[N+1][PORT_WEST];
        assign r_data_in[N][PORT_EAST]  = r_data_out[N+1][PORT_WEST];
        assign r_credit_i[N][PORT_EAST] = r_credit_o[N+1][PORT_WEST];
      end else begin : g_east_edge
        assign r_rx[N][PORT_EAST]       = 1'b0;
        assign r_lane_rx[N][PORT_EAST]  = '0;
        assign r_data_in[N][PORT_EAST]  = '0;
        assign r_credit_i[N][PORT_EAST] = '0;
      end

      // West side: link to (x-1, y) or tied off
      if (x > 0) begin : g_west
        assign r_rx[N][PORT_WEST]       = r_tx[N-1][PORT_EAST];
        assign r_lane_rx[N][PORT_WEST]  = r_lane_tx[N-1][PORT_EAST];
        assign r_data_in[N][PORT_WEST]  = r_data_out[N-1][PORT_EAST];
        assign r_credit_i[N][PORT_WEST] = r_credit_o[N-1][PORT_EAST];
      end else begin : g_west_edge
        assign r_rx[N][PORT_WEST]       = 1'b0;
        assign r_lane_rx[N][PORT_WEST]  = '0;
        assign r_data_in[N][PORT_WEST]  = '0;
        assign r_credit_i[N][PORT_WEST] = '0;
      end

      // North side: link to (x, y+1) or tied off
      if (y < MESH_Y - 1) begin : g_north
        assign r_rx[N][PORT_NORTH]       = r_tx[N+MESH_X][PORT_SOUTH];
        assign r_lane_rx[N][PORT_NORTH]  = r_lane_tx[N+MESH_X][PORT_SOUTH];
        assign r_data_in[N][PORT_NORTH]  = r_data_out[N+MESH_X][PORT_SOUTH];
        assign r_credit_i[N][PORT_NORTH] = r_credit_o[N+MESH_X][PORT_SOUTH];
      end else begin : g_north_edge
        assign r_rx[N][PORT_NORTH]       = 1'b0;
        assign r_lane_rx[N][PORT_NORTH]  = '0;
        assign r_data_in[N][PORT_NORTH]  = '0;
        assign r_credit_i[N][PORT_NORTH] = '0;
      end

      // South side: link to (x, y-1) or tied off
      if (y > 0) begin : g_south
        assign r_rx[N][PORT_SOUTH]       = r_tx[N-MESH_X][PORT_NORTH];
        assign r_lane_rx[N][PORT_SOUTH]  = r_lane_tx[N-MESH_X][PORT_NORTH];
        assign r_data_in[N][PORT_SOUTH]  = r_data_out[N-MESH_X][PORT_NORTH];
        assign r_credit_i[N][PORT_SOUTH] = r_credit_o[N-MESH_X][PORT_NORTH];
      end else begin : g_south_edge
        assign r_rx[N][PORT_SOUTH]       = 1'b0;
        assign r_lane_rx[N][PORT_SOUTH]  = '0;
        assign r_data_in[N][PORT_SOUTH]  = '0;
        assign r_credit_i[N][PORT_SOUTH] = '0;
      end
    end
  end

endmodule
