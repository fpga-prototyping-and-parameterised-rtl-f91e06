// hermes_router: five-port wormhole router with virtual channels.
//
// Ports East(0), West(1), North(2), South(3) connect to the neighbouring
// routers and Local(4) to the node's network interface. Every port is
// bidirectional: an input side (rx, lane_rx, data_in, credit_o) and an
// output side (tx, lane_tx, data_out, credit_i), each carrying NUM_VC
// virtual channels ("lanes") that share the physical wires.
//
// Structure: one input_port per port (a flit buffer per lane plus packet
// tracking), the switch_control (round-robin arbitration of waiting headers,
// XY routing, allocation of a free output lane, connection table), a
// crossbar made of multiplexers that presents to every output lane the head
// flit of the input lane it is connected to, and one output_port per port
// that sends one flit per cycle from a lane with downstream credit.
//
// Timing: a header written into an empty buffer at edge 0 requests at once,
// is routed and granted in the next cycle (edge 1), and leaves on the output
// link in the cycle after that, i.e. two cycles per hop when uncontended.
// Afterwards the packet streams at one flit per cycle as long as credit
// allows. Wormhole switching, XY routing, credit signals per lane and the
// parameters FDW (flit width), FBD (buffer depth) and NUM_VC follow the
// reference router; the two-cycle hop and the internal split are this
// design's own. Routers at the mesh edge keep all five ports; the unused
// ones are tied off by the mesh and removed by synthesis.
module hermes_router
  import noc_pkg::*;
#(
  parameter int FDW    = 8,
  parameter int FBD    = 16,
  parameter int NUM_VC = 2,
  parameter int X_ADDR = 0,
  parameter int Y_ADDR = 0
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              rx       [NPORTS],
  input  logic [NUM_VC-1:0] lane_rx  [NPORTS],
  input  logic [FDW-1:0]    data_in  [NPORTS],
  output logic [NUM_VC-1:0] credit_o [NPORTS],
  output logic              tx       [NPORTS],
  output logic [NUM_VC-1:0] lane_tx  [NPORTS],
  output logic [FDW-1:0]    data_out [NPORTS],
  input  logic [NUM_VC-1:0] credit_i [NPORTS]
);

  localparam int NIN = NPORTS * NUM_VC;
  localparam int IW  = $clog2(NIN);

  // flattened input lanes, index port*NUM_VC + lane
  logic [FDW-1:0] in_head  [NIN];
  logic [NIN-1:0] in_valid;
  logic [NIN-1:0] in_req;
  logic [NIN-1:0] in_grant;
  logic [NIN-1:0] in_pop;
  logic [NIN-1:0] in_release;

  logic [NUM_VC-1:0] conn_valid [NPORTS];
  logic [IW-1:0]     conn_src   [NPORTS][NUM_VC];

  logic [NUM_VC-1:0] out_valid [NPORTS];
  logic [FDW-1:0]    out_data  [NPORTS][NUM_VC];
  logic [NUM_VC-1:0] out_pop   [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    logic [FDW-1:0] head [NUM_VC];

    input_port #(.FDW(FDW), .FBD(FBD), .NUM_VC(NUM_VC)) u_in (
      .clock      (clock),
      .reset      (reset),
      .rx         (rx[p]),
      .lane_rx    (lane_rx[p]),
      .data_in    (data_in[p]),
      .credit_o   (credit_o[p]),
      .head       (head),
      .head_valid (in_valid[p*NUM_VC +: NUM_VC]),
      .req        (in_req[p*NUM_VC +: NUM_VC]),
      .grant      (in_grant[p*NUM_VC +: NUM_VC]),
      .pop        (in_pop[p*NUM_VC +: NUM_VC]),
      .release_o  (in_release[p*NUM_VC +: NUM_VC])
    );

    for (genvar v = 0; v < NUM_VC; v++) begin : g_head
      assign in_head[p*NUM_VC + v] = head[v];
    end
  end

  switch_control #(.FDW(FDW), .NUM_VC(NUM_VC), .X_ADDR(X_ADDR), .Y_ADDR(Y_ADDR)) u_ctrl (
    .clock      (clock),
    .reset      (reset),
    .req        (in_req),
    .header     (in_head),
    .release_i  (in_release),
    .grant      (in_grant),
    .conn_valid (conn_valid),
    .conn_src   (conn_src)
  );

  // crossbar: output lane (p, l) sees the head of the input lane it owns
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      for (int l = 0; l < NUM_VC; l++) begin
        out_valid[p][l] = conn_valid[p][l] && in_valid[conn_src[p][l]];
        out_data[p][l]  = in_head[conn_src[p][l]];
      end
    end
  end

  // pops travel back through the same connection
  always_comb begin
    in_pop = '0;
    for (int p = 0; p < NPORTS; p++) begin
      for (int l = 0; l < NUM_VC; l++) begin
        if (conn_valid[p][l] && out_pop[p][l]) in_pop[conn_src[p][l]] = 1'b1;
      end
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_out
    output_port #(.FDW(FDW), .NUM_VC(NUM_VC)) u_out (
      .clock      (clock),
      .reset      (reset),
      .lane_valid (out_valid[p]),
      .lane_data  (out_data[p]),
      .pop        (out_pop[p]),
      .tx         (tx[p]),
      .lane_tx    (lane_tx[p]),
      .data_out   (data_out[p]),
      .credit_i   (credit_i[p])
    );
  end

endmodule
