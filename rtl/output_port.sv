// output_port: shares one physical output link among the virtual channels.
//
// Each output lane that is connected to an input lane presents that lane's
// head flit (lane_valid/lane_data). A lane is eligible when it has a flit and
// the downstream buffer of the same lane has room (credit_i). A round-robin
// arbiter picks one eligible lane per cycle; that flit is driven on data_out
// with tx high and lane_tx naming the lane (one-hot), and the source buffer
// is popped (pop) at the same clock edge. Flits of different packets on
// different lanes therefore interleave flit by flit on the link, and a lane
// whose downstream buffer is full waits without blocking the others.
// Everything here is combinational apart from the arbiter pointer; the
// output is registered by the receiving buffer.
module output_port #(
  parameter int FDW    = 8,
  parameter int NUM_VC = 2
) (
  input  logic              clock,
  input  logic              reset,
  input  logic [NUM_VC-1:0] lane_valid,
  input  logic [FDW-1:0]    lane_data [NUM_VC],
  output logic [NUM_VC-1:0] pop,
  output logic              tx,
  output logic [NUM_VC-1:0] lane_tx,
  output logic [FDW-1:0]    data_out,
  input  logic [NUM_VC-1:0] credit_i
);

  localparam int LW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [NUM_VC-1:0] gnt;
  logic [LW-1:0]     idx;
  logic              any;

  rr_arbiter #(.N(NUM_VC)) u_arb (
    .clock   (clock),
    .reset   (reset),
    .req     (lane_valid & credit_i),
    .advance (1'b1),
    .gnt     (gnt),
    .gnt_idx (idx),
    .any     (any)
  );

  assign tx       = any;
  assign lane_tx  = gnt;
  assign pop      = gnt;
  assign data_out = any ? lane_data[idx] : '0;

endmodule
