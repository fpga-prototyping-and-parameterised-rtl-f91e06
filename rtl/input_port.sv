// input_port: one input of the router, with one flit buffer per virtual channel.
//
// The upstream sender raises rx for one cycle per flit, names the virtual
// channel (lane) with the one-hot lane_rx and puts the flit on data_in; the
// flit is written into that lane's buffer at the clock edge. credit_o[v] is
// high while lane v's buffer has room, and a sender may only send on a lane
// whose credit is high in the same cycle (credit-based flow control).
//
// Each lane also follows the packet passing through it, wormhole style. A
// packet is a header flit (destination address), a size flit (number of
// payload flits n) and n payload flits. While a lane is idle and holds a
// flit, that flit is a header and the lane raises req[v] to the control
// logic. After grant[v] the lane is connected to an output lane and its
// flits leave whenever the output port pops them (pop[v]). The second popped
// flit loads the payload counter; when the last flit of the packet is popped
// release[v] pulses (same cycle) so the control logic frees the connection,
// and the lane is idle again from the next cycle.
//
// Reading the size from the second flit follows the reference router
// simulation, where the flit after the header counts the payload flits.
module input_port #(
  parameter int FDW    = 8,
  parameter int FBD    = 16,
  parameter int NUM_VC = 2
) (
  input  logic              clock,
  input  logic              reset,
  // link from the upstream router or network interface
  input  logic              rx,
  input  logic [NUM_VC-1:0] lane_rx,
  input  logic [FDW-1:0]    data_in,
  output logic [NUM_VC-1:0] credit_o,
  // towards the control logic and the crossbar
  output logic [FDW-1:0]    head [NUM_VC],
  output logic [NUM_VC-1:0] head_valid,
  output logic [NUM_VC-1:0] req,
  input  logic [NUM_VC-1:0] grant,
  input  logic [NUM_VC-1:0] pop,
  output logic [NUM_VC-1:0] release_o
);

  typedef enum logic [1:0] {
    L_IDLE,     // waiting for a header; req while the buffer is not empty
    L_HEADER,   // connected, header not yet sent
    L_SIZE,     // header sent, size flit next
    L_PAYLOAD   // payload flits
  } lane_state_e;

  lane_state_e    state [NUM_VC];
  logic [FDW-1:0] left  [NUM_VC];

  for (genvar v = 0; v < NUM_VC; v++) begin : g_lane
    logic empty, full;

    flit_fifo #(.FDW(FDW), .FBD(FBD)) u_buf (
      .clock (clock),
      .reset (reset),
      .wr    (rx && lane_rx[v]),
      .din   (data_in),
      .rd    (pop[v]),
      .dout  (head[v]),
      .empty (empty),
      .full  (full)
    );

    assign credit_o[v]   = !full;
    assign head_valid[v] = !empty;
    assign req[v]        = (state[v] == L_IDLE) && !empty;

    always_comb begin
      release_o[v] = 1'b0;
      if (pop[v]) begin
        if (state[v] == L_SIZE && head[v] == '0) release_o[v] = 1'b1;
        if (state[v] == L_PAYLOAD && left[v] == FDW'(1)) release_o[v] = 1'b1;
      end
    end

    always_ff @(posedge clock or posedge reset) begin
      if (reset) begin
        state[v] <= L_IDLE;
        left[v]  <= '0;
      end else begin
        unique case (state[v])
          L_IDLE:    if (grant[v]) state[v] <= L_HEADER;
          L_HEADER:  if (pop[v])   state[v] <= L_SIZE;
          L_SIZE:    if (pop[v]) begin
                       left[v]  <= head[v];
                       state[v] <= (head[v] == '0) ? L_IDLE : L_PAYLOAD;
                     end
          L_PAYLOAD: if (pop[v]) begin
                       left[v] <= left[v] - 1'b1;
                       if (left[v] == FDW'(1)) state[v] <= L_IDLE;
                     end
          default:   state[v] <= L_IDLE;
        endcase
      end
    end

    a_grant_only_on_req: assert property (@(posedge clock) disable iff (reset) grant[v] |-> req[v]);
    a_pop_only_connected: assert property (@(posedge clock) disable iff (reset) pop[v] |-> (state[v] != L_IDLE));
    a_credit_respected: assert property (@(posedge clock) disable iff (reset) (rx && lane_rx[v]) |-> credit_o[v]);
  end

  a_lane_onehot: assert property (@(posedge clock) disable iff (reset) rx |-> $onehot(lane_rx));

endmodule
