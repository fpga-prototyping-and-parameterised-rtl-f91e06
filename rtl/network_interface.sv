// network_interface: joins an IP core to the Local port of its router.
//
// The core sees two plain valid/ready flit streams; the router side speaks
// the link protocol of the network (tx/rx, one-hot lane, data, credit per
// lane). A packet on either stream is: header flit (destination address),
// size flit (payload count n), n payload flits.
//
// Injection: when the core offers a header, a round-robin arbiter picks a
// virtual channel of the router's Local input that has credit; the whole
// packet then goes on that lane, one flit per cycle while credit lasts
// (core_in_ready = credit of that lane). Consecutive packets rotate over the
// lanes.
// Ejection: flits from the router's Local output are stored in one buffer
// per lane (FBD flits each; credit_o = room left). The core receives whole
// packets: a lane holding a header is chosen round-robin and stays selected
// until its last payload flit has been taken, so packets that were
// interleaved on the link reach the core one after another.
//
// The reference only says that the interface handles the handshake between
// core and router; both stream interfaces, the lane choice and the ejection
// buffers are this design's.
module network_interface #(
  parameter int FDW    = 8,
  parameter int FBD    = 16,
  parameter int NUM_VC = 2
) (
  input  logic              clock,
  input  logic              reset,
  // core -> network
  input  logic              core_in_valid,
  input  logic [FDW-1:0]    core_in_flit,
  output logic              core_in_ready,
  // network -> core
  output logic              core_out_valid,
  output logic [FDW-1:0]    core_out_flit,
  input  logic              core_out_ready,
  // to the router's Local input
  output logic              tx,
  output logic [NUM_VC-1:0] lane_tx,
  output logic [FDW-1:0]    data_out,
  input  logic [NUM_VC-1:0] credit_i,
  // from the router's Local output
  input  logic              rx,
  input  logic [NUM_VC-1:0] lane_rx,
  input  logic [FDW-1:0]    data_in,
  output logic [NUM_VC-1:0] credit_o
);

  localparam int LW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  typedef enum logic [1:0] {P_HEADER, P_SIZE, P_PAYLOAD} pkt_state_e;

  // ---------------- injection ----------------
  pkt_state_e        ij_state;
  logic [FDW-1:0]    ij_left;
  logic [LW-1:0]     ij_lane;
  logic [NUM_VC-1:0] ij_gnt;
  logic [LW-1:0]     ij_gnt_idx;
  logic              ij_any;
  logic              ij_fire;

  rr_arbiter #(.N(NUM_VC)) u_inj_arb (
    .clock   (clock),
    .reset   (reset),
    .req     (credit_i),
    .advance (ij_state == P_HEADER && core_in_valid),
    .gnt     (ij_gnt),
    .gnt_idx (ij_gnt_idx),
    .any     (ij_any)
  );

  always_comb begin
    if (ij_state == P_HEADER) begin
      core_in_ready = ij_any;
      lane_tx       = ij_gnt;
    end else begin
      core_in_ready = credit_i[ij_lane];
      lane_tx       = '0;
      lane_tx[ij_lane] = 1'b1;
    end
  end

  assign ij_fire  = core_in_valid && core_in_ready;
  assign tx       = ij_fire;
  assign data_out = core_in_flit;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      ij_state <= P_HEADER;
      ij_left  <= '0;
      ij_lane  <= '0;
    end else if (ij_fire) begin
      unique case (ij_state)
        P_HEADER: begin
          ij_lane  <= ij_gnt_idx;
          ij_state <= P_SIZE;
        end
        P_SIZE: begin
          ij_left  <= core_in_flit;
          ij_state <= (core_in_flit == '0) ? P_HEADER : P_PAYLOAD;
        end
        P_PAYLOAD: begin
          ij_left <= ij_left - 1'b1;
          if (ij_left == FDW'(1)) ij_state <= P_HEADER;
        end
        default: ij_state <= P_HEADER;
      endcase
    end
  end

  // ---------------- ejection ----------------
  logic [FDW-1:0]    ej_head [NUM_VC];
  logic [NUM_VC-1:0] ej_empty;
  logic [NUM_VC-1:0] ej_pop;
  pkt_state_e        ej_state;
  logic [FDW-1:0]    ej_left;
  logic [LW-1:0]     ej_lane;
  logic [NUM_VC-1:0] ej_gnt;
  logic [LW-1:0]     ej_gnt_idx;
  logic              ej_any;
  logic              ej_fire;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_ej
    logic full;
    flit_fifo #(.FDW(FDW), .FBD(FBD)) u_buf (
      .clock (clock),
      .reset (reset),
      .wr    (rx && lane_rx[v]),
      .din   (data_in),
      .rd    (ej_pop[v]),
      .dout  (ej_head[v]),
      .empty (ej_empty[v]),
      .full  (full)
    );
    assign credit_o[v] = !full;
  end

  rr_arbiter #(.N(NUM_VC)) u_ej_arb (
    .clock   (clock),
    .reset   (reset),
    .req     (~ej_empty),
    .advance (ej_state == P_HEADER && core_out_ready),
    .gnt     (ej_gnt),
    .gnt_idx (ej_gnt_idx),
    .any     (ej_any)
  );

  logic [LW-1:0] ej_sel;
  assign ej_sel         = (ej_state == P_HEADER) ? ej_gnt_idx : ej_lane;
  assign core_out_valid = (ej_state == P_HEADER) ? ej_any : !ej_empty[ej_sel];
  assign core_out_flit  = ej_head[ej_sel];
  assign ej_fire        = core_out_valid && core_out_ready;

  always_comb begin
    ej_pop = '0;
    if (ej_fire) ej_pop = (ej_state == P_HEADER) ? ej_gnt : (NUM_VC'(1) << ej_lane);
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      ej_state <= P_HEADER;
      ej_left  <= '0;
      ej_lane  <= '0;
    end else if (ej_fire) begin
      unique case (ej_state)
        P_HEADER: begin
          ej_lane  <= ej_gnt_idx;
          ej_state <= P_SIZE;
        end
        P_SIZE: begin
          ej_left  <= core_out_flit;
          ej_state <= (core_out_flit == '0) ? P_HEADER : P_PAYLOAD;
        end
        P_PAYLOAD: begin
          ej_left <= ej_left - 1'b1;
          if (ej_left == FDW'(1)) ej_state <= P_HEADER;
        end
        default: ej_state <= P_HEADER;
      endcase
    end
  end

  a_core_in_stable: assert property (@(posedge clock) disable iff (reset)
    (core_in_valid && !core_in_ready) |=> core_in_valid);

endmodule
