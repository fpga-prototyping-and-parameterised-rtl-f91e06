// tb_hermes_router: self-checking test of the five-port router.
//
// Part 1 replays the reference router scenario: router (0,0), packet
// F5 08 FF FE FD FC FB FA F9 F8 offered on lane 0 of the Local input
// (header 0xF5 addresses (1,1), size flit 8). It must leave on the East
// output (port 0) on lane 0 with the flits unchanged, the header two cycles
// after it was written, and the ten flits in ten consecutive cycles.
//
// Part 2 puts a router at (1,1) and offers random packets on every lane of
// every input (senders obey credit_o). Each output has a model of the
// downstream buffers that drains at random, so credits run out. A scoreboard
// checks that every packet leaves on its XY port, intact, contiguous on one
// lane, and that all packets arrive. It counts credit stalls, cycles where
// two lanes interleave on one link, and headers kept waiting for a lane.
module tb_hermes_router;
  import noc_pkg::*;
  localparam int FDW = 8, FBD = 16, NUM_VC = 2;

  logic clock = 0, reset = 1;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always #5 clock = ~clock;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- router (0,0): reference packet ----------------
  logic              a_rx [NPORTS], a_tx [NPORTS];
  logic [NUM_VC-1:0] a_lane_rx [NPORTS], a_credit_o [NPORTS], a_lane_tx [NPORTS], a_credit_i [NPORTS];
  logic [FDW-1:0]    a_data_in [NPORTS], a_data_out [NPORTS];

  hermes_router #(.FDW(FDW), .FBD(FBD), .NUM_VC(NUM_VC), .X_ADDR(0), .Y_ADDR(0)) dut_a (
    .clock(clock), .reset(reset),
    .rx(a_rx), .lane_rx(a_lane_rx), .data_in(a_data_in), .credit_o(a_credit_o),
    .tx(a_tx), .lane_tx(a_lane_tx), .data_out(a_data_out), .credit_i(a_credit_i)
  );

  // ---------------- router (1,1): random traffic ----------------
  logic              b_rx [NPORTS], b_tx [NPORTS];
  logic [NUM_VC-1:0] b_lane_rx [NPORTS], b_credit_o [NPORTS], b_lane_tx [NPORTS], b_credit_i [NPORTS];
  logic [FDW-1:0]    b_data_in [NPORTS], b_data_out [NPORTS];

  hermes_router #(.FDW(FDW), .FBD(FBD), .NUM_VC(NUM_VC), .X_ADDR(1), .Y_ADDR(1)) dut_b (
    .clock(clock), .reset(reset),
    .rx(b_rx), .lane_rx(b_lane_rx), .data_in(b_data_in), .credit_o(b_credit_o),
    .tx(b_tx), .lane_tx(b_lane_tx), .data_out(b_data_out), .credit_i(b_credit_i)
  );

  // packet store: id -> flits, expected port
  logic [FDW-1:0] pkt [int][$];
  int             pkt_port [int];
  int             delivered = 0, sent_pkts = 0;
  // per input lane: flits still to send
  logic [FDW-1:0] src_q [NPORTS][NUM_VC][$];
  // per output lane: flits received of the current packet
  logic [FDW-1:0] rcv [NPORTS][NUM_VC][$];
  int             down_level [NPORTS][NUM_VC];
  int credit_stalls = 0, interleave = 0, header_waits = 0;

  function automatic int xy(input logic [FDW-1:0] h, input int px, input int py);
    int dx, dy;
    dx = (h >> 2) & 3; dy = h & 3;
    if (dx > px) return 0;
    if (dx < px) return 1;
    if (dy > py) return 2;
    if (dy < py) return 3;
    return 4;
  endfunction

  initial begin
    logic [FDW-1:0] ref_pkt [10] = '{8'hF5, 8'h08, 8'hFF, 8'hFE, 8'hFD, 8'hFC, 8'hFB, 8'hFA, 8'hF9, 8'hF8};
    int t_in, t_out, got;
    for (int p = 0; p < NPORTS; p++) begin
      a_rx[p] = 0; a_lane_rx[p] = 0; a_data_in[p] = 0; a_credit_i[p] = '1;
      b_rx[p] = 0; b_lane_rx[p] = 0; b_data_in[p] = 0; b_credit_i[p] = '1;
    end
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 0;
    @(negedge clock);
    // ---- part 1 ----
    check(a_credit_o[PORT_EAST] == 2'b11, "East input credits after reset");
    fork
      begin
        for (int i = 0; i < 10; i++) begin
          a_rx[PORT_LOCAL] = 1; a_lane_rx[PORT_LOCAL] = 2'b01; a_data_in[PORT_LOCAL] = ref_pkt[i];
          if (i == 0) t_in = int'($time / 10);
          @(negedge clock);
        end
        a_rx[PORT_LOCAL] = 0; a_lane_rx[PORT_LOCAL] = 0; a_data_in[PORT_LOCAL] = 0;
      end
      begin
        got = 0;
        t_out = -1;
        while (got < 10) begin
          @(negedge clock);
          #1;
          if (a_tx[PORT_EAST]) begin
            if (got == 0) t_out = int'($time / 10);
            check(a_lane_tx[PORT_EAST] == 2'b01, "reference packet on lane 0");
            check(a_data_out[PORT_EAST] == ref_pkt[got], $sformatf("reference flit %0d", got));
            got++;
          end else if (got > 0) begin
            check(0, "reference packet leaves in consecutive cycles");
          end
          for (int p = 0; p < NPORTS; p++) if (p != PORT_EAST) check(!a_tx[p], "only East transmits");
        end
      end
    join
    check(t_out - t_in == 2, $sformatf("header latency %0d cycles", t_out - t_in));
    // ---- part 2 ----
    for (int id = 0; id < 250; id++) begin
      int p, v, n, dx, dy;
      logic [FDW-1:0] h;
      p = $urandom_range(0, NPORTS - 1);
      v = $urandom_range(0, NUM_VC - 1);
      do begin
        dx = $urandom_range(0, 2); dy = $urandom_range(0, 2);
        h = FDW'(8'hF0 | (dx << 2) | dy);
        // XY never turns back: drop destinations an input cannot carry
      end while ((p == PORT_EAST && dx < 1) || (p == PORT_WEST && dx > 1) ||
                 (p == PORT_NORTH && (dx != 1 || dy < 1)) || (p == PORT_SOUTH && (dx != 1 || dy > 1)));
      n = $urandom_range(1, 12);
      pkt[id].push_back(h);
      pkt[id].push_back(FDW'(n));
      pkt[id].push_back(FDW'(id));
      for (int k = 1; k < n; k++) pkt[id].push_back(FDW'($urandom));
      pkt_port[id] = xy(h, 1, 1);
      for (int k = 0; k < pkt[id].size(); k++) src_q[p][v].push_back(pkt[id][k]);
      sent_pkts++;
    end
    for (int p = 0; p < NPORTS; p++) for (int v = 0; v < NUM_VC; v++) down_level[p][v] = 0;
    for (int c = 0; c < 20000 && delivered < sent_pkts; c++) begin
      // drive inputs at the negative edge
      for (int p = 0; p < NPORTS; p++) begin
        int v;
        b_rx[p] = 0; b_lane_rx[p] = 0;
        v = $urandom_range(0, NUM_VC - 1);
        if (src_q[p][v].size() > 0 && $urandom_range(0, 99) < 70) begin
          if (b_credit_o[p][v]) begin
            b_rx[p] = 1; b_lane_rx[p][v] = 1'b1; b_data_in[p] = src_q[p][v][0];
          end else credit_stalls++;
        end
        for (int l = 0; l < NUM_VC; l++) b_credit_i[p][l] = (down_level[p][l] < 4);
      end
      #1;
      if (dut_b.in_req != 0 && dut_b.in_grant == 0) header_waits++;
      for (int p = 0; p < NPORTS; p++) begin
        for (int l = 0; l < NUM_VC; l++) if (b_rx[p] && b_lane_rx[p][l]) void'(src_q[p][l].pop_front());
        if (b_tx[p]) begin
          int l;
          check($onehot(b_lane_tx[p]), "lane_tx one-hot");
          l = 0;
          for (int k = 0; k < NUM_VC; k++) if (b_lane_tx[p][k]) l = k;
          check(b_credit_i[p][l], "sent only with credit");
          down_level[p][l]++;
          rcv[p][l].push_back(b_data_out[p]);
          if (rcv[p][l].size() >= 3 && rcv[p][l].size() == int'(rcv[p][l][1]) + 2) begin
            int id;
            id = int'(rcv[p][l][2]);
            check(pkt.exists(id), "known packet");
            if (pkt.exists(id)) begin
              check(pkt_port[id] == p, $sformatf("packet %0d on XY port", id));
              check(rcv[p][l] == pkt[id], $sformatf("packet %0d intact", id));
              pkt.delete(id);
            end
            rcv[p][l].delete();
            delivered++;
          end
        end
        // downstream drains at random
        for (int l = 0; l < NUM_VC; l++)
          if (down_level[p][l] > 0 && $urandom_range(0, 99) < 45) down_level[p][l]--;
      end
      begin
        int busy_links = 0;
        for (int p = 0; p < NPORTS; p++) if (dut_b.conn_valid[p] == 2'b11) busy_links++;
        if (busy_links > 0) interleave++;
      end
      @(posedge clock);
      @(negedge clock);
    end
    check(delivered == sent_pkts, $sformatf("all packets delivered (%0d of %0d)", delivered, sent_pkts));
    check(credit_stalls > 0, "credit stall seen");
    check(interleave > 0, "two lanes active on one link");
    check(header_waits > 0, "header waited for a lane or arbitration");
    $display("delivered %0d, credit stalls %0d, two-lane cycles %0d, header waits %0d",
             delivered, credit_stalls, interleave, header_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
