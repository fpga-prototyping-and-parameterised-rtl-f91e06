// tb_noc_mesh: end-to-end test of the 3x3 mesh at its default parameters
// (8-bit flits, 16-flit buffers, 2 virtual channels).
//
// Part 1 replays the reference mesh scenario: core 0 at (0,0) sends
// FA 03 FA A0 A1 (destination (2,2), three payload flits). The header must
// leave router 0 East, router 1 East, router 2 North, router 5 North and
// router 8 on its Local port, two cycles apart per hop, and core 8 must
// receive the packet unchanged.
//
// Part 2 lets all nine cores send random packets to random destinations
// (their own node included) while each core accepts flits with a random
// ready. A scoreboard checks that every packet reaches the right core
// whole. The test counts, and requires at least once, each mechanism of the
// design: routing to East, West, North, South and Local; a lane waiting for
// downstream credit; both virtual channels of a link in use at once; a
// header waiting for arbitration or a free lane; a core held back by the
// network (core_in_ready low); a core holding back the network.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int MESH_X = 3, MESH_Y = 3, NN = 9, FDW = 8, NUM_VC = 2;

  logic clock = 0, reset = 1;
  logic           core_in_valid  [NN];
  logic [FDW-1:0] core_in_flit   [NN];
  logic           core_in_ready  [NN];
  logic           core_out_valid [NN];
  logic [FDW-1:0] core_out_flit  [NN];
  logic           core_out_ready [NN];
  int checks = 0, failures = 0;

  noc_mesh dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- mechanism counters ----------
  int port_used [NPORTS];
  int credit_wait = 0, two_lanes = 0, header_wait = 0, core_held = 0, core_slow = 0;
  int cyc = 0;

  logic [NN-1:0] hdr_wait_n;
  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      assign hdr_wait_n[y*MESH_X + x] =
        (dut.g_row[y].g_col[x].u_router.in_req & ~dut.g_row[y].g_col[x].u_router.in_grant) != 0;
    end
  end

  always @(negedge clock) begin
    cyc++;
    if (!reset) begin
      #1;
      for (int n = 0; n < NN; n++) begin
        for (int p = 0; p < NPORTS; p++) begin
          if (dut.r_tx[n][p]) port_used[p]++;
        end
        if (hdr_wait_n[n]) header_wait++;
        if (core_in_valid[n] && !core_in_ready[n]) core_held++;
        if (core_out_valid[n] && !core_out_ready[n]) core_slow++;
      end
    end
  end

  // per-router internal view for credit waits and lane use
  for (genvar y = 0; y < MESH_Y; y++) begin : g_cy
    for (genvar x = 0; x < MESH_X; x++) begin : g_cx
      always @(negedge clock) begin
        if (!reset) begin
          #1;
          for (int p = 0; p < NPORTS; p++) begin
            if ((dut.g_row[y].g_col[x].u_router.out_valid[p] &
                 ~dut.r_credit_i[y*MESH_X + x][p]) != 0) credit_wait++;
            if (dut.g_row[y].g_col[x].u_router.conn_valid[p] == 2'b11 &&
                dut.r_tx[y*MESH_X + x][p]) two_lanes++;
          end
        end
      end
    end
  end

  // ---------- part 2 traffic ----------
  localparam int PKT_PER_CORE = 20;
  logic [FDW-1:0] src_q [NN][$];
  logic [FDW-1:0] pkt [int][$];
  int             pkt_dst [int];
  logic [FDW-1:0] rcv [NN][$];
  int delivered = 0, total = 0;

  initial begin
    int t_hdr [NN];
    logic [FDW-1:0] fig_pkt [5] = '{8'hFA, 8'h03, 8'hFA, 8'hA0, 8'hA1};
    logic [FDW-1:0] got [$];
    for (int n = 0; n < NN; n++) begin
      core_in_valid[n] = 0; core_in_flit[n] = 0; core_out_ready[n] = 1; t_hdr[n] = -1;
    end
    for (int p = 0; p < NPORTS; p++) port_used[p] = 0;
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 0;
    // ---------- part 1 ----------
    fork
      begin
        for (int i = 0; i < 5; i++) begin
          core_in_valid[0] = 1; core_in_flit[0] = fig_pkt[i];
          #1;
          while (!core_in_ready[0]) begin @(negedge clock); #1; end
          @(negedge clock);
        end
        core_in_valid[0] = 0;
      end
      begin
        for (int c = 0; c < 60; c++) begin
          @(negedge clock);
          #1;
          for (int n = 0; n < NN; n++)
            for (int p = 0; p < NPORTS; p++)
              if (dut.r_tx[n][p] && dut.r_data_out[n][p] == 8'hFA && t_hdr[n] < 0) begin
                t_hdr[n] = cyc;
                case (n)
                  0, 1:    check(p == PORT_EAST, $sformatf("router %0d sends East", n));
                  2, 5:    check(p == PORT_NORTH, $sformatf("router %0d sends North", n));
                  8:       check(p == PORT_LOCAL, "router 8 delivers Local");
                  default: check(0, $sformatf("router %0d is off the XY path", n));
                endcase
              end
          if (core_out_valid[8]) got.push_back(core_out_flit[8]);
          for (int n = 0; n < 8; n++) check(!core_out_valid[n], "only core 8 receives");
        end
      end
    join
    check(got.size() == 5, "core 8 receives five flits");
    for (int i = 0; i < 5 && i < got.size(); i++) check(got[i] == fig_pkt[i], $sformatf("core 8 flit %0d", i));
    check(t_hdr[1] - t_hdr[0] == 2 && t_hdr[2] - t_hdr[1] == 2 && t_hdr[5] - t_hdr[2] == 2 &&
          t_hdr[8] - t_hdr[5] == 2, $sformatf("two cycles per hop (%0d %0d %0d %0d %0d)",
          t_hdr[0], t_hdr[1], t_hdr[2], t_hdr[5], t_hdr[8]));
    // ---------- part 2 ----------
    for (int s = 0; s < NN; s++) begin
      for (int k = 0; k < PKT_PER_CORE; k++) begin
        int id, d, n;
        logic [FDW-1:0] h;
        id = s * PKT_PER_CORE + k;
        d = $urandom_range(0, NN - 1);
        h = FDW'((s << 4) | ((d % MESH_X) << 2) | (d / MESH_X));
        n = $urandom_range(1, 12);
        pkt[id].push_back(h);
        pkt[id].push_back(FDW'(n));
        pkt[id].push_back(FDW'(id));
        for (int j = 1; j < n; j++) pkt[id].push_back(FDW'($urandom));
        pkt_dst[id] = d;
        for (int j = 0; j < pkt[id].size(); j++) src_q[s].push_back(pkt[id][j]);
        total++;
      end
    end
    for (int c = 0; c < 30000 && delivered < total; c++) begin
      bit taken [NN];
      for (int n = 0; n < NN; n++) begin
        if (!core_in_valid[n] && src_q[n].size() > 0 && $urandom_range(0, 99) < 85) begin
          core_in_valid[n] = 1; core_in_flit[n] = src_q[n].pop_front();
        end
        core_out_ready[n] = $urandom_range(0, 99) < 50;
      end
      #1;
      for (int n = 0; n < NN; n++) begin
        taken[n] = core_in_valid[n] && core_in_ready[n];
        if (core_out_valid[n] && core_out_ready[n]) begin
          rcv[n].push_back(core_out_flit[n]);
          if (rcv[n].size() >= 3 && rcv[n].size() == int'(rcv[n][1]) + 2) begin
            int id;
            id = int'(rcv[n][2]);
            check(pkt.exists(id), "known packet");
            if (pkt.exists(id)) begin
              check(pkt_dst[id] == n, $sformatf("packet %0d at its destination", id));
              check(rcv[n] == pkt[id], $sformatf("packet %0d intact", id));
              pkt.delete(id);
            end
            rcv[n].delete();
            delivered++;
          end
        end
      end
      @(posedge clock);
      @(negedge clock);
      for (int n = 0; n < NN; n++) if (taken[n]) core_in_valid[n] = 0;
    end
    check(delivered == total, $sformatf("all packets delivered (%0d of %0d)", delivered, total));
    check(port_used[PORT_EAST] > 0,  "routed East");
    check(port_used[PORT_WEST] > 0,  "routed West");
    check(port_used[PORT_NORTH] > 0, "routed North");
    check(port_used[PORT_SOUTH] > 0, "routed South");
    check(port_used[PORT_LOCAL] > 0, "delivered Local");
    check(credit_wait > 0, "lane waited for credit");
    check(two_lanes > 0, "both virtual channels of a link in use");
    check(header_wait > 0, "header waited for arbitration or a lane");
    check(core_held > 0, "core held back by the network");
    check(core_slow > 0, "network held back by a core");
    $display("delivered %0d/%0d; port use E%0d W%0d N%0d S%0d L%0d; credit waits %0d; two-lane flits %0d; header waits %0d; core held %0d; core slow %0d",
             delivered, total, port_used[0], port_used[1], port_used[2], port_used[3], port_used[4],
             credit_wait, two_lanes, header_wait, core_held, core_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
