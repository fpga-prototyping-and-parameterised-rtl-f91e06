// tb_network_interface: self-checking test of the core-to-router interface.
//
// Injection: a core model offers random packets (header, size n, n payload
// flits; the first payload flit is a packet id) on the valid/ready stream.
// The testbench plays the router's Local input: per-lane buffers of depth 4
// that drain at random and drive credit_i. Checks that every flit appears on
// the link in order, only on a lane with credit, that a whole packet stays on
// one lane, and that consecutive packets change lane when both have credit.
// Ejection: the testbench plays the router's Local output and sends packets
// on both lanes with their flits interleaved, obeying credit_o; the core
// side takes flits with a random ready. Checks that the core receives each
// packet whole and contiguous, and all of them.
module tb_network_interface;
  localparam int FDW = 8, FBD = 16, NUM_VC = 2;

  logic clock = 0, reset = 1;
  logic core_in_valid, core_in_ready, core_out_valid, core_out_ready;
  logic [FDW-1:0] core_in_flit, core_out_flit, data_out, data_in;
  logic tx, rx;
  logic [NUM_VC-1:0] lane_tx, credit_i, lane_rx, credit_o;
  int checks = 0, failures = 0;

  network_interface #(.FDW(FDW), .FBD(FBD), .NUM_VC(NUM_VC)) dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NPKT = 120;
  logic [FDW-1:0] inj_stream [$];   // flits the core offers, in order
  logic [FDW-1:0] inj_expect [$];   // same, consumed as they appear on the link
  int inj_level [NUM_VC];
  int inj_pos = 0, inj_len = 0, inj_lane = -1, last_pkt_lane = -1, lane_changes = 0;
  logic [FDW-1:0] ej_src [NUM_VC][$];
  logic [FDW-1:0] ej_pkt [int][$];
  logic [FDW-1:0] ej_cur [$];
  int ej_done = 0, ej_sent_pkts = 0, credit_stalls = 0, core_stalls = 0;

  function automatic void make_pkt(input int id, ref logic [FDW-1:0] q [$]);
    int n;
    n = $urandom_range(1, 9);
    q.push_back(FDW'($urandom));
    q.push_back(FDW'(n));
    q.push_back(FDW'(id));
    for (int k = 1; k < n; k++) q.push_back(FDW'($urandom));
  endfunction

  initial begin
    core_in_valid = 0; core_in_flit = 0; core_out_ready = 0;
    rx = 0; lane_rx = 0; data_in = 0; credit_i = '1;
    for (int v = 0; v < NUM_VC; v++) inj_level[v] = 0;
    for (int id = 0; id < NPKT; id++) make_pkt(id, inj_stream);
    foreach (inj_stream[k]) inj_expect.push_back(inj_stream[k]);
    for (int id = 0; id < NPKT; id++) begin
      logic [FDW-1:0] q [$];
      q.delete();
      make_pkt(id, q);
      ej_pkt[id] = q;
      foreach (q[k]) ej_src[id % NUM_VC].push_back(q[k]);
      ej_sent_pkts++;
    end
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 0;
    for (int c = 0; c < 20000 && (inj_expect.size() > 0 || ej_done < ej_sent_pkts); c++) begin
      int v;
      bit taken;
      // core side, injection: hold valid until taken
      if (!core_in_valid && inj_stream.size() > 0 && $urandom_range(0, 99) < 80) begin
        core_in_valid = 1; core_in_flit = inj_stream.pop_front();
      end
      for (int l = 0; l < NUM_VC; l++) credit_i[l] = inj_level[l] < 4;
      // router side, ejection
      rx = 0; lane_rx = 0;
      v = $urandom_range(0, NUM_VC - 1);
      if (ej_src[v].size() > 0) begin
        if (credit_o[v]) begin rx = 1; lane_rx[v] = 1'b1; data_in = ej_src[v][0]; end
        else credit_stalls++;
      end
      core_out_ready = $urandom_range(0, 99) < 60;
      #1;
      // injection checks
      if (tx) begin
        int l;
        check($onehot(lane_tx), "lane_tx one-hot");
        l = 0;
        for (int k = 0; k < NUM_VC; k++) if (lane_tx[k]) l = k;
        check(credit_i[l], "inject only with credit");
        check(data_out == inj_expect[0], "injected flit order");
        if (inj_pos == 0) begin
          if (last_pkt_lane >= 0 && l != last_pkt_lane) lane_changes++;
          inj_lane = l;
          last_pkt_lane = l;
        end else begin
          check(l == inj_lane, "packet stays on one lane");
        end
        if (inj_pos == 1) inj_len = int'(data_out) + 2;
        inj_pos++;
        if (inj_pos >= 2 && inj_pos == inj_len) inj_pos = 0;
        void'(inj_expect.pop_front());
        inj_level[l]++;
      end
      check(tx == (core_in_valid && core_in_ready), "tx follows the core handshake");
      // ejection checks
      if (core_out_valid && !core_out_ready) core_stalls++;
      if (core_out_valid && core_out_ready) begin
        ej_cur.push_back(core_out_flit);
        if (ej_cur.size() >= 3 && ej_cur.size() == int'(ej_cur[1]) + 2) begin
          int id;
          id = int'(ej_cur[2]);
          check(ej_pkt.exists(id) && ej_pkt[id] == ej_cur, $sformatf("packet %0d whole at the core", id));
          ej_pkt.delete(id);
          ej_cur.delete();
          ej_done++;
        end
      end
      taken = core_in_valid && core_in_ready;
      @(posedge clock);
      for (int l = 0; l < NUM_VC; l++) begin
        if (rx && lane_rx[l]) void'(ej_src[l].pop_front());
        if (inj_level[l] > 0 && $urandom_range(0, 99) < 50) inj_level[l]--;
      end
      @(negedge clock);
      if (taken) core_in_valid = 0;
    end
    check(inj_expect.size() == 0, "all injected flits seen");
    check(ej_done == ej_sent_pkts, $sformatf("all ejected packets (%0d of %0d)", ej_done, ej_sent_pkts));
    check(lane_changes > NPKT / 4, "injection rotates lanes");
    check(credit_stalls > 0 && core_stalls > 0, "back-pressure seen");
    $display("lane changes %0d, credit stalls %0d, core stalls %0d", lane_changes, credit_stalls, core_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
