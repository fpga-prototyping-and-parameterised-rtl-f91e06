// mesh_sweep_point: drives one noc_mesh configuration with random traffic.
//
// Used by tb_noc_sweep to run the 3x3 mesh at one point of the evaluated
// parameter space (virtual channels, buffer depth, flit width). Every core
// sends PKTS packets to random destinations; the header puts destination X
// in bits [FDW/2-1:FDW/4] and Y in [FDW/4-1:0] and random bits above; the
// first payload flit carries a packet id. Cores accept flits with a random
// ready. When every packet has arrived, or after a cycle limit, done rises
// and checks/failures hold the result of the scoreboard: each packet must
// reach its destination core whole.
module mesh_sweep_point #(
  parameter int FDW    = 8,
  parameter int FBD    = 16,
  parameter int NUM_VC = 2,
  parameter int PKTS   = 8
) (
  input  logic clock,
  input  logic reset,
  output logic done,
  output int   checks,
  output int   failures,
  output int   two_lane_cycles
);
  localparam int MESH_X = 3, MESH_Y = 3, NN = 9, CB = FDW / 4;

  logic           core_in_valid  [NN];
  logic [FDW-1:0] core_in_flit   [NN];
  logic           core_in_ready  [NN];
  logic           core_out_valid [NN];
  logic [FDW-1:0] core_out_flit  [NN];
  logic           core_out_ready [NN];

  noc_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .FDW(FDW), .FBD(FBD), .NUM_VC(NUM_VC)) dut (.*);

  logic [FDW-1:0] src_q [NN][$];
  logic [FDW-1:0] pkt [int][$];
  int             pkt_dst [int];
  logic [FDW-1:0] rcv [NN][$];
  int delivered, total;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [FDW=%0d FBD=%0d VC=%0d] %s at %0t", FDW, FBD, NUM_VC, what, $time);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; two_lane_cycles = 0; delivered = 0; total = 0;
    for (int n = 0; n < NN; n++) begin
      core_in_valid[n] = 0; core_in_flit[n] = 0; core_out_ready[n] = 0;
    end
    for (int s = 0; s < NN; s++) begin
      for (int k = 0; k < PKTS; k++) begin
        int id, d, n;
        logic [FDW-1:0] h;
        id = s * PKTS + k;
        d = $urandom_range(0, NN - 1);
        h = FDW'($urandom);
        h[2*CB-1:0] = '0;
        h = h | FDW'(((d % MESH_X) << CB) | (d / MESH_X));
        n = $urandom_range(1, 10);
        pkt[id].push_back(h);
        pkt[id].push_back(FDW'(n));
        pkt[id].push_back(FDW'(id));
        for (int j = 1; j < n; j++) pkt[id].push_back(FDW'($urandom));
        pkt_dst[id] = d;
        for (int j = 0; j < pkt[id].size(); j++) src_q[s].push_back(pkt[id][j]);
        total++;
      end
    end
    @(negedge reset);
    @(negedge clock);
    for (int c = 0; c < 20000 && delivered < total; c++) begin
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
      for (int n = 0; n < NN; n++)
        for (int p = 0; p < 5; p++)
          if (dut.r_tx[n][p] && dut.r_lane_tx[n][p] != 1) two_lane_cycles++;
      @(posedge clock);
      @(negedge clock);
      for (int n = 0; n < NN; n++) if (taken[n]) core_in_valid[n] = 0;
    end
    check(delivered == total, $sformatf("all packets delivered (%0d of %0d)", delivered, total));
    done = 1;
  end
endmodule
