// tb_switch_control: self-checking test of the router control logic.
//
// The router sits at (1,1) of a 3x3 mesh. Input lanes raise requests with
// random headers and hold them until granted; connected lanes release their
// connection after a random time. The testbench keeps its own connection
// table and checks, every cycle: at most one grant, only to a requester;
// the granted lane goes to the XY port of its header (computed here) on the
// lowest free lane of that port; no grant while no requester has a free
// lane at its port; the DUT table equals the model; releases clear entries.
// It also checks that no requester whose port has room waits more than
// 2*NIN cycles (round-robin fairness) and counts blocked cycles (a header
// waiting because all lanes of its port are taken).
module tb_switch_control;
  import noc_pkg::*;
  localparam int FDW = 8, NUM_VC = 2, NIN = NPORTS * NUM_VC, IW = $clog2(NIN);

  logic clock = 0, reset = 1;
  logic [NIN-1:0] req, release_i, grant;
  logic [FDW-1:0] header [NIN];
  logic [NUM_VC-1:0] conn_valid [NPORTS];
  logic [IW-1:0]     conn_src   [NPORTS][NUM_VC];
  int checks = 0, failures = 0, blocked = 0, grants = 0;

  switch_control #(.FDW(FDW), .NUM_VC(NUM_VC), .X_ADDR(1), .Y_ADDR(1)) dut (.*);

  always #5 clock = ~clock;

  bit m_valid [NPORTS][NUM_VC];
  int m_src   [NPORTS][NUM_VC];
  bit lane_conn [NIN];
  int wait_cnt  [NIN];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int route(input logic [FDW-1:0] h);
    int dx, dy;
    dx = (h >> 2) & 3; dy = h & 3;
    if (dx > 1) return 0;
    if (dx < 1) return 1;
    if (dy > 1) return 2;
    if (dy < 1) return 3;
    return 4;
  endfunction

  function automatic int free_lane(input int p);
    for (int l = 0; l < NUM_VC; l++) if (!m_valid[p][l]) return l;
    return -1;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; release_i = 0;
    for (int i = 0; i < NIN; i++) begin header[i] = 0; lane_conn[i] = 0; wait_cnt[i] = 0; end
    for (int p = 0; p < NPORTS; p++) for (int l = 0; l < NUM_VC; l++) m_valid[p][l] = 0;
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 0;
    for (int c = 0; c < 5000; c++) begin
      bit any_servable;
      int g, gp, gl;
      // new requests and releases
      release_i = 0;
      for (int i = 0; i < NIN; i++) begin
        if (!lane_conn[i] && !req[i] && $urandom_range(0, 99) < 30) begin
          req[i] = 1;
          header[i] = 8'hF0 | FDW'($urandom_range(0, 8) / 3 * 4 + $urandom_range(0, 2));
        end
        if (lane_conn[i] && $urandom_range(0, 99) < 8) release_i[i] = 1;
      end
      #1;
      any_servable = 0;
      for (int i = 0; i < NIN; i++) if (req[i] && free_lane(route(header[i])) >= 0) any_servable = 1;
      check($countones(grant) <= 1, "at most one grant");
      check((grant & ~req) == '0, "grant only to requester");
      if (!any_servable) check(grant == '0, "no grant when every target port is full");
      if (req != '0 && !any_servable) blocked++;
      g = -1;
      for (int i = 0; i < NIN; i++) if (grant[i]) g = i;
      for (int i = 0; i < NIN; i++) begin
        if (req[i] && free_lane(route(header[i])) >= 0 && g != i) wait_cnt[i]++;
        else wait_cnt[i] = 0;
        check(wait_cnt[i] <= 2 * NIN, "fairness");
      end
      if (g >= 0) begin
        gp = route(header[g]);
        gl = free_lane(gp);
      end
      @(posedge clock);
      // model update: the lane for the grant was chosen before this edge's releases
      for (int p = 0; p < NPORTS; p++)
        for (int l = 0; l < NUM_VC; l++)
          if (m_valid[p][l] && release_i[m_src[p][l]]) begin
            m_valid[p][l] = 0;
            lane_conn[m_src[p][l]] = 0;
          end
      if (g >= 0) begin
        check(gl >= 0, "grant only with a free lane");
        if (gl >= 0) begin
          m_valid[gp][gl] = 1; m_src[gp][gl] = g;
        end
        lane_conn[g] = 1; grants++;
      end
      @(negedge clock);
      if (g >= 0) req[g] = 0;
      for (int p = 0; p < NPORTS; p++)
        for (int l = 0; l < NUM_VC; l++) begin
          check(conn_valid[p][l] == m_valid[p][l], "table valid");
          if (m_valid[p][l]) check(int'(conn_src[p][l]) == m_src[p][l], $sformatf("table source p%0d l%0d dut %0d model %0d v%b", p, l, conn_src[p][l], m_src[p][l], conn_valid[p]));
        end
    end
    check(blocked > 0, "a header was blocked by busy lanes");
    check(grants > 100, "grants happened");
    $display("grants %0d, blocked cycles %0d", grants, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
