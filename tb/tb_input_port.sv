// tb_input_port: self-checking test of a router input with its lane buffers.
//
// The testbench plays the upstream sender (random lane, only with credit),
// the control logic (grants a lane that requests, at random times) and the
// output ports (pops connected lanes at random). A model keeps, per lane,
// the flits written and whether the lane is connected. Every cycle it checks
// credit_o against the buffer level, that req is raised exactly for an
// unconnected lane holding a header, the popped flit, and that release
// pulses exactly on the last flit of each packet (size flit 0 included).
// Packets are header, size n (0..6), n payload flits. FBD is reduced to 4 so
// that credits run out often.
module tb_input_port;
  localparam int FDW = 8, FBD = 4, NUM_VC = 2;

  logic clock = 0, reset = 1;
  logic rx;
  logic [NUM_VC-1:0] lane_rx, credit_o, head_valid, req, grant, pop, release_o;
  logic [FDW-1:0] data_in;
  logic [FDW-1:0] head [NUM_VC];
  int checks = 0, failures = 0;
  int credit_stalls = 0, releases = 0;

  input_port #(.FDW(FDW), .FBD(FBD), .NUM_VC(NUM_VC)) dut (.*);

  always #5 clock = ~clock;

  // per-lane model
  logic [FDW-1:0] q_flit [NUM_VC][$];
  bit             q_last [NUM_VC][$];
  bit             connected [NUM_VC];
  // per-lane generator
  int gen_pos [NUM_VC];   // 0 header, 1 size, >=2 payload
  int gen_n   [NUM_VC];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic void next_flit(input int v, output logic [FDW-1:0] f, output bit last);
    if (gen_pos[v] == 0) begin
      f = 8'hF0 | FDW'($urandom_range(0, 15));
      last = 0;
      gen_n[v] = $urandom_range(0, 6);
      gen_pos[v] = 1;
    end else if (gen_pos[v] == 1) begin
      f = FDW'(gen_n[v]);
      last = (gen_n[v] == 0);
      gen_pos[v] = (gen_n[v] == 0) ? 0 : 2;
    end else begin
      f = FDW'($urandom);
      last = (gen_pos[v] - 1 == gen_n[v]);
      gen_pos[v] = last ? 0 : gen_pos[v] + 1;
    end
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [FDW-1:0] f;
    bit last;
    int v;
    rx = 0; lane_rx = 0; data_in = 0; grant = 0; pop = 0;
    for (int i = 0; i < NUM_VC; i++) begin gen_pos[i] = 0; connected[i] = 0; end
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 0;
    for (int c = 0; c < 4000; c++) begin
      // sender
      rx = 0; lane_rx = 0;
      v = $urandom_range(0, NUM_VC - 1);
      if ($urandom_range(0, 99) < 60) begin
        if (credit_o[v]) begin
          next_flit(v, f, last);
          rx = 1; lane_rx[v] = 1'b1; data_in = f;
        end else begin
          credit_stalls++;
        end
      end
      // control and output side
      grant = 0; pop = 0;
      for (int i = 0; i < NUM_VC; i++) begin
        check(credit_o[i] == (q_flit[i].size() < FBD), "credit_o");
        check(head_valid[i] == (q_flit[i].size() > 0), "head_valid");
        check(req[i] == (!connected[i] && q_flit[i].size() > 0), "req");
        if (req[i] && $urandom_range(0, 1)) grant[i] = 1'b1;
        if (connected[i] && head_valid[i] && $urandom_range(0, 99) < 60) pop[i] = 1'b1;
      end
      #1;
      for (int i = 0; i < NUM_VC; i++) begin
        if (pop[i]) begin
          check(head[i] == q_flit[i][0], "popped flit");
          check(release_o[i] == q_last[i][0], "release on last flit");
        end else begin
          check(release_o[i] == 1'b0, "no release without pop");
        end
      end
      @(posedge clock);
      for (int i = 0; i < NUM_VC; i++) begin
        if (pop[i]) begin
          if (q_last[i][0]) begin connected[i] = 0; releases++; end
          void'(q_flit[i].pop_front());
          void'(q_last[i].pop_front());
        end
        if (grant[i]) connected[i] = 1;
      end
      if (rx) begin
        for (int i = 0; i < NUM_VC; i++) if (lane_rx[i]) begin
          q_flit[i].push_back(data_in);
          q_last[i].push_back(last);
        end
      end
      @(negedge clock);
    end
    check(credit_stalls > 0, "credit ran out at least once");
    check(releases > 20, "packets completed");
    $display("credit stalls %0d, packets released %0d", credit_stalls, releases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
