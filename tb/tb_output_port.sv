// tb_output_port: self-checking test of the lane multiplexer of an output.
//
// Each lane has a queue of flits to send; lanes become valid and credits
// come and go at random. Checks every cycle: tx only when some lane is both
// valid and credited; lane_tx one-hot and equal to pop; the sent lane was
// valid and credited; data_out is that lane's head flit; and whenever two or
// more lanes are eligible the link is shared round robin (a lane eligible in
// consecutive cycles is never skipped twice in a row with two lanes). The
// flit order per lane is checked on the receiving side.
module tb_output_port;
  localparam int FDW = 8, NUM_VC = 2;

  logic clock = 0, reset = 1;
  logic [NUM_VC-1:0] lane_valid, pop, lane_tx, credit_i;
  logic [FDW-1:0] lane_data [NUM_VC];
  logic tx;
  logic [FDW-1:0] data_out;
  int checks = 0, failures = 0, interleaved = 0, credit_blocked = 0;

  output_port #(.FDW(FDW), .NUM_VC(NUM_VC)) dut (.*);

  always #5 clock = ~clock;

  logic [FDW-1:0] q [NUM_VC][$];
  int next_seq [NUM_VC];
  int skipped [NUM_VC];
  int last_lane = -1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lane_valid = 0; credit_i = 0;
    for (int v = 0; v < NUM_VC; v++) begin lane_data[v] = 0; next_seq[v] = 0; skipped[v] = 0; end
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 0;
    for (int c = 0; c < 4000; c++) begin
      logic [NUM_VC-1:0] elig;
      for (int v = 0; v < NUM_VC; v++) begin
        if (q[v].size() < 4 && $urandom_range(0, 99) < 40) begin
          q[v].push_back(FDW'({v[0], 7'(next_seq[v])}));
          next_seq[v]++;
        end
        lane_valid[v] = (q[v].size() > 0) && ($urandom_range(0, 99) < 85);
        lane_data[v]  = (q[v].size() > 0) ? q[v][0] : FDW'($urandom);
        credit_i[v]   = $urandom_range(0, 99) < 75;
      end
      #1;
      elig = lane_valid & credit_i;
      if (lane_valid != 0 && elig == 0) credit_blocked++;
      check(tx == (elig != 0), "tx when a lane is eligible");
      check(pop == lane_tx, "pop equals lane_tx");
      if (tx) begin
        int s;
        check($onehot(lane_tx), "lane_tx one-hot");
        check((lane_tx & ~elig) == 0, "sent lane eligible");
        s = 0;
        for (int v = 0; v < NUM_VC; v++) if (lane_tx[v]) s = v;
        check(data_out == q[s][0], "data_out is head of sent lane");
        if ($countones(elig) > 1) begin
          interleaved++;
          check(s != last_lane, "round robin between eligible lanes");
        end
        last_lane = s;
      end
      @(posedge clock);
      for (int v = 0; v < NUM_VC; v++) if (pop[v]) void'(q[v].pop_front());
      @(negedge clock);
    end
    check(interleaved > 50, "lanes shared the link");
    check(credit_blocked > 0, "a lane waited for credit");
    $display("interleaved %0d, credit blocked %0d", interleaved, credit_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
