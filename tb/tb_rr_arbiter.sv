// tb_rr_arbiter: self-checking test of the round-robin arbiter.
//
// A reference pointer is kept in the testbench; for random request vectors
// the expected grant is the first requester at or after the pointer. Checks
// one-hot grant, grant index, the any flag, and that the pointer only moves
// when advance is high. Also checks fairness: with all requests high the
// grants rotate through every requester in turn.
module tb_rr_arbiter;
  localparam int N = 5;

  logic clock = 0, reset = 1;
  logic [N-1:0] req, gnt;
  logic advance;
  logic [$clog2(N)-1:0] gnt_idx;
  logic any;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (req=%b gnt=%b ptr=%0d)", what, $time, req, gnt, ptr);
    end
  endtask

  function automatic int expect_idx(input logic [N-1:0] r, input int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; advance = 0;
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 0;
    // rotation with all requests high
    req = '1; advance = 1;
    for (int i = 0; i < 2 * N; i++) begin
      #1;
      check(gnt_idx == (i % N), "rotation order");
      check(gnt == (N'(1) << (i % N)), "rotation one-hot");
      @(posedge clock); ptr = (i % N) + 1; if (ptr == N) ptr = 0;
      @(negedge clock);
    end
    for (int c = 0; c < 2000; c++) begin
      req = N'($urandom);
      advance = $urandom_range(0, 3) != 0;
      #1;
      begin
        int e;
        e = expect_idx(req, ptr);
        check(any == (e >= 0), "any");
        if (e >= 0) begin
          check(int'(gnt_idx) == e, "grant index");
          check(gnt == (N'(1) << e), "grant vector");
          if (advance) ptr = (e + 1) % N;
        end else begin
          check(gnt == '0, "no grant");
        end
      end
      @(posedge clock);
      @(negedge clock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
