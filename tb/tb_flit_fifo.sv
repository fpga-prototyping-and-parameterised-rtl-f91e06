// tb_flit_fifo: self-checking test of the virtual-channel flit buffer.
//
// Drives random writes and reads (never writing when full nor reading when
// empty, as the link protocol requires) and compares head flit, empty and
// full with a queue model every cycle. Also fills the buffer to exactly FBD
// flits to check that full rises at the configured depth, and checks that a
// simultaneous read and write keep the occupancy.
module tb_flit_fifo;
  localparam int FDW = 8;
  localparam int FBD = 16;

  logic clock = 0, reset = 1;
  logic wr, rd;
  logic [FDW-1:0] din, dout;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [FDW-1:0] model [$];

  flit_fifo #(.FDW(FDW), .FBD(FBD)) dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == FBD), "full");
    if (model.size() > 0) check(dout == model[0], "head flit");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; din = 0;
    repeat (2) @(posedge clock);
    reset = 0;
    @(negedge clock);
    compare();
    // fill to the depth
    for (int i = 0; i < FBD; i++) begin
      wr = 1; din = FDW'(8'hA0 + i);
      @(posedge clock); model.push_back(din);
      @(negedge clock); wr = 0;
      compare();
    end
    check(full, "full after FBD writes");
    // read and write together while full-1
    rd = 1; @(posedge clock); void'(model.pop_front()); @(negedge clock); rd = 0;
    wr = 1; rd = 1; din = 8'h55;
    @(posedge clock); model.push_back(din); void'(model.pop_front());
    @(negedge clock); wr = 0; rd = 0;
    check(model.size() == FBD - 1 && !full && !empty, "simultaneous rd/wr keeps level");
    compare();
    // random traffic
    for (int c = 0; c < 3000; c++) begin
      wr  = ($urandom_range(0, 99) < 55) && !full;
      rd  = ($urandom_range(0, 99) < 50) && !empty;
      din = FDW'($urandom);
      @(posedge clock);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(din);
      @(negedge clock);
      wr = 0; rd = 0;
      compare();
    end
    // drain
    while (!empty) begin
      rd = 1; @(posedge clock); void'(model.pop_front()); @(negedge clock); rd = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
