// tb_noc_sweep: runs the 3x3 mesh across the evaluated parameter space.
//
// The network is characterised over virtual channels (1, 2, 4), flit buffer
// depth (4, 8, 16, 32 flits) and flit width (8, 16, 32 bits). This
// testbench builds four meshes that together cover every value of each
// parameter and pushes random all-to-all traffic through each (see
// mesh_sweep_point). A configuration with more than one virtual channel
// must also have carried flits on a lane other than lane 0.
module tb_noc_sweep;
  logic clock = 0, reset = 1;
  always #5 clock = ~clock;

  localparam int NP = 4;
  localparam int P_VC  [NP] = '{1, 2, 4, 2};
  localparam int P_FDW [NP] = '{8, 16, 32, 8};
  localparam int P_FBD [NP] = '{4, 8, 16, 32};

  logic [NP-1:0] done;
  int pc [NP], pf [NP], tl [NP];

  for (genvar i = 0; i < NP; i++) begin : g_pt
    mesh_sweep_point #(.FDW(P_FDW[i]), .FBD(P_FBD[i]), .NUM_VC(P_VC[i]), .PKTS(8)) u_pt (
      .clock(clock), .reset(reset), .done(done[i]),
      .checks(pc[i]), .failures(pf[i]), .two_lane_cycles(tl[i])
    );
  end

  initial begin
    #3000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(posedge clock);
    @(negedge clock);
    reset = 0;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NP; i++) begin
      checks += pc[i];
      failures += pf[i];
      checks++;
      if ((P_VC[i] > 1) != (tl[i] > 0)) begin
        failures++;
        $display("FAIL lane use at VC=%0d FDW=%0d FBD=%0d (%0d flits off lane 0)", P_VC[i], P_FDW[i], P_FBD[i], tl[i]);
      end
      $display("VC=%0d FDW=%0d FBD=%0d: %0d checks, %0d failures, %0d flits on lanes above 0",
               P_VC[i], P_FDW[i], P_FBD[i], pc[i], pf[i], tl[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
