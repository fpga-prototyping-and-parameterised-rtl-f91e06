// tb_xy_routing: exhaustive self-checking test of the XY routing decision.
//
// For every router position of a 4x4 address space (8-bit flits give 2-bit
// coordinates) and every destination, the expected port is computed in the
// testbench: X first (East if larger, West if smaller), then Y (North if
// larger, South if smaller), else Local. Includes the two headers of the
// reference waveforms: 0xF5 at router (0,0) goes East, 0xFA at router (2,0)
// goes North and at (2,2) is delivered Local.
module tb_xy_routing;
  import noc_pkg::*;
  localparam int FDW = 8;

  int checks = 0, failures = 0;
  logic [FDW-1:0] header;
  port_e out [4][4];

  for (genvar x = 0; x < 4; x++) begin : g_x
    for (genvar y = 0; y < 4; y++) begin : g_y
      xy_routing #(.FDW(FDW), .X_ADDR(x), .Y_ADDR(y)) dut (.header(header), .out_port(out[x][y]));
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s header=%h", what, header);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 256; h++) begin
      header = FDW'(h);
      #1;
      for (int x = 0; x < 4; x++) begin
        for (int y = 0; y < 4; y++) begin
          int dx, dy;
          port_e e;
          dx = (h >> 2) & 3;
          dy = h & 3;
          if (dx > x)      e = PORT_EAST;
          else if (dx < x) e = PORT_WEST;
          else if (dy > y) e = PORT_NORTH;
          else if (dy < y) e = PORT_SOUTH;
          else             e = PORT_LOCAL;
          check(out[x][y] == e, $sformatf("route at (%0d,%0d)", x, y));
        end
      end
    end
    header = 8'hF5; #1;
    check(out[0][0] == PORT_EAST, "0xF5 from (0,0) goes East");
    header = 8'hFA; #1;
    check(out[0][0] == PORT_EAST, "0xFA from (0,0) goes East");
    check(out[2][0] == PORT_NORTH, "0xFA from (2,0) goes North");
    check(out[2][1] == PORT_NORTH, "0xFA from (2,1) goes North");
    check(out[2][2] == PORT_LOCAL, "0xFA at (2,2) goes Local");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
