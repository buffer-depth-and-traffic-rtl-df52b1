// tb_lasio_xyz_routing: self-checking test of XYZ routing.
//
// Instantiates routers at a corner, an edge and an inner position of a
// 4x4x4 mesh and sweeps every target address of the mesh through each,
// checking that X is corrected first (East/West), then Y (North/South),
// then Z (Top/Bottom), and that a packet for the router itself goes Local.
// Bits above the 12 address bits are randomised and must be ignored.
module tb_lasio_xyz_routing;
  import lasio_pkg::*;

  localparam int unsigned FLIT_W = 16;

  logic [FLIT_W-1:0] header;
  port_e out_a, out_b, out_c;

  int checks = 0, failures = 0;

  lasio_xyz_routing #(.FLIT_W(FLIT_W), .MY_X(0), .MY_Y(0), .MY_Z(0)) dut_a (.header(header), .out_port(out_a));
  lasio_xyz_routing #(.FLIT_W(FLIT_W), .MY_X(1), .MY_Y(2), .MY_Z(1)) dut_b (.header(header), .out_port(out_b));
  lasio_xyz_routing #(.FLIT_W(FLIT_W), .MY_X(3), .MY_Y(0), .MY_Z(2)) dut_c (.header(header), .out_port(out_c));

  function automatic port_e expect_port(int tx, int ty, int tz, int mx, int my, int mz);
    if (tx != mx) return (tx > mx) ? P_EAST : P_WEST;
    if (ty != my) return (ty > my) ? P_NORTH : P_SOUTH;
    if (tz != mz) return (tz > mz) ? P_TOP : P_BOTTOM;
    return P_LOCAL;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s header=%h", what, header);
    end
  endtask

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int z = 0; z < 4; z++) begin
          header = {4'($urandom), 4'(x), 4'(y), 4'(z)};
          #1;
          check(out_a == expect_port(x, y, z, 0, 0, 0), "router 000");
          check(out_b == expect_port(x, y, z, 1, 2, 1), "router 121");
          check(out_c == expect_port(x, y, z, 3, 0, 2), "router 302");
        end
    // two fixed cases worked by hand: 121 -> 131 is North, 121 -> 122 is Top
    header = 16'h0131; #1; check(out_b == P_NORTH, "121 to 131");
    header = 16'h0122; #1; check(out_b == P_TOP, "121 to 122");
    header = 16'h0120; #1; check(out_b == P_BOTTOM, "121 to 120");
    header = 16'h0021; #1; check(out_b == P_WEST, "121 to 021");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
