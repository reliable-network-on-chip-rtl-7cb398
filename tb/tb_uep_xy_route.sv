// tb_uep_xy_route: exhaustive test of the XY route computation.
//
// Two routers, at (1,1) and at (3,0) of a 4 x 4 mesh, see every destination
// {y, x}. Expected: EAST/WEST while the column differs, then SOUTH (larger
// row) or NORTH (smaller row), LOCAL at the router itself.
module tb_uep_xy_route;
  import uep_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] dst;
  port_e port_a, port_b;

  uep_xy_route #(.AW(2), .X(1), .Y(1)) dut_a (.dst(dst), .port(port_a));
  uep_xy_route #(.AW(2), .X(3), .Y(0)) dut_b (.dst(dst), .port(port_b));

  function automatic port_e expect_port(int x, int y, int dx, int dy);
    if (dx != x) return (dx > x) ? PORT_EAST : PORT_WEST;
    if (dy != y) return (dy > y) ? PORT_SOUTH : PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      dst = 4'(v);
      #1;
      checks++;
      if (port_a !== expect_port(1, 1, v % 4, v / 4)) begin
        failures++;
        $display("FAIL (1,1) dst %0d -> %s", v, port_a.name());
      end
      checks++;
      if (port_b !== expect_port(3, 0, v % 4, v / 4)) begin
        failures++;
        $display("FAIL (3,0) dst %0d -> %s", v, port_b.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
