// tb_xy_route: instantiates the route computation for every switch position
// of the 4x4 mesh and checks every destination against dimension-order
// routing worked out in the testbench (x first, then y, local at the end).
module tb_xy_route;
  import cdd_pkg::*;
  logic [XW-1:0] dst_x;
  logic [YW-1:0] dst_y;
  port_e         res [MESH_X][MESH_Y];
  int checks = 0, failures = 0;

  for (genvar x = 0; x < MESH_X; x++) begin : g_x
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y
      xy_route #(.X(x), .Y(y)) dut (.dst_x(dst_x), .dst_y(dst_y), .out_port(res[x][y]));
    end
  end

  function automatic port_e expected(int x, int y, int dx, int dy);
    if (dx != x) return (dx > x) ? PORT_E : PORT_W;
    if (dy != y) return (dy > y) ? PORT_N : PORT_S;
    return PORT_L;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dx = 0; dx < MESH_X; dx++)
      for (int dy = 0; dy < MESH_Y; dy++) begin
        dst_x = XW'(dx);
        dst_y = YW'(dy);
        #1;
        for (int x = 0; x < MESH_X; x++)
          for (int y = 0; y < MESH_Y; y++) begin
            checks++;
            if (res[x][y] != expected(x, y, dx, dy)) begin
              failures++;
              $display("FAIL switch (%0d,%0d) dst (%0d,%0d): got %s", x, y, dx, dy,
                       res[x][y].name());
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
