// tb_xy_route: every switch position of a 4x4 mesh, every destination
// endpoint; the expected port is worked out from coordinates in the testbench.
module tb_xy_route;
  import ccnoc_pkg::*;
  int checks = 0, failures = 0;
  logic [EP_W-1:0] dst;
  port_e port [MESH_Y][MESH_X];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      xy_route #(.X(x), .Y(y)) dut (.dst(dst), .port(port[y][x]));
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < NUM_EP; d++) begin
      dst = EP_W'(d);
      #1;
      for (int y = 0; y < MESH_Y; y++)
        for (int x = 0; x < MESH_X; x++) begin
          int tx, ty;
          port_e exp;
          tx = (d / 2) % MESH_X;
          ty = (d / 2) / MESH_X;
          if (tx != x)      exp = (tx > x) ? P_E : P_W;
          else if (ty != y) exp = (ty > y) ? P_S : P_N;
          else              exp = (d % 2) ? P_NI2 : P_NI1;
          checks++;
          if (port[y][x] != exp) begin
            failures++;
            $display("route (%0d,%0d) dst %0d: got %0d want %0d", x, y, d, port[y][x], exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
