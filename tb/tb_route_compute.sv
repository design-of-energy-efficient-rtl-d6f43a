// tb_route_compute: every (router, destination) pair of the 8x8 mesh against
// dimension-ordered XY routing.
module tb_route_compute;
  import noc_pkg::*;
  logic [2:0] cur_x, cur_y;
  logic [5:0] dest;
  logic [2:0] port;
  int checks = 0, failures = 0;
  route_compute dut (.cur_x, .cur_y, .dest, .port);
  initial begin
    for (int cx = 0; cx < MESH_X; cx++)
      for (int cy = 0; cy < MESH_Y; cy++)
        for (int dx = 0; dx < MESH_X; dx++)
          for (int dy = 0; dy < MESH_Y; dy++) begin
            int exp;
            cur_x = 3'(cx); cur_y = 3'(cy); dest = {3'(dy), 3'(dx)};
            #1;
            exp = (dx > cx) ? 0 : (dx < cx) ? 1 : (dy > cy) ? 2 : (dy < cy) ? 3 : 4;
            checks++;
            if (int'(port) != exp) begin
              failures++;
              if (failures < 10) $display("FAIL (%0d,%0d)->(%0d,%0d): %0d", cx, cy, dx, dy, port);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
