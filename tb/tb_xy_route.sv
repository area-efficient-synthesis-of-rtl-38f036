// tb_xy_route: exhaustive check of the XY routing function.
// Every switch position and destination of the 8 x 8 mesh is applied; the
// expected port comes from a reference written with signed differences.
module tb_xy_route;
  import fs_noc_pkg::*;
  coord_t my_x, my_y, dx, dy;
  port_vec_t route;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  xy_route dut (.my_x(my_x), .my_y(my_y), .dx(dx), .dy(dy), .route(route));

  function automatic port_vec_t ref_route(int mx, int my, int x, int y);
    port_vec_t r = '0;
    int ddx = x - mx, ddy = y - my;
    if (ddx != 0)      r[(ddx > 0) ? P_EAST : P_WEST] = 1'b1;
    else if (ddy != 0) r[(ddy > 0) ? P_NORTH : P_SOUTH] = 1'b1;
    else               r[P_LOCAL] = 1'b1;
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        for (int c = 0; c < 8; c++)
          for (int d = 0; d < 8; d++) begin
            my_x = coord_t'(a); my_y = coord_t'(b); dx = coord_t'(c); dy = coord_t'(d);
            #1;
            checks++;
            if (route !== ref_route(a, b, c, d)) begin
              failures++;
              if (failures < 10) $display("route mismatch at (%0d,%0d)->(%0d,%0d): %b", a, b, c, d, route);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
