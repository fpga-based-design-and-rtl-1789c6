// tb_xy_routing: exhaustive check of the output port choice.
// All 256 combinations of own and destination coordinates are applied. The
// expected port comes from signed coordinate differences: a non-zero X
// difference picks South (destination larger) or North (smaller), otherwise
// a non-zero Y difference picks East (larger) or West (smaller), otherwise
// Local.
module tb_xy_routing;
  import noc_pkg::*;

  coord_t cur_x, cur_y, dest_x, dest_y;
  port_e  port;
  int     checks = 0, failures = 0;

  xy_routing dut (.cur_x, .cur_y, .dest_x, .dest_y, .port);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dx, dy;
    port_e exp;
    for (int a = 0; a < 256; a++) begin
      {cur_x, cur_y, dest_x, dest_y} = 8'(a);
      #1;
      dx = int'(dest_x) - int'(cur_x);
      dy = int'(dest_y) - int'(cur_y);
      exp = (dx > 0) ? PORT_S : (dx < 0) ? PORT_N :
            (dy > 0) ? PORT_E : (dy < 0) ? PORT_W : PORT_L;
      checks++;
      if (port != exp) begin
        failures++;
        $display("FAIL cur=(%0d,%0d) dest=(%0d,%0d): got %s want %s",
                 cur_x, cur_y, dest_x, dest_y, port.name(), exp.name());
      end
    end
    // The four cases of the original simulations
    {cur_x, cur_y, dest_x, dest_y} = {2'b00, 2'b01, 2'b01, 2'b01}; #1;
    checks++; if (port != PORT_S) failures++;
    {cur_x, cur_y, dest_x, dest_y} = {2'b00, 2'b01, 2'b00, 2'b00}; #1;
    checks++; if (port != PORT_W) failures++;
    {cur_x, cur_y, dest_x, dest_y} = {2'b10, 2'b01, 2'b01, 2'b10}; #1;
    checks++; if (port != PORT_N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
