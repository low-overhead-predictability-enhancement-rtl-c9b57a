// tb_pfs_xy_route: exhaustive test of the XY routing function for a router at (1,2) over all
// destinations of a 4 x 4 mesh: X is resolved first, a larger row lies South.
module tb_pfs_xy_route;
  import pfs_pkg::*;
  coord_t    dst_x, dst_y;
  port_vec_t port_req, exp;
  int checks = 0, failures = 0;

  pfs_xy_route #(.X(1), .Y(2)) dut (.*);

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        dst_x = coord_t'(x);
        dst_y = coord_t'(y);
        #1;
        exp = '0;
        if (x == 1 && y == 2) exp[P_L] = 1'b1;
        else if (x == 1)      exp[(y > 2) ? P_S : P_N] = 1'b1;
        else                  exp[(x > 1) ? P_E : P_W] = 1'b1;
        checks++;
        if (port_req !== exp) begin
          failures++;
          $display("FAIL: dst (%0d,%0d) got %b expected %b", x, y, port_req, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
