// tb_xy_route: exhaustive test of dimension-order routing on the 8 x 8
// mesh: for every (current, destination) pair the chosen port is checked
// against the rule "correct x first, then y", and following the chosen
// ports from any source must reach the destination in exactly the
// Manhattan distance.
module tb_xy_route;
  import noc_pkg::*;
  logic [ADDR_W-1:0] cur, dst;
  port_e port;
  int checks = 0, failures = 0;

  xy_route #(.MESH_X(8), .MESH_Y(8)) dut (.cur, .dst, .port);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++)
      for (int d = 0; d < 64; d++) begin
        port_e e;
        int at, steps;
        if (d % 8 > c % 8)      e = P_EAST;
        else if (d % 8 < c % 8) e = P_WEST;
        else if (d / 8 > c / 8) e = P_SOUTH;
        else if (d / 8 < c / 8) e = P_NORTH;
        else                    e = P_LOCAL;
        cur = ADDR_W'(c); dst = ADDR_W'(d); #1;
        check(port == e, $sformatf("%0d -> %0d gave %0d", c, d, port));
        // walk the route
        at = c; steps = 0;
        while (steps < 20) begin
          cur = ADDR_W'(at); #1;
          if (port == P_LOCAL) break;
          case (port)
            P_EAST:  at += 1;
            P_WEST:  at -= 1;
            P_SOUTH: at += 8;
            P_NORTH: at -= 8;
            default: ;
          endcase
          steps++;
        end
        check(at == d && steps == ((d % 8 > c % 8) ? d % 8 - c % 8 : c % 8 - d % 8) +
                                  ((d / 8 > c / 8) ? d / 8 - c / 8 : c / 8 - d / 8),
              $sformatf("walk %0d -> %0d ended at %0d after %0d", c, d, at, steps));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
