// tb_route_compute: exhaustive test of output-port selection.
// For every current node, destination node and unit, the expected port is
// worked out from the mesh coordinates (X first, then Y; local unit at the
// destination) and compared with the block.
module tb_route_compute;
  import dcos_pkg::*;
  int checks = 0, failures = 0;
  node_t cur, dst;
  unit_e unit;
  port_e port, exp_port;

  route_compute dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NUM_NODES; c++)
      for (int d = 0; d < NUM_NODES; d++)
        for (int u = 0; u < 4; u++) begin
          int cx, cy, dx, dy;
          cur = node_t'(c); dst = node_t'(d); unit = unit_e'(u);
          cx = c % 4; cy = c / 4; dx = d % 4; dy = d / 4;
          if (dx != cx)      exp_port = (dx > cx) ? P_EAST : P_WEST;
          else if (dy != cy) exp_port = (dy > cy) ? P_SOUTH : P_NORTH;
          else               exp_port = port_e'(4 + u);
          #1;
          checks++;
          if (port != exp_port) begin
            failures++;
            $display("FAIL cur=%0d dst=%0d unit=%0d port=%0d exp=%0d", c, d, u, port, exp_port);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
