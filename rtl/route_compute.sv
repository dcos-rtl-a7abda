// route_compute: output-port selection for a packet header.
//
// Dimension-order (X first, then Y) routing on the 2D mesh; node ids are
// y*MESH_X + x and y grows towards the south port. A header whose
// destination is this node goes to the local unit it names: core/L1,
// shared L2 bank, shared memory bank or the switch's directory
// controller. Purely combinational. The mesh, wormhole switching and the
// attached units follow the source design; X-then-Y order is this design's
// choice (it is deadlock-free on a mesh).
module route_compute
  import dcos_pkg::*;
(
  input  node_t cur,
  input  node_t dst,
  input  unit_e unit,
  output port_e port
);
  int unsigned cx, cy, dx, dy;

  always_comb begin
    cx = int'(cur) % MESH_X;
    cy = int'(cur) / MESH_X;
    dx = int'(dst) % MESH_X;
    dy = int'(dst) / MESH_X;
    if (dx > cx)      port = P_EAST;
    else if (dx < cx) port = P_WEST;
    else if (dy > cy) port = P_SOUTH;
    else if (dy < cy) port = P_NORTH;
    else begin
      unique case (unit)
        U_CORE:  port = P_CORE;
        U_L2:    port = P_L2;
        U_MEM:   port = P_MEM;
        default: port = P_DIR;
      endcase
    end
  end
endmodule
