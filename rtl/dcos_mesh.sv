// dcos_mesh: the DCOS multiprocessor interconnect, a 4x2 2D mesh of
// directory-cache-embedded switches.
//
// Node n sits at column n % 4, row n / 4. Each node's switch links to its
// mesh neighbours through one chan_link per direction: a 32-bit channel
// clocked at twice the switch clock that carries one 8-byte flit per
// switch cycle. Ports at the mesh border are tied off. The node's core (with its L1 cache), its shared L2
// bank and its shared memory bank are not part of this RTL: their switch
// ports and the two directory-update inputs of each switch are brought
// out as arrays indexed by node. The mesh size and the on-chip shared
// memory organisation follow the source design (distributed shared L2 and
// distributed shared memory, one bank of each per node).
//
// Protocol seen at the node ports (all valid/ready, one flit per cycle):
//   core -> network: M_RD / M_WR single flits addressed to the home node's
//     directory unit (dst = home_of(addr), unit = U_DIR); M_DATA replies
//     (head + body + tail, data of a 16-byte L1 line) when the core owns a
//     block and receives a forwarded request.
//   network -> core: M_DATA replies, M_INV invalidations, M_FWD_RD/M_FWD_WR.
//   network -> L2 / memory bank: M_RD / M_WR from the directory, with
//     req naming the node the data must go to; the bank answers with
//     M_DATA to that node's core.
// A flit takes one switch cycle to cross a switch and two to cross a
// channel, so a hop costs three switch cycles when nothing is blocked.
module dcos_mesh
  import dcos_pkg::*;
#(
  parameter int unsigned L2_ENTRIES  = 32,
  parameter int unsigned MEM_ENTRIES = 2048,
  parameter int unsigned FIFO_DEPTH  = 4
) (
  input  logic                        clk,     // switch clock
  input  logic                        clk_ch,  // channel clock, 2x clk, edge aligned
  input  logic                        rst_n,
  // local ports per node: [node][0=core,1=L2 bank,2=memory bank]
  input  logic  [NUM_NODES-1:0][2:0]  loc_in_valid,
  output logic  [NUM_NODES-1:0][2:0]  loc_in_ready,
  input  flit_t [NUM_NODES-1:0][2:0]  loc_in_flit,
  output logic  [NUM_NODES-1:0][2:0]  loc_out_valid,
  input  logic  [NUM_NODES-1:0][2:0]  loc_out_ready,
  output flit_t [NUM_NODES-1:0][2:0]  loc_out_flit,
  // cache dir update (L2 bank) and memory dir update per node
  input  logic     [NUM_NODES-1:0]    cache_upd_valid,
  output logic     [NUM_NODES-1:0]    cache_upd_ready,
  input  dir_upd_t [NUM_NODES-1:0]    cache_upd,
  input  logic     [NUM_NODES-1:0]    mem_upd_valid,
  output logic     [NUM_NODES-1:0]    mem_upd_ready,
  input  dir_upd_t [NUM_NODES-1:0]    mem_upd
);
  logic  [NUM_NODES-1:0][6:0] s_in_valid, s_in_ready, s_out_valid, s_out_ready;
  flit_t [NUM_NODES-1:0][6:0] s_in_flit, s_out_flit;

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    localparam int unsigned X = n % MESH_X;
    localparam int unsigned Y = n / MESH_X;

    // neighbour links: the east and south outputs of node n drive a
    // channel into the west / north input of the neighbour, and the
    // neighbour's west / north outputs drive a channel back
    if (X < MESH_X - 1) begin : g_ew
      chan_link u_to_e (
        .clk, .clk_ch, .rst_n,
        .in_valid(s_out_valid[n][P_EAST]), .in_ready(s_out_ready[n][P_EAST]),
        .in_flit(s_out_flit[n][P_EAST]),
        .out_valid(s_in_valid[n+1][P_WEST]), .out_ready(s_in_ready[n+1][P_WEST]),
        .out_flit(s_in_flit[n+1][P_WEST])
      );
      chan_link u_from_e (
        .clk, .clk_ch, .rst_n,
        .in_valid(s_out_valid[n+1][P_WEST]), .in_ready(s_out_ready[n+1][P_WEST]),
        .in_flit(s_out_flit[n+1][P_WEST]),
        .out_valid(s_in_valid[n][P_EAST]), .out_ready(s_in_ready[n][P_EAST]),
        .out_flit(s_in_flit[n][P_EAST])
      );
    end else begin : g_e_edge
      assign s_in_valid[n][P_EAST]  = 1'b0;
      assign s_in_flit[n][P_EAST]   = '0;
      assign s_out_ready[n][P_EAST] = 1'b1;
    end
    if (X == 0) begin : g_w_edge
      assign s_in_valid[n][P_WEST]  = 1'b0;
      assign s_in_flit[n][P_WEST]   = '0;
      assign s_out_ready[n][P_WEST] = 1'b1;
    end
    if (Y < MESH_Y - 1) begin : g_ns
      chan_link u_to_s (
        .clk, .clk_ch, .rst_n,
        .in_valid(s_out_valid[n][P_SOUTH]), .in_ready(s_out_ready[n][P_SOUTH]),
        .in_flit(s_out_flit[n][P_SOUTH]),
        .out_valid(s_in_valid[n+MESH_X][P_NORTH]), .out_ready(s_in_ready[n+MESH_X][P_NORTH]),
        .out_flit(s_in_flit[n+MESH_X][P_NORTH])
      );
      chan_link u_from_s (
        .clk, .clk_ch, .rst_n,
        .in_valid(s_out_valid[n+MESH_X][P_NORTH]), .in_ready(s_out_ready[n+MESH_X][P_NORTH]),
        .in_flit(s_out_flit[n+MESH_X][P_NORTH]),
        .out_valid(s_in_valid[n][P_SOUTH]), .out_ready(s_in_ready[n][P_SOUTH]),
        .out_flit(s_in_flit[n][P_SOUTH])
      );
    end else begin : g_s_edge
      assign s_in_valid[n][P_SOUTH]  = 1'b0;
      assign s_in_flit[n][P_SOUTH]   = '0;
      assign s_out_ready[n][P_SOUTH] = 1'b1;
    end
    if (Y == 0) begin : g_n_edge
      assign s_in_valid[n][P_NORTH]  = 1'b0;
      assign s_in_flit[n][P_NORTH]   = '0;
      assign s_out_ready[n][P_NORTH] = 1'b1;
    end

    // local ports
    assign s_in_valid[n][6:4]  = loc_in_valid[n];
    assign s_in_flit[n][6:4]   = loc_in_flit[n];
    assign loc_in_ready[n]     = s_in_ready[n][6:4];
    assign loc_out_valid[n]    = s_out_valid[n][6:4];
    assign loc_out_flit[n]     = s_out_flit[n][6:4];
    assign s_out_ready[n][6:4] = loc_out_ready[n];

    // bit per port_e: north, east, south, west
    localparam logic [3:0] USED = {X > 0, Y < MESH_Y - 1, X < MESH_X - 1, Y > 0};

    dcos_switch #(
      .NODE(n), .L2_ENTRIES(L2_ENTRIES), .MEM_ENTRIES(MEM_ENTRIES),
      .FIFO_DEPTH(FIFO_DEPTH), .MESH_USED(USED)
    ) u_sw (
      .clk, .rst_n,
      .in_valid(s_in_valid[n]), .in_ready(s_in_ready[n]), .in_flit(s_in_flit[n]),
      .out_valid(s_out_valid[n]), .out_ready(s_out_ready[n]), .out_flit(s_out_flit[n]),
      .cache_upd_valid(cache_upd_valid[n]), .cache_upd_ready(cache_upd_ready[n]),
      .cache_upd(cache_upd[n]),
      .mem_upd_valid(mem_upd_valid[n]), .mem_upd_ready(mem_upd_ready[n]),
      .mem_upd(mem_upd[n])
    );
  end
endmodule
