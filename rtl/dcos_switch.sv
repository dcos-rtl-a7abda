// dcos_switch: Directory Cache On a Switch.
//
// One switch of the mesh. It has four mesh ports (north, east, south,
// west) and three local ports (the core with its L1 cache, the node's
// shared L2 bank and its shared memory bank), plus an internal eighth port
// to its directory controller, which embeds the directory caches of the
// node's L2 bank and memory bank. Requests whose home is this node are
// addressed to the directory unit: the controller resolves coherence in
// the switch and re-injects the request towards the owner's core, the
// memory bank (L2 bypass) or the L2 bank, together with any invalidations.
// The embedding of both directories in the crossbar switch and the cache
// and memory dir update inputs follow the source design.
//
// Datapath: every input port has a flit FIFO. The head flit of a packet
// computes its output with route_compute and requests that output; a
// round-robin arbiter per output picks one input among those whose head
// flit waits for a free output. The winner holds the output until its tail
// flit has passed (wormhole switching), so flits of different packets never
// interleave on a link. The crossbar carries flits from the FIFO heads to
// the outputs. Links use valid/ready handshakes; a flit crosses a switch in
// one cycle once it reaches the head of its FIFO and wins the output.
// Buffer depth, arbitration policy and handshake are this design's choices.
//
// Port arrays are indexed by dcos_pkg::port_e (0 north ... 6 memory).
// MESH_USED marks the mesh ports that have a neighbour; a border port gets
// no input buffer, and its in_flit, in_valid and out_ready are ignored.
module dcos_switch
  import dcos_pkg::*;
#(
  parameter int unsigned NODE        = 0,
  parameter int unsigned L2_ENTRIES  = 32,
  parameter int unsigned MEM_ENTRIES = 2048,
  parameter int unsigned FIFO_DEPTH  = 4,
  // mesh ports that have a neighbour (bit = port_e); a border port has no
  // input buffer, never offers a flit and accepts nothing
  parameter logic [3:0]  MESH_USED   = 4'b1111
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic  [6:0]          in_valid,
  output logic  [6:0]          in_ready,
  input  flit_t [6:0]          in_flit,
  output logic  [6:0]          out_valid,
  input  logic  [6:0]          out_ready,
  output flit_t [6:0]          out_flit,
  // cache dir update (from the L2 bank) and memory dir update
  input  logic                 cache_upd_valid,
  output logic                 cache_upd_ready,
  input  dir_upd_t             cache_upd,
  input  logic                 mem_upd_valid,
  output logic                 mem_upd_ready,
  input  dir_upd_t             mem_upd
);
  localparam int unsigned NP = NUM_PORTS;

  logic  [NP-1:0] f_in_valid, f_in_ready, f_valid, f_ready;
  flit_t [NP-1:0] f_in_flit, f_flit;

  logic  [NP-1:0] x_out_valid, x_out_ready;
  flit_t [NP-1:0] x_out_flit;

  logic  dir_out_valid, dir_out_ready, dir_req_ready;
  flit_t dir_out_flit;

  always_comb begin
    f_in_valid = {dir_out_valid, in_valid};
    f_in_flit  = {dir_out_flit, in_flit};
  end
  assign in_ready      = f_in_ready[6:0];
  assign dir_out_ready = f_in_ready[P_DIR];

  for (genvar i = 0; i < NP; i++) begin : g_in
    if (i >= 4 || MESH_USED[i]) begin : g_buf
      flit_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .in_valid(f_in_valid[i]), .in_ready(f_in_ready[i]), .in_flit(f_in_flit[i]),
        .out_valid(f_valid[i]), .out_ready(f_ready[i]), .out_flit(f_flit[i])
      );
    end else begin : g_none
      assign f_in_ready[i] = 1'b0;
      assign f_valid[i]    = 1'b0;
      assign f_flit[i]     = '0;
    end
  end

  // ------------------------------------------------------- route + allocate
  port_e [NP-1:0] rport, lport;
  logic  [NP-1:0] lock, is_head;
  logic  [NP-1:0] out_busy;
  logic  [NP-1:0][NP-1:0] req, grant, conn;  // [output][input]
  logic  [NP-1:0] adv;

  for (genvar i = 0; i < NP; i++) begin : g_rc
    hdr_t h;
    assign h = hdr_t'(f_flit[i].data);
    assign is_head[i] = (f_flit[i].ftype == F_HEAD) || (f_flit[i].ftype == F_SINGLE);
    route_compute u_rc (.cur(node_t'(NODE)), .dst(h.dst), .unit(h.unit), .port(rport[i]));
  end

  always_comb begin
    out_busy = '0;
    for (int unsigned i = 0; i < NP; i++)
      if (lock[i]) out_busy[lport[i]] = 1'b1;
    for (int unsigned o = 0; o < NP; o++)
      for (int unsigned i = 0; i < NP; i++)
        req[o][i] = f_valid[i] && !lock[i] && is_head[i] &&
                    (rport[i] == port_e'(o)) && !out_busy[o];
  end

  for (genvar o = 0; o < NP; o++) begin : g_arb
    rr_arbiter #(.N(NP)) u_arb (
      .clk, .rst_n, .req(req[o]), .advance(adv[o]), .grant(grant[o])
    );
    assign adv[o] = x_out_valid[o] && x_out_ready[o];
  end

  always_comb begin
    for (int unsigned o = 0; o < NP; o++)
      for (int unsigned i = 0; i < NP; i++)
        conn[o][i] = grant[o][i] || (lock[i] && lport[i] == port_e'(o));
  end

  crossbar #(.NI(NP), .NO(NP)) u_xbar (
    .conn, .in_valid(f_valid), .in_flit(f_flit), .in_ready(f_ready),
    .out_valid(x_out_valid), .out_flit(x_out_flit), .out_ready(x_out_ready)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock  <= '0;
      lport <= {NP{P_NORTH}};
    end else begin
      for (int unsigned i = 0; i < NP; i++) begin
        if (f_valid[i] && f_ready[i]) begin
          if (f_flit[i].ftype == F_HEAD) begin
            lock[i]  <= 1'b1;
            lport[i] <= rport[i];
          end else if (f_flit[i].ftype == F_TAIL) begin
            lock[i] <= 1'b0;
          end
        end
      end
    end
  end

  assign out_valid   = x_out_valid[6:0];
  assign out_flit    = x_out_flit[6:0];
  assign x_out_ready = {1'b0, out_ready} | {dir_req_ready, 7'b0};

  // ------------------------------------------------------- directory
  dir_controller #(
    .NODE(NODE), .L2_ENTRIES(L2_ENTRIES), .MEM_ENTRIES(MEM_ENTRIES)
  ) u_dir (
    .clk, .rst_n,
    .req_valid(x_out_valid[P_DIR]), .req_ready(dir_req_ready), .req_flit(x_out_flit[P_DIR]),
    .out_valid(dir_out_valid), .out_ready(dir_out_ready), .out_flit(dir_out_flit),
    .cache_upd_valid, .cache_upd_ready, .cache_upd,
    .mem_upd_valid, .mem_upd_ready, .mem_upd
  );

  // a body or tail flit only moves on an output its packet holds
  assert property (@(posedge clk) disable iff (!rst_n)
                   (f_valid[0] && f_ready[0] && !is_head[0]) |-> lock[0]);

endmodule
