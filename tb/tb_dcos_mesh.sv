// tb_dcos_mesh: end-to-end test of the 4x2 DCOS mesh at its default sizes
// (32-entry L2 directories, 2048-entry memory directories).
//
// The testbench plays every node's core, shared L2 bank and shared memory
// bank. Banks answer a read or write request with a three-flit data packet
// (header plus a 16-byte L1 line) sent to the requester after their access
// time (15 cycles for the L2 bank, 70 for memory); a core that receives a
// forwarded request answers the requester the same way after 2 cycles.
// Each data flit names the unit and node that served the request.
//
// Phase 1 walks one block of home node 5 through the MSI protocol from the
// far corners of the mesh and checks who serves each request and who is
// invalidated. Phase 2 runs random reads and writes from all eight cores
// to a small shared address set spread over all homes, with random stalls
// on every local output, and checks that every request is answered once,
// to the right node, for the right block. The test counts each mechanism
// of the design (L2 route, memory bypass, forward to owner, invalidation,
// recall, both directory-update inputs and the L2 fill, multi-flit wormhole packets, heads
// blocked by a busy output, link stalls) and fails if one never happened.
module tb_dcos_mesh;
  import dcos_pkg::*;
  localparam int N = NUM_NODES;
  // switch clock period 20, channel clock period 10, rising edges aligned
  logic clk = 0, clk_ch = 1, rst_n = 0;
  always #10 clk = ~clk;
  always #5 clk_ch = ~clk_ch;
  int checks = 0, failures = 0;

  logic  [N-1:0][2:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  flit_t [N-1:0][2:0] loc_in_flit, loc_out_flit;
  logic     [N-1:0] cache_upd_valid, cache_upd_ready, mem_upd_valid, mem_upd_ready;
  dir_upd_t [N-1:0] cache_upd, mem_upd;

  dcos_mesh dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ endpoints
  typedef struct {
    int    due;
    int    n;
    int    p;
    hdr_t  h;
    int    srv_unit;
  } resp_t;

  typedef struct {
    int          n;
    msg_e        msg;
    logic [31:0] addr;
    int          req;
    int          srv_unit;
    int          srv_node;
    int          at;
  } ev_t;

  flit_t txq [N][3][$];
  resp_t pend[$];
  ev_t   evs[$];
  hdr_t  rx_hdr [N][3];
  int    rx_srv [N][3];
  int    cyc;
  bit    stall_en;

  // mechanism counters
  int n_l2, n_mem, n_fwd, n_inv, n_recall, n_cupd, n_mupd, n_multi, n_blocked, n_stall, n_fill;

  always_comb begin
    for (int n = 0; n < N; n++)
      for (int p = 0; p < 3; p++) begin
        loc_in_valid[n][p] = rst_n && (txq[n][p].size() > 0);
        loc_in_flit[n][p]  = (txq[n][p].size() > 0) ? txq[n][p][0] : '0;
      end
  end

  always @(negedge clk)
    for (int n = 0; n < N; n++)
      for (int p = 0; p < 3; p++)
        loc_out_ready[n][p] = stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;

  function automatic void send_data(int n, int p, hdr_t rq, int unit);
    hdr_t h;
    h = '{msg: M_DATA, src: node_t'(n), dst: rq.req, unit: U_CORE, req: rq.req,
          addr: rq.addr, rsvd: '0};
    txq[n][p].push_back('{ftype: F_HEAD, data: h});
    txq[n][p].push_back('{ftype: F_BODY, data: {32'(unit), 32'(n)}});
    txq[n][p].push_back('{ftype: F_TAIL, data: {32'(unit), 32'(n)}});
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int n = 0; n < N; n++)
        for (int p = 0; p < 3; p++) begin
          if (loc_in_valid[n][p] && loc_in_ready[n][p]) void'(txq[n][p].pop_front());
          if (loc_out_valid[n][p] && !loc_out_ready[n][p]) n_stall++;
          if (loc_out_valid[n][p] && loc_out_ready[n][p]) begin
            flit_t f; f = loc_out_flit[n][p];
            if (f.ftype inside {F_HEAD, F_SINGLE}) rx_hdr[n][p] = hdr_t'(f.data);
            if (f.ftype == F_BODY) rx_srv[n][p] = int'(f.data[63:32]) * 16 + int'(f.data[31:0]);
            if (f.ftype == F_TAIL) n_multi++;
            if (f.ftype inside {F_TAIL, F_SINGLE}) begin
              hdr_t h; h = rx_hdr[n][p];
              chk(h.dst == node_t'(n), "packet reached its destination node");
              if (p == 0) begin
                chk(h.unit == U_CORE, "core packet unit");
                evs.push_back('{n: n, msg: h.msg, addr: h.addr, req: int'(h.req),
                                srv_unit: rx_srv[n][p] / 16, srv_node: rx_srv[n][p] % 16, at: cyc});
                if (h.msg == M_INV) begin
                  n_inv++;
                  if (h.req == h.dst && home_of(h.addr) != h.dst) ;
                end
                if (h.msg inside {M_FWD_RD, M_FWD_WR}) begin
                  n_fwd++;
                  pend.push_back('{due: cyc + 2, n: n, p: 0, h: h, srv_unit: 0});
                end
              end else begin
                chk(h.msg inside {M_RD, M_WR}, "bank receives requests only");
                chk(home_of(h.addr) == node_t'(n), "bank is the block's home");
                if (p == 1) n_l2++; else n_mem++;
                pend.push_back('{due: cyc + (p == 1 ? 15 : 70), n: n, p: p, h: h, srv_unit: p});
              end
            end
          end
        end
      for (int k = pend.size() - 1; k >= 0; k--)
        if (pend[k].due <= cyc) begin
          send_data(pend[k].n, pend[k].p, pend[k].h, pend[k].srv_unit);
          pend.delete(k);
        end
    end
  end

  // heads waiting for a busy output, in any switch
  for (genvar n = 0; n < N; n++) begin : g_probe
    always @(posedge clk)
      if (rst_n)
        for (int i = 0; i < NUM_PORTS; i++)
          if (dut.g_node[n].u_sw.f_valid[i] && dut.g_node[n].u_sw.is_head[i] &&
              !dut.g_node[n].u_sw.lock[i] &&
              dut.g_node[n].u_sw.out_busy[dut.g_node[n].u_sw.rport[i]]) n_blocked++;
  end

  // ------------------------------------------------------------ helpers
  task automatic core_req(int n, msg_e m, logic [31:0] a);
    txq[n][0].push_back(mk_single('{msg: m, src: node_t'(n), dst: home_of(a), unit: U_DIR,
                                    req: node_t'(n), addr: a, rsvd: '0}));
  endtask

  task automatic quiet(int cycles);
    repeat (cycles) @(posedge clk);
  endtask

  // wait for the data reply of node n for block a
  task automatic wait_data(int n, logic [31:0] a, output ev_t e);
    int t0; bit found; t0 = cyc; found = 0;
    while (!found && cyc - t0 < 2000) begin
      @(posedge clk);
      foreach (evs[k])
        if (!found && evs[k].n == n && evs[k].msg == M_DATA && evs[k].addr == a) begin
          e = evs[k]; evs.delete(k); found = 1;
        end
    end
    chk(found, $sformatf("node %0d got data for %h", n, a));
  endtask

  function automatic int count_ev(int n, msg_e m, logic [31:0] a);
    int c; c = 0;
    foreach (evs[k]) if (evs[k].n == n && evs[k].msg == m && evs[k].addr == a) c++;
    return c;
  endfunction

  task automatic step(int n, msg_e m, logic [31:0] a, int exp_unit, int exp_node);
    ev_t e;
    core_req(n, m, a);
    wait_data(n, a, e);
    chk(e.srv_unit == exp_unit && e.srv_node == exp_node,
        $sformatf("node %0d %s %h served by unit %0d node %0d, exp %0d/%0d",
                  n, m.name(), a, e.srv_unit, e.srv_node, exp_unit, exp_node));
    quiet(30);
  endtask

  task automatic upd(bit is_cache, int home, upd_e k, int node, logic [31:0] a);
    @(negedge clk);
    if (is_cache) begin
      cache_upd_valid[home] = 1; cache_upd[home] = '{kind: k, node: node_t'(node), addr: a};
      do @(posedge clk); while (!cache_upd_ready[home]);
      n_cupd++;
    end else begin
      mem_upd_valid[home] = 1; mem_upd[home] = '{kind: k, node: node_t'(node), addr: a};
      do @(posedge clk); while (!mem_upd_ready[home]);
      n_mupd++;
    end
    @(negedge clk);
    cache_upd_valid[home] = 0; mem_upd_valid[home] = 0;
    quiet(5);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  localparam int U_C = 0, U_L = 1, U_M = 2;
  logic [31:0] A, B;
  initial begin
    cache_upd_valid = '0; mem_upd_valid = '0; cache_upd = '0; mem_upd = '0;
    stall_en = 0; cyc = 0;
    {n_l2, n_mem, n_fwd, n_inv, n_recall, n_cupd, n_mupd, n_multi, n_blocked, n_stall, n_fill} = '0;
    A = (32'd5 << HOME_LSB) | (32'd33 << IDX_LSB);
    B = A | (32'd1 << (IDX_LSB + 11));
    repeat (3) @(posedge clk);
    rst_n = 1;
    quiet(3);

    // ---- phase 1: one block of home 5 through the protocol
    step(0, M_RD, A, U_L, 5);              // empty -> shared {0}
    step(7, M_RD, A, U_L, 5);              // shared {0,7}
    step(3, M_WR, A, U_L, 5);              // invalidate 0 and 7, modified {3}
    chk(count_ev(0, M_INV, A) == 1 && count_ev(7, M_INV, A) == 1, "sharers 0 and 7 invalidated");
    chk(count_ev(3, M_INV, A) == 0, "writer not invalidated");
    step(4, M_RD, A, U_C, 3);              // forwarded: core 3 supplies core 4
    upd(1, 5, UPD_L2_EVICT, 0, A);         // L2 bank of node 5 drops the block
    step(1, M_RD, A, U_M, 5);              // memory bypass of the L2 bank
    step(2, M_RD, A, U_L, 5);              // L2 was filled by the previous read
    upd(1, 5, UPD_L2_EVICT, 0, A);         // evicted, then refilled by the bank
    upd(1, 5, UPD_L2_FILL, 0, A);
    n_fill++;
    step(2, M_RD, A, U_L, 5);              // the fill restores the L2 route
    upd(0, 5, UPD_L1_WB, 0, A);            // holders drop their copies
    upd(0, 5, UPD_L1_WB, 1, A);
    upd(0, 5, UPD_L1_WB, 2, A);
    upd(0, 5, UPD_L1_WB, 3, A);
    upd(0, 5, UPD_L1_WB, 4, A);
    evs.delete();
    step(6, M_WR, A, U_L, 5);              // empty: no invalidation
    chk(evs.size() == 0, "write to an empty block sends no invalidation");
    step(0, M_RD, B, U_L, 5);              // conflicting block: recall node 6
    chk(count_ev(6, M_INV, A) == 1, "entry replacement recalls node 6's copy");
    n_recall += count_ev(6, M_INV, A);
    evs.delete();
    step(7, M_WR, B, U_L, 5);              // invalidates node 0's copy of B
    chk(count_ev(0, M_INV, B) == 1, "node 0's copy of B invalidated");
    evs.delete();

    // ---- phase 2: random traffic from every core, with stalls
    stall_en = 1;
    begin
      for (int n = 0; n < N; n++) begin
        fork
          automatic int nn = n;
          begin
            for (int r = 0; r < 60; r++) begin
              automatic logic [31:0] a; automatic ev_t e; automatic msg_e m;
              a = (32'($urandom_range(0, 7)) << HOME_LSB) |
                  (32'($urandom_range(0, 3)) << IDX_LSB) |
                  (32'($urandom_range(0, 1)) << (IDX_LSB + 11));
              m = ($urandom_range(0, 2) == 0) ? M_WR : M_RD;
              core_req(nn, m, a);
              wait_data(nn, a, e);
              chk(e.req == nn, "reply names the requester");
              if (e.srv_unit == U_C) chk(e.srv_node != nn, "forward to another node");
              else chk(e.srv_node == int'(home_of(a)), $sformatf("bank reply from the home node: n=%0d a=%h unit=%0d node=%0d at=%0d", nn, a, e.srv_unit, e.srv_node, e.at));
            end
          end
        join_none
      end
      wait fork;
    end
    stall_en = 0;
    quiet(200);
    chk(pend.size() == 0, "no reply left pending");

    $display("mechanisms: l2=%0d mem_bypass=%0d forward=%0d inv=%0d recall=%0d cache_upd=%0d mem_upd=%0d multiflit=%0d blocked=%0d stalls=%0d",
             n_l2, n_mem, n_fwd, n_inv, n_recall, n_cupd, n_mupd, n_multi, n_blocked, n_stall);
    chk(n_l2 > 0, "L2 route happened");
    chk(n_mem > 0, "memory bypass happened");
    chk(n_fwd > 0, "forward to owner happened");
    chk(n_inv > 0, "invalidation happened");
    chk(n_recall > 0, "recall happened");
    chk(n_cupd > 0, "cache dir update happened");
    chk(n_mupd > 0, "memory dir update happened");
    chk(n_fill > 0, "L2 fill update happened");
    chk(n_multi > 0, "multi-flit packet happened");
    chk(n_blocked > 0, "head blocked by busy output happened");
    chk(n_stall > 0, "link stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
