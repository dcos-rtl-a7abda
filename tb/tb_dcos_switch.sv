// tb_dcos_switch: self-checking test of one DCOS switch (node 5, at
// column 1, row 1 of the 4x2 mesh).
// Phase 1 sends random single- and multi-flit packets from all seven
// external inputs to random destinations while the outputs are randomly
// stalled. Every flit is tagged with its packet id and position; the
// monitors check that each packet leaves on the port predicted from the
// mesh coordinates, complete, in order and never interleaved with another
// packet on the same output (wormhole switching). Phase 2 checks the
// one-cycle hop latency. Phase 3 sends read requests to the directory
// unit and checks that the switch's directory forwards them to the L2
// bank, then, after a write and a read by others, to the owner.
module tb_dcos_switch;
  import dcos_pkg::*;
  localparam int unsigned NODE = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  [6:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [6:0] in_flit, out_flit;
  logic cache_upd_valid, cache_upd_ready, mem_upd_valid, mem_upd_ready;
  dir_upd_t cache_upd, mem_upd;

  dcos_switch #(.NODE(NODE)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic port_e exp_port(int d, unit_e u);
    int cx, cy, dx, dy;
    cx = NODE % 4; cy = NODE / 4; dx = d % 4; dy = d / 4;
    if (dx > cx) return P_EAST;
    if (dx < cx) return P_WEST;
    if (dy > cy) return P_SOUTH;
    if (dy < cy) return P_NORTH;
    return port_e'(4 + int'(u));
  endfunction

  // stimulus queues per input
  flit_t q [7][$];
  int    pkt_port [int];   // id -> expected output
  int    pkt_len  [int];
  int    pkt_done [int];
  bit    stall_en;
  int    cur_id [7], cur_seq [7];
  int    cyc;
  int    wormhole_blocked;

  // drivers: present the queue head; pop on handshake
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 7; i++)
      if (in_valid[i] && in_ready[i]) void'(q[i].pop_front());
  end
  always_comb begin
    for (int i = 0; i < 7; i++) begin
      in_valid[i] = (q[i].size() > 0) && rst_n;
      in_flit[i]  = (q[i].size() > 0) ? q[i][0] : '0;
    end
  end
  always @(negedge clk)
    for (int o = 0; o < 7; o++) out_ready[o] = stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;

  // monitors
  hdr_t dir_out[$];
  always @(posedge clk) begin
    if (rst_n) begin
      // a head waiting behind a busy output
      for (int i = 0; i < 8; i++)
        if (dut.f_valid[i] && dut.is_head[i] && !dut.lock[i] &&
            dut.out_busy[dut.rport[i]]) wormhole_blocked++;
      for (int o = 0; o < 7; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          flit_t f; int id, seq;
          f = out_flit[o];
          if (f.ftype inside {F_HEAD, F_SINGLE}) begin
            hdr_t hh; hh = hdr_t'(f.data);
            if (hh.msg inside {M_RD, M_WR, M_FWD_RD, M_FWD_WR, M_INV}) begin
              dir_out.push_back(hh);
            end else begin
              id = int'(hh.addr);
              chk(pkt_port.exists(id), $sformatf("unknown packet %0d", id));
              if (pkt_port.exists(id))
                chk(pkt_port[id] == o, $sformatf("packet %0d on port %0d exp %0d", id, o, pkt_port[id]));
              cur_id[o] = id; cur_seq[o] = 1;
              if (f.ftype == F_SINGLE) pkt_done[id] = 1;
            end
          end else begin
            id = int'(f.data[63:32]); seq = int'(f.data[31:0]);
            chk(id == cur_id[o] && seq == cur_seq[o],
                $sformatf("port %0d interleave/order: id %0d seq %0d exp %0d/%0d", o, id, seq, cur_id[o], cur_seq[o]));
            cur_seq[o]++;
            if (f.ftype == F_TAIL) begin
              chk(cur_seq[o] == pkt_len[id], "packet length");
              pkt_done[id] = 1;
            end
          end
        end
      end
    end
  end

  task automatic add_pkt(int i, int id, int d, unit_e u, int len);
    hdr_t hh;
    hh = '{msg: M_DATA, src: node_t'(0), dst: node_t'(d), unit: u, req: '0, addr: 32'(id), rsvd: '0};
    pkt_port[id] = exp_port(d, u);
    pkt_len[id]  = len;
    if (len == 1) q[i].push_back(mk_single(hh));
    else begin
      q[i].push_back('{ftype: F_HEAD, data: hh});
      for (int k = 1; k < len; k++)
        q[i].push_back('{ftype: (k == len - 1) ? F_TAIL : F_BODY, data: {32'(id), 32'(k)}});
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int id;
    cache_upd_valid = 0; mem_upd_valid = 0; cache_upd = '0; mem_upd = '0;
    stall_en = 1; cyc = 0; wormhole_blocked = 0;
    for (int o = 0; o < 7; o++) begin cur_id[o] = -1; cur_seq[o] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random traffic
    id = 1000;
    for (int n = 0; n < 600; n++) begin
      int d; unit_e u;
      d = $urandom_range(0, 7);
      u = unit_e'($urandom_range(0, 2));
      add_pkt($urandom_range(0, 6), id, d, u, $urandom_range(0, 2) == 0 ? 1 : $urandom_range(2, 6));
      id++;
    end
    for (int t = 0; t < 20000; t++) begin
      bit empty; empty = 1;
      @(posedge clk);
      for (int i = 0; i < 7; i++) if (q[i].size() > 0) empty = 0;
      if (empty) break;
    end
    repeat (50) @(posedge clk);
    for (int k = 1000; k < id; k++) chk(pkt_done.exists(k), $sformatf("packet %0d delivered", k));
    chk(wormhole_blocked > 0, "a head flit waited for a busy output");
    // phase 2: hop latency, west input to east output, no stall
    stall_en = 0;
    @(negedge clk);
    begin
      int t0;
      add_pkt(P_WEST, 5000, 7, U_CORE, 1);
      @(posedge clk); t0 = cyc;
      while (!(out_valid[P_EAST] && out_ready[P_EAST])) @(posedge clk);
      chk(cyc - t0 == 1, $sformatf("hop latency %0d", cyc - t0));
    end
    // phase 3: directory unit
    begin
      logic [31:0] a;
      a = (32'd5 << HOME_LSB) | (32'd9 << IDX_LSB);
      dir_out.delete();
      @(negedge clk);
      q[P_CORE].push_back(mk_single('{msg: M_RD, src: 5, dst: 5, unit: U_DIR, req: 5, addr: a, rsvd: '0}));
      repeat (10) @(posedge clk);
      q[P_EAST].push_back(mk_single('{msg: M_WR, src: 6, dst: 5, unit: U_DIR, req: 6, addr: a, rsvd: '0}));
      repeat (10) @(posedge clk);
      q[P_WEST].push_back(mk_single('{msg: M_RD, src: 4, dst: 5, unit: U_DIR, req: 4, addr: a, rsvd: '0}));
      repeat (20) @(posedge clk);
      chk(dir_out.size() == 4, $sformatf("directory packets %0d", dir_out.size()));
      if (dir_out.size() == 4) begin
        chk(dir_out[0].msg == M_RD && dir_out[0].unit == U_L2 && dir_out[0].req == 5, "read to L2 bank");
        chk(dir_out[1].msg == M_INV && dir_out[1].dst == 5 && dir_out[1].unit == U_CORE, "invalidate reader");
        chk(dir_out[2].msg == M_WR && dir_out[2].unit == U_L2 && dir_out[2].req == 6, "write to L2 bank");
        chk(dir_out[3].msg == M_FWD_RD && dir_out[3].dst == 6 && dir_out[3].req == 4, "read forwarded to owner");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
