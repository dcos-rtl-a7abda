// tb_dir_controller: self-checking test of the MSI directory controller.
// The controller sits at home node 5. A directed sequence walks one block
// through the protocol: empty -> shared by two readers -> written (two
// invalidations) -> read by another node (forwarded to the owner) -> L2
// eviction reported (next read goes straight to memory) -> write-backs
// reported (block empty again) -> a conflicting block evicts the entry
// (recall invalidation). The packets the controller sends are compared,
// in order, with the expected list; the output is randomly stalled. The
// request-to-first-packet latency (two cycles) is checked when unstalled.
module tb_dir_controller;
  import dcos_pkg::*;
  localparam int unsigned NODE = 5;
  localparam int unsigned MEM_ENTRIES = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, out_valid, out_ready;
  flit_t req_flit, out_flit;
  logic cache_upd_valid, cache_upd_ready, mem_upd_valid, mem_upd_ready;
  dir_upd_t cache_upd, mem_upd;
  bit stall_en;

  dir_controller #(.NODE(NODE)) dut (.*);

  hdr_t got[$];
  int   cyc;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && out_ready) got.push_back(hdr_t'(out_flit.data));
  end
  always @(negedge clk) out_ready = stall_en ? 1'($urandom) : 1'b1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic hdr_t h(msg_e m, int dst, unit_e u, int rq, logic [31:0] a);
    return '{msg: m, src: node_t'(NODE), dst: node_t'(dst), unit: u, req: node_t'(rq),
             addr: a, rsvd: '0};
  endfunction

  task automatic request(msg_e m, int rq, logic [31:0] a, hdr_t exp[$]);
    int t0, t1;
    @(negedge clk);
    got.delete();
    req_valid = 1;
    req_flit  = mk_single('{msg: m, src: node_t'(rq), dst: node_t'(NODE), unit: U_DIR,
                            req: node_t'(rq), addr: a, rsvd: '0});
    do @(posedge clk); while (!req_ready);
    t0 = cyc;
    @(negedge clk);
    req_valid = 0;
    t1 = -1;
    for (int k = 0; k < 60; k++) begin
      @(posedge clk);
      if (t1 < 0 && out_valid) t1 = cyc;
    end
    if (!stall_en) chk(t1 - t0 == 2, $sformatf("latency %0d", t1 - t0));
    chk(got.size() == exp.size(), $sformatf("packet count %0d exp %0d", got.size(), exp.size()));
    for (int k = 0; k < exp.size() && k < got.size(); k++)
      chk(got[k] == exp[k], $sformatf("packet %0d: got %p exp %p", k, got[k], exp[k]));
  endtask

  task automatic update(bit is_cache, upd_e kind, int node, logic [31:0] a);
    @(negedge clk);
    if (is_cache) begin
      cache_upd_valid = 1; cache_upd = '{kind: kind, node: node_t'(node), addr: a};
      do @(posedge clk); while (!cache_upd_ready);
    end else begin
      mem_upd_valid = 1; mem_upd = '{kind: kind, node: node_t'(node), addr: a};
      do @(posedge clk); while (!mem_upd_ready);
    end
    @(negedge clk);
    cache_upd_valid = 0; mem_upd_valid = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] A, B;
  initial begin
    req_valid = 0; req_flit = '0; cache_upd_valid = 0; mem_upd_valid = 0;
    cache_upd = '0; mem_upd = '0; stall_en = 0; cyc = 0;
    A = (32'd5 << HOME_LSB) | (32'd77 << IDX_LSB);
    B = A | (32'd1 << (IDX_LSB + $clog2(MEM_ENTRIES)));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      logic [31:0] a, b;
      a = A + (pass << 12); b = B + (pass << 12);
      stall_en = (pass == 1);
      // (a) empty: read goes to the home L2 bank
      request(M_RD, 0, a, '{h(M_RD, 5, U_L2, 0, a)});
      request(M_RD, 1, a, '{h(M_RD, 5, U_L2, 1, a)});
      // (c) write: invalidate the two sharers, then the L2 bank
      request(M_WR, 2, a, '{h(M_INV, 0, U_CORE, 2, a), h(M_INV, 1, U_CORE, 2, a),
                            h(M_WR, 5, U_L2, 2, a)});
      // modified in node 2: forwarded to the owner
      request(M_RD, 3, a, '{h(M_FWD_RD, 2, U_CORE, 3, a)});
      // L2 evicts the block: the next read bypasses the L2 bank
      update(1, UPD_L2_EVICT, 0, a);
      request(M_RD, 4, a, '{h(M_RD, 5, U_MEM, 4, a)});
      request(M_RD, 6, a, '{h(M_RD, 5, U_L2, 6, a)});
      // evicted and refilled by the L2 bank itself: back to the L2 route
      update(1, UPD_L2_EVICT, 0, a);
      update(1, UPD_L2_FILL, 0, a);
      request(M_RD, 6, a, '{h(M_RD, 5, U_L2, 6, a)});
      // every holder writes back: block empty, a write sends no invalidation
      update(0, UPD_L1_WB, 2, a);
      update(0, UPD_L1_WB, 3, a);
      update(0, UPD_L1_WB, 4, a);
      update(0, UPD_L1_WB, 6, a);
      request(M_WR, 7, a, '{h(M_WR, 5, U_L2, 7, a)});
      // a conflicting block replaces the entry: recall node 7's copy
      request(M_RD, 0, b, '{h(M_INV, 7, U_CORE, 5, a), h(M_RD, 5, U_L2, 0, b)});
      // the recalled block is unknown again: no forward to node 7
      request(M_RD, 1, a, '{h(M_INV, 0, U_CORE, 5, b), h(M_RD, 5, U_L2, 1, a)});
      // write by a sharer that is the only holder: no invalidation
      request(M_WR, 1, a, '{h(M_WR, 5, U_L2, 1, a)});
      // write by another node while modified: forwarded write
      request(M_WR, 3, a, '{h(M_FWD_WR, 1, U_CORE, 3, a)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
