// tb_mesh_env: testbench environment for the directory-size experiment.
// Holds one dcos_mesh with the given memory-directory size and plays all
// cores and banks (L2 bank 15 cycles, memory 70, owner forward 2). Its
// traffic targets home node 5 only:
//   phase A: core 0 writes blocks 0 .. NBLK-1 (block b at index b);
//   phase B: core 1 reads the same blocks in the same order.
// Requests are issued back to back; a phase ends when all its replies are
// in. The environment counts, at the home, forwards to the owner (served
// by core 0 without a home-bank access), home L2/memory accesses, and
// recall invalidations (entry replacement), and raises done at the end.
module tb_mesh_env
  import dcos_pkg::*;
#(
  parameter int unsigned MEM_ENTRIES = 2048,
  parameter int          NBLK        = 1536
) (
  input  logic clk,
  input  logic clk_ch,
  input  logic rst_n,
  output logic done,
  output int   n_fwd,
  output int   n_home,
  output int   n_recall,
  output int   n_fwd_a,
  output int   n_replies
);
  localparam int N = NUM_NODES;
  logic  [N-1:0][2:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  flit_t [N-1:0][2:0] loc_in_flit, loc_out_flit;
  logic     [N-1:0] cache_upd_ready, mem_upd_ready;

  dcos_mesh #(.MEM_ENTRIES(MEM_ENTRIES)) dut (
    .clk, .clk_ch, .rst_n,
    .loc_in_valid, .loc_in_ready, .loc_in_flit,
    .loc_out_valid, .loc_out_ready, .loc_out_flit,
    .cache_upd_valid('0), .cache_upd_ready, .cache_upd('0),
    .mem_upd_valid('0), .mem_upd_ready, .mem_upd('0)
  );

  typedef struct {
    int   due;
    int   n;
    int   p;
    hdr_t h;
  } resp_t;

  flit_t txq [N][3][$];
  resp_t pend[$];
  hdr_t  rx_hdr [N][3];
  int    cyc;

  assign loc_out_ready = '1;
  always_comb
    for (int n = 0; n < N; n++)
      for (int p = 0; p < 3; p++) begin
        loc_in_valid[n][p] = rst_n && (txq[n][p].size() > 0);
        loc_in_flit[n][p]  = (txq[n][p].size() > 0) ? txq[n][p][0] : '0;
      end

  function automatic void send_data(int n, int p, hdr_t rq);
    hdr_t h;
    h = '{msg: M_DATA, src: node_t'(n), dst: rq.req, unit: U_CORE, req: rq.req,
          addr: rq.addr, rsvd: '0};
    txq[n][p].push_back('{ftype: F_HEAD, data: h});
    txq[n][p].push_back('{ftype: F_BODY, data: 64'(p)});
    txq[n][p].push_back('{ftype: F_TAIL, data: 64'(n)});
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int n = 0; n < N; n++)
        for (int p = 0; p < 3; p++) begin
          if (loc_in_valid[n][p] && loc_in_ready[n][p]) void'(txq[n][p].pop_front());
          if (loc_out_valid[n][p]) begin
            flit_t f; f = loc_out_flit[n][p];
            if (f.ftype inside {F_HEAD, F_SINGLE}) rx_hdr[n][p] = hdr_t'(f.data);
            if (f.ftype inside {F_TAIL, F_SINGLE}) begin
              hdr_t h; h = rx_hdr[n][p];
              if (p == 0) begin
                if (h.msg == M_DATA) n_replies++;
                if (h.msg == M_INV && h.req == node_t'(5)) n_recall++;
                if (h.msg inside {M_FWD_RD, M_FWD_WR}) begin
                  n_fwd++;
                  pend.push_back('{due: cyc + 2, n: n, p: 0, h: h});
                end
              end else begin
                n_home++;
                pend.push_back('{due: cyc + (p == 1 ? 15 : 70), n: n, p: p, h: h});
              end
            end
          end
        end
      for (int k = pend.size() - 1; k >= 0; k--)
        if (pend[k].due <= cyc) begin
          send_data(pend[k].n, pend[k].p, pend[k].h);
          pend.delete(k);
        end
    end
  end

  function automatic logic [31:0] blk(int b);
    return (32'd5 << HOME_LSB) | (32'(b) << IDX_LSB);
  endfunction

  task automatic issue(int n, msg_e m);
    for (int b = 0; b < NBLK; b++)
      txq[n][0].push_back(mk_single('{msg: m, src: node_t'(n), dst: node_t'(5), unit: U_DIR,
                                      req: node_t'(n), addr: blk(b), rsvd: '0}));
  endtask

  initial begin
    done = 0; n_fwd = 0; n_home = 0; n_recall = 0; n_replies = 0; n_fwd_a = 0; cyc = 0;
    wait (rst_n);
    repeat (5) @(posedge clk);
    issue(0, M_WR);
    wait (n_replies == NBLK);
    repeat (50) @(posedge clk);
    n_fwd_a = n_fwd;
    issue(1, M_RD);
    wait (n_replies == 2 * NBLK);
    repeat (200) @(posedge clk);
    done = 1;
  end
endmodule
