// dir_controller: full-map MSI directory controller of a DCOS switch.
//
// The switch delivers to this controller every read or write request whose
// home is this node (the home is given by the block address). The
// controller looks the block up in its two embedded directory caches - the
// shared L2$ directory bank (L2_ENTRIES) and the shared memory directory
// (MEM_ENTRIES) - and decides, without touching the home banks, where the
// request must go:
//   * block modified in another node's L1: forward the request to that
//     owner, which sends its data straight to the requester (cache-to-cache
//     transfer, no home L2 or memory access);
//   * memory directory says the home L2 bank does not hold the block: send
//     the request directly to the memory bank, bypassing the L2 lookup;
//   * otherwise: send it to the home L2 bank.
// A write also sends an invalidation to every other node whose presence
// bit is set, and leaves the block modified with only the writer present.
// A read adds the reader to the sharers and leaves the block shared.
// These rules follow the source design's MSI full-map protocol (empty,
// shared, modified states, one presence bit per node).
//
// The directories are caches: a block missing from both is treated as
// empty and sent to the L2 bank. Allocating a memory-directory entry over
// a valid victim first invalidates every L1 copy the victim records (a
// recall), so no copy is left untracked. The L2 directory is updated
// together with the memory directory whenever the L2 bank ends up holding
// the block. The cache dir update input (from the L2 bank: block evicted
// or filled) and the memory dir update input (a node dropped or wrote back
// its copy) edit the entries when the attached banks change state. Recall,
// the update encodings and the replacement policy are this design's own.
//
// Timing: a request is accepted in IDLE, looked up in the next cycle
// (LOOK), and its packets are sent one per cycle from the cycle after
// (recall invalidations, then invalidations, then the routed request). An
// update takes two cycles. Updates have priority over requests. All
// packets the controller sends are single flits; other flits it receives
// are dropped.
module dir_controller
  import dcos_pkg::*;
#(
  parameter int unsigned NODE        = 0,
  parameter int unsigned L2_ENTRIES  = 32,
  parameter int unsigned MEM_ENTRIES = 2048
) (
  input  logic     clk,
  input  logic     rst_n,
  // requests from the switch
  input  logic     req_valid,
  output logic     req_ready,
  input  flit_t    req_flit,
  // packets into the switch
  output logic     out_valid,
  input  logic     out_ready,
  output flit_t    out_flit,
  // cache dir update (shared L2 bank)
  input  logic     cache_upd_valid,
  output logic     cache_upd_ready,
  input  dir_upd_t cache_upd,
  // memory dir update (shared memory bank)
  input  logic     mem_upd_valid,
  output logic     mem_upd_ready,
  input  dir_upd_t mem_upd
);
  localparam node_t ME = node_t'(NODE);

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_ULOOK, S_EMIT} state_e;
  state_e state;

  hdr_t     cur_hdr;
  hdr_t     req_hdr;
  assign req_hdr = hdr_t'(req_flit.data);
  dir_upd_t cur_upd;

  // directory caches
  logic              lk_en;
  logic [ADDR_W-1:0] lk_addr;
  logic              l2_hit, m_hit, l2_vv, m_vv;
  dir_entry_t        l2_ent, m_ent;
  logic [ADDR_W-1:0] l2_va, m_va;
  logic              l2_we, m_we, l2_inv;
  logic [ADDR_W-1:0] l2_inv_addr, wr_addr;
  dir_entry_t        l2_wd, m_wd;

  dir_cache #(.ENTRIES(L2_ENTRIES)) u_l2dir (
    .clk, .rst_n,
    .rd_en(lk_en), .rd_addr(lk_addr),
    .rd_hit(l2_hit), .rd_entry(l2_ent), .rd_vvalid(l2_vv), .rd_vaddr(l2_va),
    .wr_en(l2_we), .wr_addr(wr_addr), .wr_entry(l2_wd),
    .inv_en(l2_inv), .inv_addr(l2_inv_addr)
  );

  dir_cache #(.ENTRIES(MEM_ENTRIES)) u_memdir (
    .clk, .rst_n,
    .rd_en(lk_en), .rd_addr(lk_addr),
    .rd_hit(m_hit), .rd_entry(m_ent), .rd_vvalid(m_vv), .rd_vaddr(m_va),
    .wr_en(m_we), .wr_addr(wr_addr), .wr_entry(m_wd),
    .inv_en(1'b0), .inv_addr('0)
  );

  // pending packets of the current request
  pres_t             recall_mask, inv_mask;
  logic [ADDR_W-1:0] recall_addr;
  hdr_t              main_hdr;
  logic              main_pend;

  // ---------------------------------------------------------------- decide
  hdr_t       d_main;
  dir_entry_t d_eff, d_new;
  pres_t      d_rbit, d_inv, d_recall;
  logic       d_fwd, d_bypass, d_wr;
  node_t      d_owner;

  always_comb begin
    d_wr   = (cur_hdr.msg == M_WR);
    d_rbit = pres_t'(1) << cur_hdr.req;
    if (l2_hit)     d_eff = l2_ent;
    else if (m_hit) d_eff = m_ent;
    else            d_eff = '{st_l1: D_E, st_l2: D_E, pres: '0};

    d_owner = '0;
    for (int unsigned n = 0; n < NUM_NODES; n++)
      if (d_eff.pres[n]) d_owner = node_t'(n);
    d_fwd    = (d_eff.st_l1 == D_M) && (d_eff.pres != '0) && ((d_eff.pres & (d_eff.pres - 1'b1)) == '0) && (d_eff.pres != d_rbit);
    d_bypass = !d_fwd && !l2_hit && m_hit && (m_ent.st_l2 == D_E);

    d_main      = cur_hdr;
    d_main.src  = ME;
    d_main.rsvd = '0;
    if (d_fwd) begin
      d_main.msg  = d_wr ? M_FWD_WR : M_FWD_RD;
      d_main.dst  = d_owner;
      d_main.unit = U_CORE;
    end else begin
      d_main.dst  = ME;
      d_main.unit = d_bypass ? U_MEM : U_L2;
    end

    d_new.st_l1 = d_wr ? D_M : D_S;
    d_new.pres  = d_wr ? d_rbit : (d_eff.pres | d_rbit);
    if (d_fwd)                           d_new.st_l2 = d_eff.st_l2;
    else if (d_wr)                       d_new.st_l2 = D_M;
    else if (d_eff.st_l2 == D_M)         d_new.st_l2 = D_M;
    else                                 d_new.st_l2 = D_S;

    d_inv    = d_wr ? (d_eff.pres & ~d_rbit) : '0;
    if (d_fwd) d_inv = '0;  // the owner is the only holder; it gets the forward
    d_recall = (!m_hit && m_vv) ? m_ent.pres : '0;
  end

  // ---------------------------------------------------------------- updates
  dir_entry_t u_l2, u_m;
  pres_t      u_nbit;
  always_comb begin
    u_nbit = pres_t'(1) << cur_upd.node;
    u_l2   = l2_ent;
    u_m    = m_ent;
    unique case (cur_upd.kind)
      UPD_L2_EVICT: u_m.st_l2 = D_E;
      UPD_L2_FILL:  if (m_ent.st_l2 == D_E) u_m.st_l2 = D_S;
      default: begin
        u_l2.pres = l2_ent.pres & ~u_nbit;
        u_m.pres  = m_ent.pres & ~u_nbit;
        if (u_l2.pres == '0) u_l2.st_l1 = D_E;
        if (u_m.pres == '0)  u_m.st_l1  = D_E;
      end
    endcase
  end

  // ------------------------------------------------------------ directory ports
  always_comb begin
    lk_en           = 1'b0;
    lk_addr         = req_hdr.addr;
    req_ready       = 1'b0;
    cache_upd_ready = 1'b0;
    mem_upd_ready   = 1'b0;
    l2_we = 1'b0; m_we = 1'b0; l2_inv = 1'b0;
    l2_wd = d_new; m_wd = d_new;
    wr_addr     = cur_hdr.addr;
    l2_inv_addr = m_va;
    unique case (state)
      S_IDLE: begin
        if (cache_upd_valid) begin
          cache_upd_ready = 1'b1;
          lk_en = 1'b1; lk_addr = cache_upd.addr;
        end else if (mem_upd_valid) begin
          mem_upd_ready = 1'b1;
          lk_en = 1'b1; lk_addr = mem_upd.addr;
        end else begin
          req_ready = 1'b1;
          lk_en   = req_valid;
          lk_addr = req_hdr.addr;
        end
      end
      S_LOOK: begin
        m_we  = 1'b1;
        l2_we = !d_fwd || l2_hit;
        // a recalled victim must not stay in the L2 directory either
        l2_inv = (!m_hit && m_vv);
      end
      S_ULOOK: begin
        wr_addr     = cur_upd.addr;
        l2_inv_addr = cur_upd.addr;
        l2_wd = u_l2; m_wd = u_m;
        m_we  = m_hit;
        if (cur_upd.kind == UPD_L2_EVICT) l2_inv = 1'b1;
        else if (cur_upd.kind == UPD_L1_WB) l2_we = l2_hit;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------- output
  node_t out_node;
  always_comb begin
    hdr_t h;
    out_node = '0;
    h = main_hdr;
    if (recall_mask != '0) begin
      for (int n = NUM_NODES - 1; n >= 0; n--)
        if (recall_mask[n]) out_node = node_t'(n);
      h = '{msg: M_INV, src: ME, dst: out_node, unit: U_CORE, req: ME,
            addr: recall_addr, rsvd: '0};
    end else if (inv_mask != '0) begin
      for (int n = NUM_NODES - 1; n >= 0; n--)
        if (inv_mask[n]) out_node = node_t'(n);
      h = '{msg: M_INV, src: ME, dst: out_node, unit: U_CORE, req: main_hdr.req,
            addr: main_hdr.addr, rsvd: '0};
    end
    out_valid = (state == S_EMIT);
    out_flit  = mk_single(h);
  end

  // ------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur_hdr     <= '0;
      cur_upd     <= '0;
      recall_mask <= '0;
      inv_mask    <= '0;
      recall_addr <= '0;
      main_hdr    <= '0;
      main_pend   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (cache_upd_valid) begin
            cur_upd <= cache_upd;
            state   <= S_ULOOK;
          end else if (mem_upd_valid) begin
            cur_upd <= mem_upd;
            state   <= S_ULOOK;
          end else if (req_valid && req_flit.ftype == F_SINGLE &&
                       (req_hdr.msg inside {M_RD, M_WR})) begin
            cur_hdr <= req_hdr;
            state   <= S_LOOK;
          end
        end
        S_ULOOK: state <= S_IDLE;
        S_LOOK: begin
          recall_mask <= d_recall;
          recall_addr <= m_va;
          inv_mask    <= d_inv;
          main_hdr    <= d_main;
          main_pend   <= 1'b1;
          state       <= S_EMIT;
        end
        S_EMIT: begin
          if (out_ready) begin
            if (recall_mask != '0)   recall_mask[out_node] <= 1'b0;
            else if (inv_mask != '0) inv_mask[out_node]    <= 1'b0;
            else begin
              main_pend <= 1'b0;
              state     <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_EMIT) |-> main_pend);

endmodule
