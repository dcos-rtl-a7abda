// dir_cache: direct-mapped directory cache embedded in the DCOS switch.
//
// Each entry holds a block-address tag, the state of the L1 copies, the
// state of the home L2 copy and one presence bit per node (full map). The
// switch holds two of these: the shared L2$ directory bank (32 entries)
// and the shared memory directory (512, 1024 or 2048 entries; 2048 is the
// default). The entry contents and sizes follow the source design. Direct
// mapping, the index taken from the address bits just above the home-node
// bits, and a one-cycle read are this design's choices.
//
// Interface: rd_en/rd_addr start a lookup; one cycle later rd_hit tells
// whether the addressed block is present, rd_entry gives its contents, and
// rd_vvalid/rd_vaddr describe the valid entry at that index (the victim a
// write would replace). A write (wr_en) installs wr_entry for wr_addr,
// replacing whatever the index held. inv_en drops the entry for inv_addr if
// it holds that block. Valid bits reset to empty; the entry array is not
// reset (it is only read behind a valid bit).
module dir_cache
  import dcos_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_hit,
  output dir_entry_t        rd_entry,
  output logic              rd_vvalid,
  output logic [ADDR_W-1:0] rd_vaddr,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  dir_entry_t        wr_entry,
  input  logic              inv_en,
  input  logic [ADDR_W-1:0] inv_addr
);
  localparam int unsigned IW    = $clog2(ENTRIES);
  localparam int unsigned TAG_W = ADDR_W - IDX_LSB - IW;

  typedef logic [IW-1:0]    idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  // home-node bits are the same for every block a switch tracks, so they
  // are not stored; the victim address carries the requested home bits
  tag_t        tag_mem [ENTRIES];
  dir_entry_t  ent_mem [ENTRIES];
  logic [ENTRIES-1:0] valid;

  function automatic idx_t idx_of(logic [ADDR_W-1:0] a);
    return a[IDX_LSB +: IW];
  endfunction
  function automatic tag_t tag_of(logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  tag_t              rd_tag_q, rd_req_tag_q;
  logic              rd_valid_q;
  logic [NODE_W-1:0] rd_home_q;
  idx_t              rd_idx_q;

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_tag_q     <= tag_mem[idx_of(rd_addr)];
      rd_entry     <= ent_mem[idx_of(rd_addr)];
      rd_req_tag_q <= tag_of(rd_addr);
      rd_home_q    <= rd_addr[HOME_LSB +: NODE_W];
      rd_idx_q     <= idx_of(rd_addr);
    end
    if (wr_en) begin
      tag_mem[idx_of(wr_addr)] <= tag_of(wr_addr);
      ent_mem[idx_of(wr_addr)] <= wr_entry;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid      <= '0;
      rd_valid_q <= 1'b0;
    end else begin
      if (rd_en) rd_valid_q <= valid[idx_of(rd_addr)];
      if (inv_en && valid[idx_of(inv_addr)] &&
          tag_mem[idx_of(inv_addr)] == tag_of(inv_addr))
        valid[idx_of(inv_addr)] <= 1'b0;
      if (wr_en) valid[idx_of(wr_addr)] <= 1'b1;
    end
  end

  assign rd_hit    = rd_valid_q && (rd_tag_q == rd_req_tag_q);
  assign rd_vvalid = rd_valid_q;
  assign rd_vaddr  = {rd_tag_q, rd_idx_q, rd_home_q, {BLK_OFF_W{1'b0}}};

endmodule
