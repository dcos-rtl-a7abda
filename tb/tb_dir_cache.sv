// tb_dir_cache: self-checking test of the directory cache.
// Random writes, lookups and invalidations at the default size, with
// addresses drawn so that blocks collide on the same index; every lookup
// result (hit, entry, victim valid and address) is compared with an
// associative-array model of a direct-mapped cache.
module tb_dir_cache;
  import dcos_pkg::*;
  localparam int unsigned ENTRIES = 2048;
  localparam int unsigned IW = $clog2(ENTRIES);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rd_en, rd_hit, rd_vvalid, wr_en, inv_en;
  logic [ADDR_W-1:0] rd_addr, rd_vaddr, wr_addr, inv_addr;
  dir_entry_t rd_entry, wr_entry;

  dir_cache #(.ENTRIES(ENTRIES)) dut (.*);

  // model: index -> {block address, entry}
  logic [ADDR_W-1:0] m_addr [int];
  dir_entry_t        m_ent  [int];

  function automatic logic [ADDR_W-1:0] rnd_addr(int home);
    logic [ADDR_W-1:0] a;
    a = '0;
    a[IDX_LSB +: 4]         = 4'($urandom);           // 16 indexes
    a[IDX_LSB + IW +: 2]    = 2'($urandom);           // 4 tags each
    a[HOME_LSB +: NODE_W]   = NODE_W'(home);
    return a;
  endfunction

  function automatic int idx(logic [ADDR_W-1:0] a);
    return int'(a[IDX_LSB +: IW]);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; inv_en = 0;
    rd_addr = '0; wr_addr = '0; inv_addr = '0; wr_entry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      int op;
      logic [ADDR_W-1:0] a;
      @(negedge clk);
      op = $urandom_range(0, 9);
      a  = rnd_addr(3);
      rd_en = 0; wr_en = 0; inv_en = 0;
      if (op < 4) begin
        wr_en = 1; wr_addr = a;
        wr_entry = '{st_l1: dstate_e'($urandom_range(0, 2)),
                     st_l2: dstate_e'($urandom_range(0, 2)), pres: pres_t'($urandom)};
        @(posedge clk);
        m_addr[idx(a)] = a; m_ent[idx(a)] = wr_entry;
      end else if (op < 5) begin
        inv_en = 1; inv_addr = a;
        @(posedge clk);
        if (m_addr.exists(idx(a)) && m_addr[idx(a)] == a) begin
          m_addr.delete(idx(a)); m_ent.delete(idx(a));
        end
      end else begin
        logic eh, ev;
        rd_en = 1; rd_addr = a;
        @(posedge clk);
        @(negedge clk);
        rd_en = 0;
        ev = m_addr.exists(idx(a));
        eh = ev && m_addr[idx(a)] == a;
        checks++;
        if (rd_hit !== eh || rd_vvalid !== ev) begin
          failures++; $display("FAIL hit/valid t=%0d addr=%h hit=%b exp=%b", t, a, rd_hit, eh);
        end
        if (ev) begin
          checks++;
          if (rd_vaddr !== m_addr[idx(a)] || rd_entry !== m_ent[idx(a)]) begin
            failures++; $display("FAIL entry t=%0d", t);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
