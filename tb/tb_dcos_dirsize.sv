// tb_dcos_dirsize: the memory-directory size sweep (512, 1024, 2048
// entries, with the 32-entry L2 directory) on identical traffic.
// Three meshes run side by side (tb_mesh_env). Core 0 writes 1536 blocks
// of home node 5, then core 1 reads them back in order. The directory is
// direct-mapped, so the outcome can be counted by hand. Call E the number
// of entries and W = 1536 the number of blocks.
//   * A read whose entry survived phase A is forwarded to core 0 and never
//     reaches the home banks. min(E, W) - max(0, W - E) entries survive
//     (1536 at E = 2048, 512 at E = 1024, 0 at E = 512).
//   * Every other read, and every write, is a home-bank access.
//   * Recalls: each phase replaces as many valid entries as it misses over
//     a valid entry.
// A larger on-switch directory therefore removes home-node accesses, the
// trend the design is meant to produce.
module tb_dcos_dirsize;
  localparam int W = 1536;
  logic clk = 0, clk_ch = 1, rst_n = 0;
  always #10 clk = ~clk;
  always #5 clk_ch = ~clk_ch;
  int checks = 0, failures = 0;

  logic done [3];
  int   n_fwd [3], n_home [3], n_recall [3], n_fwd_a [3], n_replies [3];

  tb_mesh_env #(.MEM_ENTRIES(512), .NBLK(W)) u_e512 (
    .clk, .clk_ch, .rst_n, .done(done[0]), .n_fwd(n_fwd[0]), .n_home(n_home[0]),
    .n_recall(n_recall[0]), .n_fwd_a(n_fwd_a[0]), .n_replies(n_replies[0]));
  tb_mesh_env #(.MEM_ENTRIES(1024), .NBLK(W)) u_e1024 (
    .clk, .clk_ch, .rst_n, .done(done[1]), .n_fwd(n_fwd[1]), .n_home(n_home[1]),
    .n_recall(n_recall[1]), .n_fwd_a(n_fwd_a[1]), .n_replies(n_replies[1]));
  tb_mesh_env #(.MEM_ENTRIES(2048), .NBLK(W)) u_e2048 (
    .clk, .clk_ch, .rst_n, .done(done[2]), .n_fwd(n_fwd[2]), .n_home(n_home[2]),
    .n_recall(n_recall[2]), .n_fwd_a(n_fwd_a[2]), .n_replies(n_replies[2]));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ent [3];
    ent = '{512, 1024, 2048};
    repeat (3) @(posedge clk);
    #3 rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    for (int k = 0; k < 3; k++) begin
      int e, surv, exp_fwd, exp_rec_a, exp_rec_b;
      e = ent[k];
      // entries surviving phase A that still hold their block
      surv = (e >= W) ? W : ((2 * e > W) ? 2 * e - W : 0);
      exp_fwd = surv;
      // phase A replaces a valid entry for every block beyond the first E
      exp_rec_a = (W > e) ? W - e : 0;
      // phase B: every read that is not forwarded replaces a valid entry
      exp_rec_b = W - surv;
      $display("memory directory %0d entries: forwards %0d, home accesses %0d, recalls %0d",
               e, n_fwd[k], n_home[k], n_recall[k]);
      chk(n_replies[k] == 2 * W, $sformatf("E=%0d replies %0d", e, n_replies[k]));
      chk(n_fwd_a[k] == 0, $sformatf("E=%0d no forward while writing", e));
      chk(n_fwd[k] == exp_fwd, $sformatf("E=%0d forwards %0d exp %0d", e, n_fwd[k], exp_fwd));
      chk(n_home[k] == 2 * W - exp_fwd, $sformatf("E=%0d home accesses %0d exp %0d", e, n_home[k], 2 * W - exp_fwd));
      chk(n_recall[k] == exp_rec_a + exp_rec_b, $sformatf("E=%0d recalls %0d exp %0d", e, n_recall[k], exp_rec_a + exp_rec_b));
    end
    chk(n_home[0] > n_home[1] && n_home[1] > n_home[2], "home accesses fall as the directory grows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
