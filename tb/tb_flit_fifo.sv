// tb_flit_fifo: self-checking test of the input flit buffer.
// Random pushes and pops against a queue model; checks order, the full
// flag at DEPTH entries and the one-cycle write-to-read latency.
module tb_flit_fifo;
  import dcos_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;
  flit_t model[$];

  flit_fifo #(.DEPTH(DEPTH)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!out_valid && in_ready, "empty after reset");
    // fill to DEPTH without popping
    for (int k = 0; k < DEPTH; k++) begin
      in_valid = 1; in_flit = {F_BODY, 64'(k + 100)};
      chk(in_ready, "ready while not full");
      @(posedge clk); model.push_back(in_flit);
      @(negedge clk);
      if (k == 0) chk(out_valid && out_flit == model[0], "one-cycle latency");
    end
    in_valid = 0;
    chk(!in_ready, "not ready when full");
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      in_valid  = $urandom_range(0, 1);
      out_ready = $urandom_range(0, 1);
      in_flit   = {2'($urandom), 32'($urandom), 32'($urandom)};
      chk(in_ready == (model.size() < DEPTH), "in_ready matches fill");
      chk(out_valid == (model.size() > 0), "out_valid matches fill");
      if (out_valid && model.size() > 0) chk(out_flit == model[0], "order");
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_flit);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
