// tb_crossbar: self-checking test of the flit crossbar.
// Random partial permutations of inputs onto outputs; checks each output's
// flit and valid and each input's ready against the connection chosen.
module tb_crossbar;
  import dcos_pkg::*;
  localparam int unsigned N = NUM_PORTS;
  int checks = 0, failures = 0;

  logic  [N-1:0][N-1:0] conn;
  logic  [N-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [N-1:0] in_flit, out_flit;

  crossbar #(.NI(N), .NO(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int src [N];
      int perm [N];
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      conn = '0;
      for (int o = 0; o < N; o++) begin
        src[o] = ($urandom_range(0, 3) == 0) ? -1 : perm[o];
        if (src[o] >= 0) conn[o][src[o]] = 1'b1;
      end
      for (int i = 0; i < N; i++) begin
        in_flit[i]  = {2'($urandom), 32'($urandom), 32'($urandom)};
        in_valid[i] = 1'($urandom);
      end
      out_ready = N'($urandom);
      #1;
      for (int o = 0; o < N; o++) begin
        flit_t ef; logic ev;
        ef = (src[o] >= 0) ? in_flit[src[o]] : '0;
        ev = (src[o] >= 0) ? in_valid[src[o]] : 1'b0;
        checks++;
        if (out_flit[o] !== ef || out_valid[o] !== ev) begin
          failures++; $display("FAIL out %0d", o);
        end
      end
      for (int i = 0; i < N; i++) begin
        logic er; er = 1'b0;
        for (int o = 0; o < N; o++) if (src[o] == i) er = out_ready[o];
        checks++;
        if (in_ready[i] !== er) begin failures++; $display("FAIL in_ready %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
