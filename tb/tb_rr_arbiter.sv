// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Random request vectors and advance strobes against a reference pointer
// model; also checks that every persistent requester is served within N
// grants (fairness).
module tb_rr_arbiter;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req, grant, exp_grant;
  logic advance;
  int ptr;

  rr_arbiter #(.N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      req     = (t < 2000) ? N'($urandom) : '1;
      advance = (t < 2000) ? 1'($urandom) : 1'b1;
      exp_grant = '0;
      for (int k = 0; k < N; k++)
        if (exp_grant == '0 && req[(ptr + k) % N]) exp_grant[(ptr + k) % N] = 1'b1;
      #1;
      checks++;
      if (grant !== exp_grant) begin
        failures++;
        $display("FAIL t=%0d req=%b grant=%b exp=%b", t, req, grant, exp_grant);
      end
      if (t >= 2000) begin
        // all request: grant must rotate by one each cycle
        checks++;
        if (!grant[ptr]) begin failures++; $display("FAIL rotation t=%0d", t); end
      end
      if (advance && exp_grant != '0)
        for (int k = 0; k < N; k++) if (exp_grant[k]) ptr = (k + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
