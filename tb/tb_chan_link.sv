// tb_chan_link: self-checking test of the 32-bit double-rate channel.
// Switch clock period 20, channel clock period 10, rising edges aligned.
// Phase 1 streams flits with the receiver always ready and checks one flit
// per switch cycle, a two-cycle sender-to-receiver latency and two phits
// per flit on the 32-bit wires. Phase 2 stalls both ends at random and
// checks that every flit arrives once, in order, with its type and data.
module tb_chan_link;
  import dcos_pkg::*;
  logic clk = 0, clk_ch = 1, rst_n = 0;
  always #10 clk = ~clk;
  always #5 clk_ch = ~clk_ch;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;

  chan_link dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  flit_t sent[$], rcvd[$];
  int    sent_at[$], rcvd_at[$];
  int    cyc, phits;
  bit    src_rand, dst_rand;
  int    to_send;

  always @(posedge clk_ch) if (rst_n && dut.ch_valid) phits++;

  // sender and receiver, switch clock domain
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        sent.push_back(in_flit); sent_at.push_back(cyc); to_send--;
      end
      if (out_valid && out_ready) begin
        rcvd.push_back(out_flit); rcvd_at.push_back(cyc);
      end
    end
  end
  always @(negedge clk) begin
    if (!in_valid || in_ready) begin
      in_valid = (to_send > 0) && (!src_rand || $urandom_range(0, 2) != 0);
      in_flit  = {2'($urandom), 32'($urandom), 32'($urandom)};
    end
    out_ready = !dst_rand || ($urandom_range(0, 2) == 0);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    chk(rcvd.size() == sent.size(), $sformatf("received %0d of %0d", rcvd.size(), sent.size()));
    for (int k = 0; k < sent.size() && k < rcvd.size(); k++)
      chk(rcvd[k] == sent[k], $sformatf("flit %0d", k));
  endtask

  initial begin
    in_valid = 0; in_flit = '0; out_ready = 0; cyc = 0; phits = 0;
    src_rand = 0; dst_rand = 0; to_send = 0;
    repeat (3) @(posedge clk);
    #3 rst_n = 1;
    repeat (2) @(posedge clk);
    // phase 1: full rate
    to_send = 200;
    wait (to_send == 0);
    repeat (10) @(posedge clk);
    compare();
    chk(sent_at[199] - sent_at[0] == 199, $sformatf("one flit per cycle: %0d cycles", sent_at[199] - sent_at[0]));
    for (int k = 0; k < 200 && k < rcvd_at.size(); k++)
      chk(rcvd_at[k] - sent_at[k] == 2, $sformatf("latency %0d", rcvd_at[k] - sent_at[k]));
    chk(phits == 400, $sformatf("phits %0d for 200 flits", phits));
    // phase 2: random stalls on both sides
    sent.delete(); rcvd.delete(); sent_at.delete(); rcvd_at.delete();
    src_rand = 1; dst_rand = 1;
    to_send = 3000;
    wait (to_send == 0);
    dst_rand = 0;
    repeat (20) @(posedge clk);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
