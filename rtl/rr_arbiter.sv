// rr_arbiter: round-robin arbiter for one switch output.
//
// Grants one of N requesters, searching from the position after the last
// requester served. grant is combinational from req; the priority pointer
// moves only when the caller signals that the granted request was taken
// (advance), so a grant that is not used keeps its priority. The source
// design names an arbiter fed by the directory controller; round-robin is
// this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;
  logic [W-1:0] ptr;   // highest-priority requester
  logic [W-1:0] gidx;

  always_comb begin
    grant = '0;
    gidx  = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (req[i] && grant == '0) begin
        grant[i] = 1'b1;
        gidx     = W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && grant != '0)
      ptr <= (gidx == W'(N - 1)) ? '0 : gidx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
