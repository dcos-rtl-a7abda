// crossbar: flit crossbar of the DCOS switch.
//
// conn[o][i] connects input i to output o. Each output carries the flit
// and valid of the input connected to it; each input sees the ready of the
// output it is connected to. The switch allocator keeps conn one-hot per
// output and per input. Purely combinational.
module crossbar
  import dcos_pkg::*;
#(
  parameter int unsigned NI = NUM_PORTS,
  parameter int unsigned NO = NUM_PORTS
) (
  input  logic [NO-1:0][NI-1:0] conn,
  input  logic  [NI-1:0]        in_valid,
  input  flit_t [NI-1:0]        in_flit,
  output logic  [NI-1:0]        in_ready,
  output logic  [NO-1:0]        out_valid,
  output flit_t [NO-1:0]        out_flit,
  input  logic  [NO-1:0]        out_ready
);
  always_comb begin
    out_valid = '0;
    out_flit  = '0;
    in_ready  = '0;
    for (int unsigned o = 0; o < NO; o++) begin
      for (int unsigned i = 0; i < NI; i++) begin
        if (conn[o][i]) begin
          out_valid[o] = out_valid[o] | in_valid[i];
          out_flit[o]  = out_flit[o] | in_flit[i];
          in_ready[i]  = in_ready[i] | out_ready[o];
        end
      end
    end
  end
endmodule
