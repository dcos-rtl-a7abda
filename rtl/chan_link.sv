// chan_link: one direction of an inter-switch channel.
//
// The evaluated platform runs its switches at 250 MHz and its channels at
// 500 MHz with 32 data wires, and carries 8-byte flits. This block carries
// one flit per switch cycle over such a channel. The sender splits the flit
// into two 32-bit phits, sent on consecutive channel-clock edges. The flit
// type travels with the first phit on a 2-bit sideband. The receiver puts
// the two phits back together into a DEPTH-entry buffer. Flow control uses
// credits: the sender holds one credit per free receive-buffer entry, and
// the receiver returns one credit, for one switch cycle, whenever the
// switch takes a flit.
//
// Clocking: clk_ch must run at twice the switch clock clk, with every
// rising edge of clk on a rising edge of clk_ch. All of the link's flops
// run on clk_ch. One flop toggles on clk; comparing it with a copy taken
// on clk_ch marks the clk_ch edges that are also switch-clock edges. The
// switch-side signals (in_ready, out_valid, out_flit) change only on
// those edges, and flits are taken and handed over only on those edges,
// so the switch sees an ordinary single-clock valid/ready port.
//
// Latency: a flit accepted on switch edge t is in the receive buffer
// (out_valid) after edge t+1. A credit comes back four switch cycles after
// its flit was sent, so DEPTH = 4 keeps one flit per switch cycle.
//
// The channel width and the two clock rates follow the evaluated platform.
// The phit order, the sideband and credit flow control are this design's
// choices.
module chan_link
  import dcos_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned PHIT_W = 32
) (
  input  logic              clk,     // switch clock
  input  logic              clk_ch,  // channel clock, 2x clk, edge aligned
  input  logic              rst_n,
  // sender side (switch output)
  input  logic              in_valid,
  output logic              in_ready,
  input  flit_t             in_flit,
  // receiver side (next switch's input)
  output logic              out_valid,
  input  logic              out_ready,
  output flit_t             out_flit
);
  // the channel wires between the two ends
  logic              ch_valid;   // a phit is on ch_data
  logic              ch_first;   // it is the low half of a flit
  logic [PHIT_W-1:0] ch_data;
  ftype_e            ch_ftype;   // flit type, sent with the first phit
  logic              ch_credit;  // backward: one receive entry freed

  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // ------------------------------------------------ switch-edge detection
  logic tgl, tgl_q, sw_edge;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tgl <= 1'b0;
    else        tgl <= ~tgl;
  always_ff @(posedge clk_ch or negedge rst_n)
    if (!rst_n) tgl_q <= 1'b0;
    else        tgl_q <= tgl;
  assign sw_edge = (tgl == tgl_q);  // this clk_ch edge is also a clk edge

  // ------------------------------------------------ sender
  logic [CW-1:0]     credit;
  logic [PHIT_W-1:0] hi_q;
  logic              send_hi;
  logic              take;

  assign in_ready = (credit != '0);
  assign take     = sw_edge && in_valid && in_ready;

  always_ff @(posedge clk_ch or negedge rst_n) begin
    if (!rst_n) begin
      credit   <= CW'(DEPTH);
      hi_q     <= '0;
      send_hi  <= 1'b0;
      ch_valid <= 1'b0;
      ch_first <= 1'b0;
      ch_data  <= '0;
      ch_ftype <= F_HEAD;
    end else begin
      if (sw_edge)
        credit <= credit - CW'(take) + CW'(ch_credit);
      if (take) begin
        ch_valid <= 1'b1;
        ch_first <= 1'b1;
        ch_data  <= in_flit.data[PHIT_W-1:0];
        ch_ftype <= in_flit.ftype;
        hi_q     <= in_flit.data[2*PHIT_W-1:PHIT_W];
        send_hi  <= 1'b1;
      end else if (send_hi) begin
        ch_valid <= 1'b1;
        ch_first <= 1'b0;
        ch_data  <= hi_q;
        send_hi  <= 1'b0;
      end else begin
        ch_valid <= 1'b0;
        ch_first <= 1'b0;
      end
    end
  end

  // ------------------------------------------------ receiver
  flit_t             buf_q [DEPTH];
  logic [AW-1:0]     rd_ptr, wr_ptr;
  logic [CW-1:0]     count;
  logic [PHIT_W-1:0] lo_q;
  ftype_e            ft_q;
  logic              push, pop;

  assign push      = ch_valid && !ch_first;
  assign pop       = sw_edge && out_valid && out_ready;
  assign out_valid = (count != '0);
  assign out_flit  = buf_q[rd_ptr];

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_ch) begin
    if (ch_valid && ch_first) begin
      lo_q <= ch_data;
      ft_q <= ch_ftype;
    end
    if (push) buf_q[wr_ptr] <= '{ftype: ft_q, data: {ch_data, lo_q}};
  end

  always_ff @(posedge clk_ch or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
      ch_credit <= 1'b0;
    end else begin
      if (push) wr_ptr <= nxt(wr_ptr);
      if (pop)  rd_ptr <= nxt(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
      // a returned credit is held for one whole switch cycle
      if (sw_edge) ch_credit <= pop;
    end
  end

  assert property (@(posedge clk_ch) disable iff (!rst_n) push |-> (count < CW'(DEPTH)));
  assert property (@(posedge clk_ch) disable iff (!rst_n) take |-> !send_hi);

endmodule
