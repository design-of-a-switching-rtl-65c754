// cts_cc_mux: multiplexer for CTS/CC contention resolution, one per segment,
// between the contention network and the segment's primitive interface.
//
// Two kinds of impulse can head for the same segment: CTS or NCTS coming
// back through the segment's own de-multiplexer (the segment is a source),
// and CC from the segment's own CTS/CC generator (the segment is a
// destination). Only one can be sent at a time, so they are passed on first
// come, first served. When both arrive in the same cycle the source's
// CTS/NCTS goes first (a choice of this RTL) and the other is held for one
// cycle; an event that had to wait goes ahead of anything new. One holding
// place per kind is enough, since a kind cannot repeat on consecutive
// cycles.
//
// Interface: src_i (CTS/NCTS from the de-multiplexer root), dst_cc_i (CC
// impulse), outputs cts_o / ncts_o and dst_o (1: the CTS/CC is a connect
// command for this segment as destination). Combinational when there is no
// contention; a held event leaves one cycle late.
module cts_cc_mux
  import sw_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  rts_bwd_t src_i,
  input  logic     dst_cc_i,
  output logic     cts_o,
  output logic     ncts_o,
  output logic     dst_o
);

  rts_bwd_t held_src_q, held_src_d;
  logic     held_dst_q, held_dst_d;
  logic     new_src, held_src;

  assign new_src  = src_i.cts || src_i.ncts;
  assign held_src = held_src_q.cts || held_src_q.ncts;

  always_comb begin
    cts_o      = 1'b0;
    ncts_o     = 1'b0;
    dst_o      = 1'b0;
    held_src_d = held_src_q;
    held_dst_d = held_dst_q;
    if (held_src) begin
      {cts_o, ncts_o} = {held_src_q.cts, held_src_q.ncts};
      held_src_d      = '0;
      held_dst_d      = held_dst_q || dst_cc_i;
    end else if (held_dst_q) begin
      cts_o      = 1'b1;
      dst_o      = 1'b1;
      held_dst_d = dst_cc_i;
      held_src_d = src_i;
    end else if (new_src) begin
      {cts_o, ncts_o} = {src_i.cts, src_i.ncts};
      held_dst_d      = dst_cc_i;
    end else if (dst_cc_i) begin
      cts_o = 1'b1;
      dst_o = 1'b1;
    end
    if (held_src && new_src)
      held_src_d = src_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_src_q <= '0;
      held_dst_q <= 1'b0;
    end else begin
      held_src_q <= held_src_d;
      held_dst_q <= held_dst_d;
    end
  end

  a_cts_xor_ncts: assert property (@(posedge clk) disable iff (!rst_n)
    !(src_i.cts && src_i.ncts));

endmodule
