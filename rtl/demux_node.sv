// demux_node: one level of the routing de-multiplexer.
//
// Three buffer switches and an arbiter. While the node is idle the incoming
// impulses go to the arbiter (the middle switch). The first address impulse
// to arrive, RTS_DSA0 or RTS_DSA1, is consumed and sets the route: output 0
// (top switch) for RTS_DSA0, output 1 (bottom switch) for RTS_DSA1. Every
// later impulse is passed on to that output in the same cycle, and CTS/NCTS
// impulses coming back from that output are passed back to the input. A
// returning CTS or NCTS resets the node to idle, as the design specifies.
//
// Interface: in_fwd_i/in_bwd_o towards the primitive interface, out_fwd_o/
// out_bwd_i towards the two next-level nodes. Forward and backward paths
// are combinational through a set route (the buffer switches are wires);
// the route itself is a register that changes on the clock edge.
module demux_node
  import sw_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  rts_fwd_t           in_fwd_i,
  output rts_bwd_t           in_bwd_o,
  output rts_fwd_t [1:0]     out_fwd_o,
  input  rts_bwd_t [1:0]     out_bwd_i,
  output logic               routed_o
);

  logic route_valid_q, route_sel_q;
  logic route_valid_d, route_sel_d;

  always_comb begin
    out_fwd_o     = '0;
    in_bwd_o      = '0;
    route_valid_d = route_valid_q;
    route_sel_d   = route_sel_q;
    if (!route_valid_q) begin
      // The arbiter takes the first address impulse.
      if (in_fwd_i.dsa0 || in_fwd_i.dsa1) begin
        route_valid_d = 1'b1;
        route_sel_d   = in_fwd_i.dsa1;
      end
    end else begin
      out_fwd_o[route_sel_q] = in_fwd_i;
      in_bwd_o               = out_bwd_i[route_sel_q];
      if (out_bwd_i[route_sel_q].cts || out_bwd_i[route_sel_q].ncts)
        route_valid_d = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      route_valid_q <= 1'b0;
      route_sel_q   <= 1'b0;
    end else begin
      route_valid_q <= route_valid_d;
      route_sel_q   <= route_sel_d;
    end
  end

  assign routed_o = route_valid_q;

  // An address impulse is either a 0 or a 1, never both.
  a_one_address_bit: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_fwd_i.dsa0 && in_fwd_i.dsa1));

endmodule
