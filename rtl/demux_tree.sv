// demux_tree: de-multiplexer for routing, one per source segment (ISA).
//
// A binary tree of N-1 demux_node levels. The root takes the most
// significant bit of the destination segment address (DSA), each following
// level the next bit, so after log2(N) address impulses a path is open from
// the source's primitive interface to leaf output DSA. Later impulses
// (RTS_CR, RTS_CC) travel that path to the contention multiplexer of the
// DSA; CTS or NCTS travel back along it and reset each node they pass.
//
// Nodes are numbered in heap order: node k feeds positions 2k+1 and 2k+2;
// positions N-1 .. 2N-2 are the leaf outputs 0 .. N-1, so the leaf index is
// the address read most significant bit first.
//
// Interface: fwd_i/bwd_o to the primitive interface; leaf_fwd_o[d] and
// leaf_bwd_i[d] to the multiplexer of DSA d. routed_o shows which nodes hold
// a route (for observation). N must be a power of two, at least 2.
module demux_tree
  import sw_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  rts_fwd_t            fwd_i,
  output rts_bwd_t            bwd_o,
  output rts_fwd_t [N-1:0]    leaf_fwd_o,
  input  rts_bwd_t [N-1:0]    leaf_bwd_i,
  output logic     [N-2:0]    routed_o
);

  // Position p of the heap: 0 .. N-2 are nodes, N-1 .. 2N-2 are leaves.
  rts_fwd_t pos_fwd [2*N-1];
  rts_bwd_t pos_bwd [2*N-1];

  assign pos_fwd[0] = fwd_i;
  assign bwd_o      = pos_bwd[0];

  for (genvar k = 0; k < N - 1; k++) begin : g_node
    rts_fwd_t [1:0] ofwd;
    rts_bwd_t [1:0] obwd;
    assign obwd[0] = pos_bwd[2*k+1];
    assign obwd[1] = pos_bwd[2*k+2];
    assign pos_fwd[2*k+1] = ofwd[0];
    assign pos_fwd[2*k+2] = ofwd[1];
    demux_node u_node (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_fwd_i  (pos_fwd[k]),
      .in_bwd_o  (pos_bwd[k]),
      .out_fwd_o (ofwd),
      .out_bwd_i (obwd),
      .routed_o  (routed_o[k])
    );
  end

  for (genvar d = 0; d < N; d++) begin : g_leaf
    assign leaf_fwd_o[d]       = pos_fwd[N-1+d];
    assign pos_bwd[N-1+d]      = leaf_bwd_i[d];
  end

  initial assert (N >= 2 && (N & (N - 1)) == 0)
    else $error("demux_tree: N must be a power of two");

endmodule
