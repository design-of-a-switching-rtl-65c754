// mux_tree: multiplexer for contention resolution and NCTS generation, with
// the CTS/CC generator at its bottom; one per destination segment (DSA).
//
// Input i is the de-multiplexer leaf of source segment i addressed to this
// DSA. A binary tree of N-1 cr_node contention resolvers (heap order, node k
// fed by positions 2k+1 and 2k+2, positions N-1 .. 2N-2 being inputs
// 0 .. N-1) lets one RTS through, first come first served, and sends NCTS
// back to every loser. An RTS reaching the bottom has won: its RTS_CR
// impulse arms the CTS/CC generator and its RTS_CC impulse fires it. The
// generator's impulse goes back up the winning path as CTS (to the source)
// and out on cc_o (to this DSA's own primitive interface, which sends CC on
// the destination segment). The resolvers keep the path after CTS, which
// marks the destination busy; when the source that holds it disconnects
// (release_i[source]), the nodes on its path are cleared.
//
// Interface: in_fwd_i[i]/in_bwd_o[i] per source; release_i[i] one-cycle
// disconnect impulse per source; cc_o one-cycle CC impulse; busy_o and
// owner_o give the holder of the destination. Timing: CTS/CC appears one
// cycle after the RTS_CC impulse reaches the bottom; NCTS one cycle after a
// loser's RTS_CC reaches the node where it lost.
module mux_tree
  import sw_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rts_fwd_t [N-1:0]     in_fwd_i,
  output rts_bwd_t [N-1:0]     in_bwd_o,
  input  logic     [N-1:0]     release_i,
  output logic                 cc_o,
  output logic                 busy_o,
  output logic [$clog2(N)-1:0] owner_o
);

  localparam int unsigned AW = $clog2(N);

  rts_fwd_t pos_fwd [2*N-1];
  rts_bwd_t pos_bwd [2*N-1];
  logic     [N-2:0]   conn_valid, conn_sel, node_release;
  logic [N-2:0][AW-1:0] conn_src;

  // Source segment held by each node: follow the selected child down to a
  // leaf position. Children have larger indices, so walk from the last node.
  always_comb begin
    conn_src = '0;
    for (int k = N - 2; k >= 0; k--) begin
      int unsigned c;
      c = 2 * k + 1 + int'(conn_sel[k]);
      if (c >= N - 1)
        conn_src[k] = AW'(c - (N - 1));
      else
        conn_src[k] = conn_src[c];
    end
    for (int k = 0; k < N - 1; k++)
      node_release[k] = conn_valid[k] && release_i[conn_src[k]];
  end

  for (genvar i = 0; i < N; i++) begin : g_in
    assign pos_fwd[N-1+i] = in_fwd_i[i];
    assign in_bwd_o[i]    = pos_bwd[N-1+i];
  end

  for (genvar k = 0; k < N - 1; k++) begin : g_node
    rts_fwd_t [1:0] ifwd;
    rts_bwd_t [1:0] ibwd;
    assign ifwd[0] = pos_fwd[2*k+1];
    assign ifwd[1] = pos_fwd[2*k+2];
    assign pos_bwd[2*k+1] = ibwd[0];
    assign pos_bwd[2*k+2] = ibwd[1];
    cr_node u_cr (
      .clk          (clk),
      .rst_n        (rst_n),
      .release_i    (node_release[k]),
      .in_fwd_i     (ifwd),
      .in_bwd_o     (ibwd),
      .out_fwd_o    (pos_fwd[k]),
      .out_bwd_i    (pos_bwd[k]),
      .conn_valid_o (conn_valid[k]),
      .conn_sel_o   (conn_sel[k])
    );
  end

  // CTS/CC generator at the bottom of the tree.
  logic armed_q, cts_trig, cts_pulse;

  always_ff @(posedge clk) begin
    if (!rst_n)
      armed_q <= 1'b0;
    else if (node_release[0])
      armed_q <= 1'b0;
    else if (pos_fwd[0].en)
      armed_q <= !armed_q;
  end

  assign cts_trig = pos_fwd[0].en && armed_q;

  pulse_gen #(.WIDTH(1)) u_cts_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .trig_i  (cts_trig),
    .pulse_o (cts_pulse)
  );

  assign pos_bwd[0] = '{cts: cts_pulse, ncts: 1'b0};
  assign cc_o       = cts_pulse;
  assign busy_o     = conn_valid[0];
  assign owner_o    = conn_src[0];

  initial assert (N >= 2 && (N & (N - 1)) == 0)
    else $error("mux_tree: N must be a power of two");

endmodule
