// control_plane: the out-of-band controller of the switch (CP).
//
// For each of the N segments: a primitive interface (PI), a routing
// de-multiplexer tree, a contention multiplexer tree with its CTS/CC
// generator, and a CTS/CC contention multiplexer. Leaf d of source i's
// de-multiplexer is input i of destination d's multiplexer, the full
// shuffle between the two rows of trees. An RTS from segment i opens a
// path bit by bit down its de-multiplexer, contends first come first served
// in the multiplexer of its destination, and either wins (CTS back to i and
// CC to the destination's PI in the same cycle, so that both ends of the
// crosspoint see CC together) or loses (NCTS back to i). A DC seen by a PI
// frees the destination that source holds.
//
// Interface: cp_rx_i[i]/cp_tx_o[i] are the lines between the tri-state
// switch of segment i and its PI; the four enables go to that tri-state
// switch; dst_busy_o[d] and dst_owner_o[d] show which destinations are held
// and by whom. Timing from the PI's RTS_CC primitive: the PI registers its
// RTS_EN impulse (1 cycle), the generator registers CTS (1 cycle), the PI
// registers the CTS/CC primitive (1 cycle): CTS/CC is on the line 3 cycles
// after RTS_CC was on it, NCTS likewise.
module control_plane
  import sw_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  line_t [N-1:0]               cp_rx_i,
  output line_t [N-1:0]               cp_tx_o,
  output logic  [N-1:0]               hba_cp_en_o,
  output logic  [N-1:0]               cp_hba_en_o,
  output logic  [N-1:0]               cp_pp_en_o,
  output logic  [N-1:0]               hba_pp_en_o,
  output logic  [N-1:0]               dst_busy_o,
  output logic  [N-1:0][$clog2(N)-1:0] dst_owner_o
);

  rts_fwd_t [N-1:0]         pi_fwd;
  rts_bwd_t [N-1:0]         dmx_bwd;
  rts_fwd_t [N-1:0] leaf_fwd [N];  // [source][destination]
  rts_bwd_t [N-1:0] leaf_bwd [N];  // [source][destination]
  rts_fwd_t [N-1:0] mux_fwd [N];   // [destination][source]
  rts_bwd_t [N-1:0] mux_bwd [N];   // [destination][source]
  logic     [N-1:0]         cc, cts, ncts, dst, dc;

  for (genvar s = 0; s < N; s++) begin : g_shuffle
    for (genvar d = 0; d < N; d++) begin : g_d
      assign mux_fwd[d][s]  = leaf_fwd[s][d];
      assign leaf_bwd[s][d] = mux_bwd[d][s];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_seg
    logic [N-2:0] routed_unused;

    primitive_interface #(.N(N), .IDX(i)) u_pi (
      .clk         (clk),
      .rst_n       (rst_n),
      .rx_i        (cp_rx_i[i]),
      .tx_o        (cp_tx_o[i]),
      .hba_cp_en_o (hba_cp_en_o[i]),
      .cp_hba_en_o (cp_hba_en_o[i]),
      .cp_pp_en_o  (cp_pp_en_o[i]),
      .hba_pp_en_o (hba_pp_en_o[i]),
      .fwd_o       (pi_fwd[i]),
      .cts_i       (cts[i]),
      .ncts_i      (ncts[i]),
      .dst_i       (dst[i]),
      .dc_o        (dc[i])
    );

    demux_tree #(.N(N)) u_demux (
      .clk        (clk),
      .rst_n      (rst_n),
      .fwd_i      (pi_fwd[i]),
      .bwd_o      (dmx_bwd[i]),
      .leaf_fwd_o (leaf_fwd[i]),
      .leaf_bwd_i (leaf_bwd[i]),
      .routed_o   (routed_unused)
    );

    mux_tree #(.N(N)) u_mux (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_fwd_i  (mux_fwd[i]),
      .in_bwd_o  (mux_bwd[i]),
      .release_i (dc),
      .cc_o      (cc[i]),
      .busy_o    (dst_busy_o[i]),
      .owner_o   (dst_owner_o[i])
    );

    cts_cc_mux u_ccmux (
      .clk      (clk),
      .rst_n    (rst_n),
      .src_i    (dmx_bwd[i]),
      .dst_cc_i (cc[i]),
      .cts_o    (cts[i]),
      .ncts_o   (ncts[i]),
      .dst_o    (dst[i])
    );
  end

endmodule
