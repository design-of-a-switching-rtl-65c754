// switch_plane: top level of the 10GBASE-T circuit switch (Switch Plane).
//
// N host segments (CAT6a cables, four wire pairs each) meet the switch at
// one tri-state switch each. The control plane decodes the RTS primitives
// hosts send and answers CTS or NCTS; on CTS it also sends CC on both the
// source and the destination segment into the physical planes, which
// closes the crosspoint joining them. From then on the hosts' Ethernet
// symbols pass through the crosspoint unbuffered in both directions, until
// the source sends DC, which opens the crosspoint and frees the destination
// in the control plane. There is one physical plane per wire pair; the
// control primitives travel on all four pairs, so each plane sets its own
// crosspoints, and the primitive seen by the hosts is taken from pair DA.
//
// Interface: hba_rx_i[s] is what host s sends (one line_t per cycle),
// hba_tx_o[s] what it receives; xp_on_o is the crosspoint state of the DA
// plane; dst_busy_o shows destinations held in the control plane. A single
// clock and an active-low synchronous reset drive all state.
module switch_plane
  import sw_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  line_t [N-1:0]                hba_rx_i,
  output line_t [N-1:0]                hba_tx_o,
  output logic  [N-1:0][N-1:0]         xp_on_o,
  output logic  [N-1:0]                dst_busy_o
);

  line_t [N-1:0] to_cp, from_cp, to_pp, from_pp;
  logic  [N-1:0] hba_cp_en, cp_hba_en, cp_pp_en, hba_pp_en;
  logic  [N-1:0][$clog2(N)-1:0] owner_unused;

  pair_line_t [NPAIR-1:0][N-1:0]         pp_in, pp_out;
  logic       [NPAIR-1:0][N-1:0][N-1:0]  pp_on;

  for (genvar s = 0; s < N; s++) begin : g_seg
    tristate_switch u_tss (
      .from_hba_i  (hba_rx_i[s]),
      .to_hba_o    (hba_tx_o[s]),
      .to_cp_o     (to_cp[s]),
      .from_cp_i   (from_cp[s]),
      .to_pp_o     (to_pp[s]),
      .from_pp_i   (from_pp[s]),
      .hba_pp_en_i (hba_pp_en[s]),
      .hba_cp_en_i (hba_cp_en[s]),
      .cp_hba_en_i (cp_hba_en[s]),
      .cp_pp_en_i  (cp_pp_en[s])
    );

    // Split the segment into its pairs and join them again.
    for (genvar p = 0; p < NPAIR; p++) begin : g_pair
      assign pp_in[p][s] = '{prim: to_pp[s].prim, tag: to_pp[s].tag, sym: to_pp[s].sym[p]};
      assign from_pp[s].sym[p] = pp_out[p][s].sym;
    end
    assign from_pp[s].prim = pp_out[0][s].prim;
    assign from_pp[s].tag  = pp_out[0][s].tag;
  end

  control_plane #(.N(N)) u_cp (
    .clk         (clk),
    .rst_n       (rst_n),
    .cp_rx_i     (to_cp),
    .cp_tx_o     (from_cp),
    .hba_cp_en_o (hba_cp_en),
    .cp_hba_en_o (cp_hba_en),
    .cp_pp_en_o  (cp_pp_en),
    .hba_pp_en_o (hba_pp_en),
    .dst_busy_o  (dst_busy_o),
    .dst_owner_o (owner_unused)
  );

  for (genvar p = 0; p < NPAIR; p++) begin : g_plane
    physical_plane #(.N(N)) u_pp (
      .clk   (clk),
      .rst_n (rst_n),
      .seg_i (pp_in[p]),
      .seg_o (pp_out[p]),
      .on_o  (pp_on[p])
    );
  end

  assign xp_on_o = pp_on[0];

endmodule
