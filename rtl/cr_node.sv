// cr_node: contention resolver (CR), one node of the contention multiplexer.
//
// Two inputs, one output. The node's state is its connection: idle, or
// connected to input 0 or 1. An RTS_EN impulse arriving while the node is
// idle connects that input and passes on in the same cycle; if both inputs
// arrive in the same cycle, input 0 wins (the tie rule is a choice of this
// RTL; the design only says first come, first served). An impulse arriving
// on the other input while the node is connected loses: that input is
// marked as a loser and routed to the node's NCTS generator, so its next
// impulse (RTS_CC) fires an NCTS back to it one cycle later.
//
// The connected input's impulses pass to the output, and CTS/NCTS coming
// back from the output pass to it. A returning NCTS clears the connection
// (the RTS lost further down). A returning CTS does not: the connection is
// held, so later requests for the same destination lose here, until
// release_i (the disconnect of the connected source) clears it.
//
// Interface: in_fwd_i/in_bwd_o to the two upper nodes or de-multiplexer
// leaves, out_fwd_o/out_bwd_i to the next level. conn_valid_o/conn_sel_o
// expose the state so the tree can tell which source holds it.
module cr_node
  import sw_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           release_i,
  input  rts_fwd_t [1:0] in_fwd_i,
  output rts_bwd_t [1:0] in_bwd_o,
  output rts_fwd_t       out_fwd_o,
  input  rts_bwd_t       out_bwd_i,
  output logic           conn_valid_o,
  output logic           conn_sel_o
);

  logic       conn_q, conn_d;
  logic       sel_q, sel_d;
  logic [1:0] loser_q, loser_d;
  logic [1:0] ncts_trig, ncts_pulse, eligible;

  always_comb begin
    out_fwd_o = '0;
    in_bwd_o  = '0;
    conn_d    = conn_q;
    sel_d     = sel_q;
    loser_d   = loser_q;
    ncts_trig = '0;

    // A marked loser's next impulse goes to the NCTS generator.
    for (int j = 0; j < 2; j++) begin
      eligible[j] = in_fwd_i[j].en && !loser_q[j];
      if (in_fwd_i[j].en && loser_q[j]) begin
        ncts_trig[j] = 1'b1;
        loser_d[j]   = 1'b0;
      end
    end

    if (conn_q) begin
      out_fwd_o       = in_fwd_i[sel_q];
      in_bwd_o[sel_q] = out_bwd_i;
      if (out_bwd_i.ncts)
        conn_d = 1'b0;
      if (eligible[!sel_q])
        loser_d[!sel_q] = 1'b1;
    end else if (eligible[0]) begin
      conn_d       = 1'b1;
      sel_d        = 1'b0;
      out_fwd_o    = in_fwd_i[0];
      if (eligible[1])
        loser_d[1] = 1'b1;
    end else if (eligible[1]) begin
      conn_d    = 1'b1;
      sel_d     = 1'b1;
      out_fwd_o = in_fwd_i[1];
    end

    if (release_i) begin
      conn_d  = 1'b0;
    end

    for (int j = 0; j < 2; j++)
      in_bwd_o[j].ncts = in_bwd_o[j].ncts | ncts_pulse[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      conn_q  <= 1'b0;
      sel_q   <= 1'b0;
      loser_q <= '0;
    end else begin
      conn_q  <= conn_d;
      sel_q   <= sel_d;
      loser_q <= loser_d;
    end
  end

  for (genvar j = 0; j < 2; j++) begin : g_ncts
    pulse_gen #(.WIDTH(1)) u_ncts_gen (
      .clk     (clk),
      .rst_n   (rst_n),
      .trig_i  (ncts_trig[j]),
      .pulse_o (ncts_pulse[j])
    );
  end

  assign conn_valid_o = conn_q;
  assign conn_sel_o   = sel_q;

endmodule
