// cross_point: one crosspoint (ISA, DSA) of the cross bar switch, for one
// wire pair, with its control logic (primitive sensor and ON/OFF logic).
//
// The crosspoint joins segment A and segment B in full duplex when closed.
// It closes when a connect command (CC) arrives on both segments in the
// same cycle with the same tag, and opens when a disconnect command (DC)
// appears on either segment; a DC in the same cycle as a CC pair wins. The
// analog pi-switch is reduced to its digital effect: when ON each segment
// receives the other's line in the same cycle; when OFF each receives an
// idle line (the segment is terminated by the shunt transistors).
//
// Interface: a_i/b_i are the lines entering the physical plane on the two
// segments, a_o/b_o what the crosspoint passes back to them, on_o the
// switch state (the "EN" of the design's functional test). Timing: on_o
// changes on the clock edge after the CC pair or the DC.
module cross_point
  import sw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pair_line_t a_i,
  input  pair_line_t b_i,
  output pair_line_t a_o,
  output pair_line_t b_o,
  output logic       on_o
);

  logic cc_pair, dc_seen, on_q;

  // Primitive sensor: two CC detectors (one per segment) and a DC detector.
  assign cc_pair = (a_i.prim == P_CTS) && (b_i.prim == P_CTS) && (a_i.tag == b_i.tag);
  assign dc_seen = (a_i.prim == P_NCTS) || (b_i.prim == P_NCTS);

  // ON/OFF logic.
  always_ff @(posedge clk) begin
    if (!rst_n)
      on_q <= 1'b0;
    else if (dc_seen)
      on_q <= 1'b0;
    else if (cc_pair)
      on_q <= 1'b1;
  end

  assign on_o = on_q;
  assign a_o  = on_q ? b_i : PAIR_IDLE;
  assign b_o  = on_q ? a_i : PAIR_IDLE;

endmodule
