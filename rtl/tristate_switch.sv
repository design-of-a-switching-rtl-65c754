// tristate_switch: connects one segment's HBA cable, the control plane (CP)
// and the physical plane (PP).
//
// Three paths, each with its enable: an HBA-PP switch (HBA_PP_EN) that
// carries the Ethernet signal in both directions, a bidirectional HBA-CP
// buffer (HBA_CP_EN: HBA to CP, CP_HBA_EN: CP to HBA) for primitives, and a
// one-way CP-PP buffer (CP_PP_EN) that lets the CP put CC/DC primitives on
// the segment inside the physical plane. The bidirectional analog wires
// are split here into one line per direction; a closed path copies its
// line, an open one delivers an idle line. Towards the HBA the CP has
// priority over the PP; towards the PP the CP buffer has priority over the
// HBA switch. The primitive interface never enables both drivers of one
// line at once, which an assertion checks.
//
// Interface: from_hba_i/to_hba_o, to_cp_o/from_cp_i, to_pp_o/from_pp_i and
// the four enables. Purely combinational.
module tristate_switch
  import sw_pkg::*;
(
  input  line_t from_hba_i,
  output line_t to_hba_o,
  output line_t to_cp_o,
  input  line_t from_cp_i,
  output line_t to_pp_o,
  input  line_t from_pp_i,
  input  logic  hba_pp_en_i,
  input  logic  hba_cp_en_i,
  input  logic  cp_hba_en_i,
  input  logic  cp_pp_en_i
);

  always_comb begin
    to_cp_o  = hba_cp_en_i ? from_hba_i : LINE_IDLE;

    if (cp_pp_en_i)
      to_pp_o = from_cp_i;
    else if (hba_pp_en_i)
      to_pp_o = from_hba_i;
    else
      to_pp_o = LINE_IDLE;

    if (cp_hba_en_i)
      to_hba_o = from_cp_i;
    else if (hba_pp_en_i)
      to_hba_o = from_pp_i;
    else
      to_hba_o = LINE_IDLE;
  end

  always_comb begin
    a_one_pp_driver: assert (!(cp_pp_en_i && hba_pp_en_i));
  end

endmodule
