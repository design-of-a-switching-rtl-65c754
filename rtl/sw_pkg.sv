// sw_pkg: types and constants shared by the 10GBASE-T circuit-switching
// fabric (switch plane, control plane, physical plane).
//
// Each cable segment is modelled as a digital "line": in one clock cycle it
// carries either nothing, one control primitive, or one PAM16 symbol on each
// of the four wire pairs. The analog pulse shapes of the primitives (2.5 V
// swing, three levels on DA+/DA-) are replaced by an enumerated code; the
// codes follow the waveform table of the design, where RTS_DSA0, RTS_CR and
// RTS_CC share one waveform, CTS and CC share one, and NCTS and DC share one.
// A tag field distinguishes connection commands of different connections
// (the "CC and CC'" of the design), so that two crosspoints closed in the
// same cycle cannot close a third one by accident.
package sw_pkg;

  // Four twisted pairs (DA, DB, DC, DD) per CAT6a cable.
  localparam int unsigned NPAIR = 4;
  // PAM16 symbols: 4 bits per pair per symbol period.
  localparam int unsigned SYM_W = 4;
  // Width of the connection tag; holds any segment address up to 256 ports.
  localparam int unsigned TAG_W = 8;

  typedef enum logic [2:0] {
    P_IDLE = 3'd0,  // line quiet
    P_SOF  = 3'd1,  // RTS_SOF
    P_DSA0 = 3'd2,  // RTS_DSA0, also RTS_CR and RTS_CC (same waveform)
    P_DSA1 = 3'd3,  // RTS_DSA1
    P_EOF  = 3'd4,  // RTS_EOF
    P_CTS  = 3'd5,  // CTS towards an HBA, CC towards the physical plane
    P_NCTS = 3'd6,  // NCTS towards an HBA, DC towards the physical plane
    P_DATA = 3'd7   // Ethernet symbols on all four pairs
  } prim_t;

  typedef logic [SYM_W-1:0] sym_t;

  // One segment line, all four pairs.
  typedef struct packed {
    prim_t                  prim;
    logic [TAG_W-1:0]       tag;
    sym_t [NPAIR-1:0]       sym;
  } line_t;

  // One segment line as seen by a single physical plane (one pair).
  typedef struct packed {
    prim_t            prim;
    logic [TAG_W-1:0] tag;
    sym_t             sym;
  } pair_line_t;

  // Impulses travelling from a primitive interface towards the DSA
  // (through the de-multiplexer and the contention multiplexer).
  typedef struct packed {
    logic dsa0;  // RTS_DSA0: next address bit is 0
    logic dsa1;  // RTS_DSA1: next address bit is 1
    logic en;    // RTS_EN: RTS_CR or RTS_CC impulse
  } rts_fwd_t;

  // Impulses travelling back towards the source interface.
  typedef struct packed {
    logic cts;   // CTS/CC
    logic ncts;  // NCTS/DC
  } rts_bwd_t;

  localparam line_t      LINE_IDLE = '{prim: P_IDLE, tag: '0, sym: '0};
  localparam pair_line_t PAIR_IDLE = '{prim: P_IDLE, tag: '0, sym: '0};

endpackage
