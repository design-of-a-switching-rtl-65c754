// primitive_interface: the control plane's port to one segment (PI).
//
// Receive side: the PI watches the segment line coming from its HBA through
// the tri-state switch. An RTS is the sequence RTS_SOF, log2(N) address
// primitives RTS_DSA0/RTS_DSA1 (most significant bit first), RTS_CR,
// RTS_CC and RTS_EOF. RTS_SOF enables the PI; each address primitive
// becomes an RTS_DSA0 or RTS_DSA1 impulse and RTS_CR and RTS_CC each an
// RTS_EN impulse towards the routing de-multiplexer; RTS_EOF disables the
// PI again. RTS_CR and RTS_CC share the RTS_DSA0 waveform, so the PI tells
// them apart by their place in the frame. A DC from the HBA while no RTS is
// open becomes a one-cycle dc_o impulse, which frees the destination held
// for this source in the contention multiplexers.
//
// Send side: a CTS/CC or NCTS impulse from the CTS/CC multiplexer is sent
// for one cycle on the line towards the tri-state switch. During that cycle
// CP_HBA_EN and CP_PP_EN are high and HBA_CP_EN is low, so the primitive
// reaches both the HBA and the physical plane (as CC or DC), as in the
// design's simulated PI waveforms. HBA_PP_EN, which the design shows on the
// tri-state switch but does not assign to a driver, is driven here as the
// complement of CP_PP_EN. A CC carries a tag equal to the destination
// address: the address this PI decoded when it is the source, its own
// address IDX when it is the destination.
//
// Timing: every output is registered; an impulse appears one cycle after
// the primitive or impulse that caused it.
//
// The PI handles primitives only: it ignores the symbol and tag fields of
// rx_i, drives tx_o.sym as zero and uses only the low log2(N) tag bits, so
// synthesis finds those output bits constant.
module primitive_interface
  import sw_pkg::*;
#(
  parameter int unsigned N   = 4,
  parameter int unsigned IDX = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  line_t    rx_i,
  output line_t    tx_o,
  output logic     hba_cp_en_o,
  output logic     cp_hba_en_o,
  output logic     cp_pp_en_o,
  output logic     hba_pp_en_o,
  output rts_fwd_t fwd_o,
  input  logic     cts_i,
  input  logic     ncts_i,
  input  logic     dst_i,
  output logic     dc_o
);

  localparam int unsigned AW = $clog2(N);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_CR, S_CC, S_WAIT} pi_state_t;

  pi_state_t      state_q, state_d;
  logic [AW-1:0]  dsa_q, dsa_d;
  logic [AW-1:0]  bit_q, bit_d;
  rts_fwd_t       fwd_d;
  logic           dc_d;
  line_t          tx_d;
  logic           drive_d, drive_q;

  always_comb begin
    state_d = state_q;
    dsa_d   = dsa_q;
    bit_d   = bit_q;
    fwd_d   = '0;
    dc_d    = 1'b0;
    if (rx_i.prim == P_SOF) begin
      state_d = S_ADDR;
      bit_d   = '0;
    end else if (rx_i.prim == P_EOF) begin
      state_d = S_IDLE;
    end else begin
      unique case (state_q)
        S_IDLE: dc_d = (rx_i.prim == P_NCTS);
        S_ADDR:
          if (rx_i.prim == P_DSA0 || rx_i.prim == P_DSA1) begin
            fwd_d.dsa0 = (rx_i.prim == P_DSA0);
            fwd_d.dsa1 = (rx_i.prim == P_DSA1);
            dsa_d      = (dsa_q << 1) | AW'(rx_i.prim == P_DSA1);
            bit_d      = bit_q + 1'b1;
            if (bit_q == AW'(AW - 1))
              state_d = S_CR;
          end
        S_CR:
          if (rx_i.prim == P_DSA0) begin
            fwd_d.en = 1'b1;
            state_d  = S_CC;
          end
        S_CC:
          if (rx_i.prim == P_DSA0) begin
            fwd_d.en = 1'b1;
            state_d  = S_WAIT;
          end
        S_WAIT: ;
        default: state_d = S_IDLE;
      endcase
    end

    tx_d    = LINE_IDLE;
    drive_d = 1'b0;
    if (cts_i) begin
      tx_d.prim = P_CTS;
      tx_d.tag  = TAG_W'(dst_i ? AW'(IDX) : dsa_q);
      drive_d   = 1'b1;
    end else if (ncts_i) begin
      tx_d.prim = P_NCTS;
      drive_d   = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      dsa_q   <= '0;
      bit_q   <= '0;
      fwd_o   <= '0;
      dc_o    <= 1'b0;
      tx_o    <= LINE_IDLE;
      drive_q <= 1'b0;
    end else begin
      state_q <= state_d;
      dsa_q   <= dsa_d;
      bit_q   <= bit_d;
      fwd_o   <= fwd_d;
      dc_o    <= dc_d;
      tx_o    <= tx_d;
      drive_q <= drive_d;
    end
  end

  assign hba_cp_en_o = !drive_q;
  assign cp_hba_en_o = drive_q;
  assign cp_pp_en_o  = drive_q;
  assign hba_pp_en_o = !drive_q;

  initial assert (N >= 2 && (N & (N - 1)) == 0 && IDX < N)
    else $error("primitive_interface: N must be a power of two and IDX < N");

endmodule
