// tb_primitive_interface: a PI of an 8-segment switch (IDX = 5).
// Sends RTS frames for every destination, with idle cycles and Ethernet
// symbols mixed in at random, and checks the impulses towards the
// de-multiplexer one cycle after each primitive: one RTS_DSA0/RTS_DSA1 per
// address bit (most significant first), then RTS_EN for RTS_CR and for
// RTS_CC, nothing for RTS_EOF or for primitives outside a frame. Checks
// that CTS/CC and NCTS impulses become one-cycle primitives on the line
// with the right tag and the enables of the tri-state switch set for that
// cycle only, and that a DC outside a frame gives a dc_o impulse.
module tb_primitive_interface;
  import sw_pkg::*;

  localparam int unsigned N   = 8;
  localparam int unsigned AW  = $clog2(N);
  localparam int unsigned IDX = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  line_t    rx, tx;
  logic     hba_cp_en, cp_hba_en, cp_pp_en, hba_pp_en;
  rts_fwd_t fwd;
  logic     cts, ncts, dst, dc;
  int checks = 0, failures = 0;

  primitive_interface #(.N(N), .IDX(IDX)) dut (
    .clk(clk), .rst_n(rst_n), .rx_i(rx), .tx_o(tx),
    .hba_cp_en_o(hba_cp_en), .cp_hba_en_o(cp_hba_en), .cp_pp_en_o(cp_pp_en), .hba_pp_en_o(hba_pp_en),
    .fwd_o(fwd), .cts_i(cts), .ncts_i(ncts), .dst_i(dst), .dc_o(dc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // Put one primitive on the line for a cycle; check the impulse it causes.
  task automatic put(input prim_t p, input rts_fwd_t want_fwd, input bit want_dc);
    rx = '{prim: p, tag: '0, sym: '0};
    @(posedge clk); #1;
    rx = LINE_IDLE;
    check(fwd == want_fwd, $sformatf("impulse after %s: got %b want %b", p.name(), fwd, want_fwd));
    check(dc == want_dc, $sformatf("dc after %s", p.name()));
  endtask

  task automatic noise();
    // Idle cycles or Ethernet symbols inside or between frames change nothing.
    int n;
    n = int'($urandom % 3);
    for (int k = 0; k < n; k++) put(($urandom % 2) ? P_IDLE : P_DATA, '0, 1'b0);
  endtask

  task automatic respond(input bit is_cts, input bit is_dst, input int unsigned want_tag);
    cts = is_cts; ncts = !is_cts; dst = is_dst;
    @(posedge clk); #1;
    cts = 0; ncts = 0; dst = 0;
    check(tx.prim == (is_cts ? P_CTS : P_NCTS), "response primitive");
    if (is_cts) check(tx.tag == TAG_W'(want_tag), $sformatf("tag %0d want %0d", tx.tag, want_tag));
    check(!hba_cp_en && cp_hba_en && cp_pp_en && !hba_pp_en, "enables while driving");
    @(posedge clk); #1;
    check(tx.prim == P_IDLE, "response lasts one cycle");
    check(hba_cp_en && !cp_hba_en && !cp_pp_en && hba_pp_en, "enables at rest");
  endtask

  localparam rts_fwd_t F0 = '{dsa0: 1'b1, dsa1: 1'b0, en: 1'b0};
  localparam rts_fwd_t F1 = '{dsa0: 1'b0, dsa1: 1'b1, en: 1'b0};
  localparam rts_fwd_t FE = '{dsa0: 1'b0, dsa1: 1'b0, en: 1'b1};

  initial begin
    rx = LINE_IDLE; cts = 0; ncts = 0; dst = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(hba_cp_en && !cp_hba_en && !cp_pp_en && hba_pp_en, "enables after reset");
    // Outside a frame, address primitives are ignored and DC is reported.
    put(P_DSA1, '0, 1'b0);
    put(P_DSA0, '0, 1'b0);
    put(P_NCTS, '0, 1'b1);
    for (int rep = 0; rep < 3; rep++) begin
      for (int d = 0; d < int'(N); d++) begin
        put(P_SOF, '0, 1'b0);
        noise();
        for (int b = int'(AW) - 1; b >= 0; b--) begin
          put(d[b] ? P_DSA1 : P_DSA0, d[b] ? F1 : F0, 1'b0);
          noise();
        end
        put(P_DSA0, FE, 1'b0);  // RTS_CR
        noise();
        put(P_DSA0, FE, 1'b0);  // RTS_CC
        put(P_NCTS, '0, 1'b0);  // a DC inside a frame is not a disconnect
        put(P_EOF, '0, 1'b0);
        put(P_DSA0, '0, 1'b0);  // after EOF the PI is disabled
        case ((d + rep) % 3)
          0: respond(1'b1, 1'b0, d);    // CTS for this source: tag = its DSA
          1: respond(1'b0, 1'b0, 0);    // NCTS
          default: respond(1'b1, 1'b1, IDX);  // CC as destination: tag = own address
        endcase
        put(P_NCTS, '0, 1'b1);          // DC from the host
      end
    end
    // A frame cut short by a new RTS_SOF starts over.
    put(P_SOF, '0, 1'b0);
    put(P_DSA1, F1, 1'b0);
    put(P_SOF, '0, 1'b0);
    for (int b = 0; b < int'(AW); b++) put(P_DSA0, F0, 1'b0);
    put(P_DSA0, FE, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
