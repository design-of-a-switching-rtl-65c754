// tb_switch_plane: end-to-end test of the switch at its default size
// (4 segments, 4 wire pairs), driven by four behavioural host models.
//
// Directed phases, then random traffic:
//  A  two hosts request the same destination one cycle apart: the earlier
//     one gets CTS, the later one NCTS (first come, first served); the
//     crosspoint closes, symbols pass on all four pairs in both directions,
//     DC opens it again and frees the destination.
//  B  a request for a destination that is already connected gets NCTS.
//  C  two requests for one destination in the same cycle: the lower source
//     address wins.
//  D  two different connections made in the same cycle: only their own two
//     crosspoints close (connect commands are told apart by their tag).
//  R  random requests between idle hosts.
//  E  a segment gets its own CTS and a CC as destination in the same cycle:
//     the CTS/CC multiplexer sends them one after the other.
// Checked throughout: every symbol a host sends while connected reaches
// its peer unchanged in the same cycle; no segment is in two closed
// crosspoints; CTS/NCTS arrive log2(N)+5 cycles after RTS_SOF.
module tb_switch_plane;
  import sw_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned AW = $clog2(N);
  // Clock edge that puts RTS_SOF on the line to the edge where the host
  // samples CTS/NCTS: SOF, AW address bits, RTS_CR, RTS_CC, then three
  // registered stages (PI, generator, PI).
  localparam int unsigned LAT = AW + 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  line_t [N-1:0]         hba_rx, hba_tx, model_tx;
  logic  [N-1:0][N-1:0]  xp_on;
  logic  [N-1:0]         dst_busy;

  logic [N-1:0]          start;
  logic [N-1:0][AW-1:0]  dsa;
  int unsigned           len [N];
  logic [N-1:0]          busy, sending, granted, denied, incoming;
  int unsigned           latency [N];
  logic [N-1:0]          reply_en;
  line_t                 reply_line;

  int checks = 0, failures = 0;
  int n_grant = 0, n_deny = 0, n_deny_busy = 0, n_tie = 0, n_double = 0;
  int n_release = 0, n_data = 0, n_duplex = 0, n_ccmux = 0;

  switch_plane dut (
    .clk        (clk),
    .rst_n      (rst_n),
    .hba_rx_i   (hba_rx),
    .hba_tx_o   (hba_tx),
    .xp_on_o    (xp_on),
    .dst_busy_o (dst_busy)
  );

  for (genvar s = 0; s < N; s++) begin : g_host
    hba_model #(.N(N), .IDX(s)) u_hba (
      .clk        (clk),
      .rst_n      (rst_n),
      .start_i    (start[s]),
      .dsa_i      (dsa[s]),
      .len_i      (len[s]),
      .rx_i       (hba_tx[s]),
      .tx_o       (model_tx[s]),
      .busy_o     (busy[s]),
      .sending_o  (sending[s]),
      .granted_o  (granted[s]),
      .denied_o   (denied[s]),
      .latency_o  (latency[s]),
      .incoming_o (incoming[s])
    );
    // The test can make a destination host answer with its own symbols.
    assign hba_rx[s] = reply_en[s] ? reply_line : model_tx[s];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // Monitors -------------------------------------------------------------
  always @(negedge clk) if (rst_n) begin
    for (int a = 0; a < int'(N); a++) begin
      int closed;
      closed = 0;
      for (int b = 0; b < int'(N); b++) begin
        if (xp_on[a][b]) closed++;
        if (xp_on[a][b] && hba_rx[b].prim == P_DATA) begin
          check(hba_tx[a] == hba_rx[b], $sformatf("symbols %0d->%0d", b, a));
          n_data++;
          if (reply_en[b]) n_duplex++;
        end
      end
      check(closed <= 1, $sformatf("segment %0d in %0d crosspoints", a, closed));
    end
    for (int s = 0; s < int'(N); s++) begin
      if (granted[s] || denied[s])
        check(latency[s] == LAT, $sformatf("host %0d response latency %0d, want %0d", s, latency[s], LAT));
      if (granted[s]) n_grant++;
      if (denied[s])  n_deny++;
    end
  end

  task automatic request(input int s, input int d, input int unsigned l);
    dsa[s]   = AW'(d);
    len[s]   = l;
    start[s] = 1'b1;
    @(posedge clk);
    #1 start[s] = 1'b0;
  endtask

  task automatic wait_idle(input int unsigned max_cycles);
    int unsigned c;
    c = 0;
    while ((busy != '0 || start != '0) && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
    repeat (3) @(posedge clk);
    #1;
  endtask

  // Watches one host's outcome (set on the cycle the host model reports it).
  logic [N-1:0] got_grant, got_deny;
  always @(posedge clk) begin
    for (int s = 0; s < int'(N); s++) begin
      if (granted[s]) got_grant[s] <= 1'b1;
      if (denied[s])  got_deny[s]  <= 1'b1;
    end
  end
  // A host some other host is asking for, or is connected to, does not
  // start a request of its own (the switch does not refuse a destination
  // that is itself a source).
  function automatic bit targeted(input int s);
    for (int r = 0; r < int'(N); r++)
      if ((busy[r] || start[r]) && r != s && int'(dsa[r]) == s) return 1'b1;
    return 1'b0;
  endfunction

  task automatic clear_outcomes();
    got_grant = '0;
    got_deny  = '0;
  endtask

  initial begin
    start = '0; reply_en = '0; reply_line = LINE_IDLE;
    for (int s = 0; s < int'(N); s++) begin dsa[s] = '0; len[s] = 0; end
    clear_outcomes();
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;

    // A: HBA 11 asks for DSA 10, HBA 01 one cycle later.
    clear_outcomes();
    fork
      request(3, 2, 12);
      begin @(posedge clk); #1 request(1, 2, 12); end
    join
    wait (got_grant[3] || got_deny[3]);
    @(posedge clk); #1;
    check(got_grant[3] && !got_deny[3], "A: host 3 granted");
    check(xp_on[3][2], "A: crosspoint (3,2) closed");
    check(dst_busy[2], "A: destination 2 held");
    // Destination answers with its own symbols for a few cycles.
    reply_line.prim = P_DATA;
    for (int p = 0; p < int'(NPAIR); p++) reply_line.sym[p] = sym_t'(9 + p);
    reply_en[2] = 1'b1;
    repeat (4) @(posedge clk);
    #1 reply_en[2] = 1'b0;
    wait_idle(200);
    check(got_deny[1] && !got_grant[1], "A: host 1 denied");
    check(!xp_on[3][2], "A: crosspoint (3,2) open after DC");
    check(!dst_busy[2], "A: destination 2 released");
    if (!dst_busy[2] && !xp_on[3][2]) n_release++;
    check(xp_on == '0, "A: no crosspoint closed");

    // B: destination busy.
    clear_outcomes();
    request(0, 1, 30);
    wait (got_grant[0]);
    repeat (3) @(posedge clk);
    #1 request(2, 1, 5);
    wait (got_deny[2] || got_grant[2]);
    @(posedge clk); #1;
    check(got_deny[2], "B: busy destination refused");
    if (got_deny[2]) n_deny_busy++;
    check(xp_on[0][1] && !xp_on[2][1], "B: only crosspoint (0,1) closed");
    wait_idle(200);
    clear_outcomes();
    request(2, 1, 5);
    wait_idle(200);
    check(got_grant[2], "B: destination free again after DC");

    // C: same-cycle tie.
    clear_outcomes();
    fork
      request(0, 3, 6);
      request(2, 3, 6);
    join
    wait_idle(200);
    check(got_grant[0] && got_deny[2], "C: lower source address wins a tie");
    if (got_grant[0] && got_deny[2]) n_tie++;

    // D: two connections closed in the same cycle.
    clear_outcomes();
    fork
      request(0, 1, 10);
      request(2, 3, 10);
    join
    wait (got_grant[0] && got_grant[2]);
    @(posedge clk); #1;
    check(xp_on[0][1] && xp_on[2][3], "D: both crosspoints closed");
    check(!xp_on[0][3] && !xp_on[2][1] && !xp_on[0][2] && !xp_on[1][3],
          "D: no other crosspoint closed");
    if (xp_on[0][1] && xp_on[2][3] && !xp_on[0][3] && !xp_on[2][1]) n_double++;
    wait_idle(200);

    // R: random traffic among idle hosts.
    for (int it = 0; it < 200; it++) begin
      for (int s = 0; s < int'(N); s++) begin
        if (!busy[s] && !incoming[s] && !start[s] && !targeted(s) && ($urandom % 4 == 0)) begin
          int d;
          d = int'($urandom % (N - 1));
          if (d >= s) d++;
          // Do not ask for a host that is itself requesting or sending.
          if (!busy[d] && !start[d]) begin
            dsa[s] = AW'(d);
            len[s] = 1 + $urandom % 8;
            start[s] = 1'b1;
          end
        end
      end
      @(posedge clk);
      #1 start = '0;
    end
    wait_idle(500);
    check(xp_on == '0 && dst_busy == '0, "R: everything released at the end");

    // E: host 0 asks for 1 while host 2 asks for 0, in the same cycle. The
    // CTS for 0 (as source) and the CC for 0 (as destination) meet in the
    // CTS/CC multiplexer of segment 0; the CC goes one cycle later, so it
    // no longer coincides with the CC on segment 2 and crosspoint (2,0)
    // stays open. The switch does not refuse a destination that is itself
    // asking for a connection; hosts are expected not to do this.
    clear_outcomes();
    fork
      request(0, 1, 4);
      request(2, 0, 4);
      begin
        // Watch segment 0 for its own CTS followed by the delayed CC.
        int unsigned t_cts;
        t_cts = 0;
        for (int c = 0; c < 40; c++) begin
          @(negedge clk);
          if (hba_tx[0].prim == P_CTS && hba_tx[0].tag == TAG_W'(1)) t_cts = c;
          if (hba_tx[0].prim == P_CTS && hba_tx[0].tag == TAG_W'(0) && t_cts != 0) begin
            check(c == int'(t_cts) + 1, "E: CC for segment 0 held one cycle behind its CTS");
            n_ccmux++;
          end
        end
      end
    join
    wait_idle(200);
    check(got_grant[0] && got_grant[2], "E: both requests granted");
    check(!xp_on[2][0], "E: crosspoint (2,0) not closed by non-coincident CCs");
    check(xp_on == '0 && dst_busy == '0, "E: everything released");

    $display("mechanisms: grant=%0d deny=%0d deny_busy=%0d tie=%0d double_close=%0d release=%0d data=%0d duplex=%0d cts_cc_contention=%0d",
             n_grant, n_deny, n_deny_busy, n_tie, n_double, n_release, n_data, n_duplex, n_ccmux);
    check(n_grant > 0, "grant happened");
    check(n_deny > 0, "contention loss happened");
    check(n_deny_busy > 0, "busy refusal happened");
    check(n_tie > 0, "tie happened");
    check(n_double > 0, "double close happened");
    check(n_release > 0, "release happened");
    check(n_data > 0, "data passed");
    check(n_duplex > 0, "full duplex happened");
    check(n_ccmux > 0, "CTS/CC contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
