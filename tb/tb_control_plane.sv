// tb_control_plane: the control plane of an 8-segment switch, driven at
// its segment lines. Each round some sources send RTS frames, from random
// start cycles, to destinations that are not themselves sources. Expected
// results are worked out by the test: per destination, the earliest start
// wins and equal starts go to the lowest source address, unless the
// destination is still held from the previous round, in which case all
// lose. The winner must see CTS (tag = destination) and the destination
// must see CC (same tag) in the same cycle, log2(N)+5 cycles after the
// source's RTS_SOF was on the line; losers must see NCTS at the same
// distance; the line must otherwise stay idle and CP_PP_EN must be high
// exactly while a primitive is driven. A DC from the winner frees the
// destination.
module tb_control_plane;
  import sw_pkg::*;

  localparam int unsigned N   = 8;
  localparam int unsigned AW  = $clog2(N);
  localparam int unsigned LAT = AW + 5;
  localparam int unsigned RL  = 24;   // cycles per round

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  line_t [N-1:0]          rx, tx;
  logic  [N-1:0]          hba_cp_en, cp_hba_en, cp_pp_en, hba_pp_en, busy;
  logic  [N-1:0][AW-1:0]  owner;
  int checks = 0, failures = 0, n_win = 0, n_lose = 0, n_busy = 0, n_tie = 0;

  control_plane #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .cp_rx_i(rx), .cp_tx_o(tx),
    .hba_cp_en_o(hba_cp_en), .cp_hba_en_o(cp_hba_en), .cp_pp_en_o(cp_pp_en), .hba_pp_en_o(hba_pp_en),
    .dst_busy_o(busy), .dst_owner_o(owner));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  function automatic line_t prim(input prim_t p);
    return '{prim: p, tag: '0, sym: '0};
  endfunction

  initial begin
    int hs, hd;  // connection held over from the previous round (-1: none)
    hs = -1; hd = -1;
    rx = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int round = 0; round < 150; round++) begin
      bit is_src [N];
      int d_of [N], st [N], win [N];
      line_t want [N][RL];
      for (int s = 0; s < int'(N); s++) begin is_src[s] = 0; win[s] = -1; end
      // Choose sources; destinations are never sources.
      for (int s = 0; s < int'(N); s++)
        is_src[s] = (s != hs) && (s != hd) && ($urandom % 3 == 0);
      for (int s = 0; s < int'(N); s++) if (is_src[s]) begin
        automatic int c [$];
        for (int d = 0; d < int'(N); d++) if (!is_src[d] && d != hs) c.push_back(d);
        if (c.size() == 0) is_src[s] = 0;
        else begin d_of[s] = c[$urandom % c.size()]; st[s] = int'($urandom % 4); end
      end
      // Reference outcome.
      for (int d = 0; d < int'(N); d++) begin
        int best;
        best = 99;
        if (d != hd)
          for (int s = 0; s < int'(N); s++)
            if (is_src[s] && d_of[s] == d && st[s] < best) begin best = st[s]; win[d] = s; end
        for (int s = 0; s < int'(N); s++)
          if (is_src[s] && d_of[s] == d && s != win[d] && win[d] >= 0 && st[s] == st[win[d]]) n_tie++;
      end
      for (int s = 0; s < int'(N); s++) for (int c = 0; c < int'(RL); c++) want[s][c] = LINE_IDLE;
      for (int s = 0; s < int'(N); s++) if (is_src[s]) begin
        int t;
        t = st[s] + int'(LAT);
        if (win[d_of[s]] == s) begin
          want[s][t]         = '{prim: P_CTS, tag: TAG_W'(d_of[s]), sym: '0};
          want[d_of[s]][t]   = '{prim: P_CTS, tag: TAG_W'(d_of[s]), sym: '0};
        end else
          want[s][t] = prim(P_NCTS);
      end
      // Run the round.
      for (int c = 0; c < int'(RL); c++) begin
        for (int s = 0; s < int'(N); s++) begin
          int k;
          rx[s] = LINE_IDLE;
          k = c - (is_src[s] ? st[s] : 0);
          if (is_src[s] && k >= 0 && k <= int'(AW) + 3) begin
            if (k == 0)                 rx[s] = prim(P_SOF);
            else if (k <= int'(AW))     rx[s] = prim(d_of[s][int'(AW) - k] ? P_DSA1 : P_DSA0);
            else if (k <= int'(AW) + 2) rx[s] = prim(P_DSA0);
            else                        rx[s] = prim(P_EOF);
          end
        end
        #1;
        for (int s = 0; s < int'(N); s++) begin
          check(tx[s] == want[s][c], $sformatf("round %0d cycle %0d segment %0d: got %s tag %0d",
                                               round, c, s, tx[s].prim.name(), tx[s].tag));
          check(cp_pp_en[s] == (tx[s].prim != P_IDLE) && cp_hba_en[s] == cp_pp_en[s] &&
                hba_cp_en[s] == !cp_pp_en[s] && hba_pp_en[s] == !cp_pp_en[s], "enables");
          if (want[s][c].prim == P_NCTS) begin n_lose++; if (d_of[s] == hd) n_busy++; end
          if (want[s][c].prim == P_CTS && is_src[s]) n_win++;
        end
        @(posedge clk); #1;
      end
      rx = '0;
      // Holders and release.
      for (int d = 0; d < int'(N); d++)
        if (win[d] >= 0) begin
          check(busy[d] && int'(owner[d]) == win[d], $sformatf("destination %0d held by %0d", d, win[d]));
        end
      if (hd >= 0) check(busy[hd] && int'(owner[hd]) == hs, "held destination kept");
      // Release every new winner except, sometimes, one kept for the next round.
      begin
        int keep_s, keep_d;
        keep_s = -1; keep_d = -1;
        if (hs >= 0) begin rx[hs] = prim(P_NCTS); end
        for (int d = 0; d < int'(N); d++)
          if (win[d] >= 0) begin
            if (keep_s < 0 && hs < 0 && $urandom % 2 == 0) begin keep_s = win[d]; keep_d = d; end
            else rx[win[d]] = prim(P_NCTS);
          end
        @(posedge clk); #1;
        rx = '0;
        @(posedge clk); #1;
        for (int d = 0; d < int'(N); d++)
          check(busy[d] == (d == keep_d), $sformatf("destination %0d busy after release", d));
        hs = keep_s; hd = keep_d;
      end
    end
    $display("wins=%0d losses=%0d busy_losses=%0d ties=%0d", n_win, n_lose, n_busy, n_tie);
    check(n_win > 0 && n_lose > 0 && n_busy > 0 && n_tie > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
