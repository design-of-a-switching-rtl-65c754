// tb_mux_tree: the contention multiplexer of one destination with 8
// sources. Each round, a random set of sources sends RTS_CR then RTS_CC
// (one cycle apart) from random start cycles. Reference rule, worked out
// independently of the tree: the earliest start wins, equal starts go to
// the lowest source address; if the destination is still held from the
// previous round everyone loses. The winner must get CTS, and cc_o must
// pulse, one cycle after its RTS_CC; every loser must get NCTS one cycle
// after its RTS_CC; busy/owner must show the holder until release_i of the
// holder (a release from another source must change nothing).
module tb_mux_tree;
  import sw_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned AW = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  rts_fwd_t [N-1:0] in_fwd;
  rts_bwd_t [N-1:0] in_bwd;
  logic     [N-1:0] rel;
  logic             cc, busy;
  logic [AW-1:0]    owner;
  int checks = 0, failures = 0, n_win = 0, n_lose = 0, n_busy_lose = 0, n_tie = 0;

  mux_tree #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_fwd_i(in_fwd), .in_bwd_o(in_bwd),
                         .release_i(rel), .cc_o(cc), .busy_o(busy), .owner_o(owner));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    bit held;
    int holder;
    in_fwd = '0; rel = '0; held = 0; holder = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int round = 0; round < 300; round++) begin
      bit          req [N];
      int          off [N];
      int          win, nreq, best;
      win = -1; nreq = 0; best = 99;
      for (int i = 0; i < int'(N); i++) begin
        // The holder of a busy destination does not ask for it again.
        req[i] = ($urandom % 3 == 0) && !(held && i == holder);
        off[i] = int'($urandom % 4);
        if (req[i]) nreq++;
      end
      if (nreq == 0 && !(held && holder == round % N)) begin req[round % N] = 1; off[round % N] = 0; end
      if (!held)
        for (int i = 0; i < int'(N); i++)
          if (req[i] && off[i] < best) begin best = off[i]; win = i; end
      for (int i = 0; i < int'(N); i++)
        if (req[i] && i != win && win >= 0 && off[i] == off[win]) n_tie++;
      for (int c = 0; c < 8; c++) begin
        for (int i = 0; i < int'(N); i++)
          in_fwd[i].en = req[i] && (c == off[i] || c == off[i] + 1);
        #1;
        for (int i = 0; i < int'(N); i++) begin
          bit want_cts, want_ncts;
          want_cts  = (i == win) && (c == off[i] + 2);
          want_ncts = req[i] && (i != win) && (c == off[i] + 2);
          check(in_bwd[i].cts == want_cts, $sformatf("round %0d src %0d cycle %0d CTS", round, i, c));
          check(in_bwd[i].ncts == want_ncts, $sformatf("round %0d src %0d cycle %0d NCTS", round, i, c));
          if (want_ncts) begin n_lose++; if (held) n_busy_lose++; end
        end
        check(cc == (win >= 0 && c == off[win] + 2), $sformatf("round %0d cycle %0d CC", round, c));
        if (win >= 0 && c == off[win] + 2) n_win++;
        @(posedge clk); #1;
      end
      in_fwd = '0;
      if (win >= 0) begin held = 1; holder = win; end
      check(busy == held, "busy");
      if (held) check(int'(owner) == holder, "owner");
      // Release from someone else: nothing happens.
      rel = '0; rel[(holder + 1) % N] = 1'b1;
      @(posedge clk); #1;
      rel = '0;
      check(busy == held, "foreign release ignored");
      // Release the holder in most rounds; otherwise keep it busy.
      if ($urandom % 4 != 0) begin
        rel[holder] = 1'b1;
        @(posedge clk); #1;
        rel = '0;
        held = 0;
        check(!busy, "released");
      end
    end
    check(n_win > 0 && n_lose > 0 && n_busy_lose > 0 && n_tie > 0, "all cases seen");
    $display("wins=%0d losses=%0d busy_losses=%0d ties=%0d", n_win, n_lose, n_busy_lose, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
