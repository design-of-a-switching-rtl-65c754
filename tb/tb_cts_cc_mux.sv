// tb_cts_cc_mux: random CTS/NCTS (segment as source) and CC (segment as
// destination) impulses, neither kind on two consecutive cycles, against a
// first-come-first-served queue model: each cycle new source events are
// queued before new destination events, and the oldest event leaves. Also
// checks that nothing is lost or duplicated.
module tb_cts_cc_mux;
  import sw_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  rts_bwd_t src;
  logic     dst_cc, cts, ncts, dst;
  int checks = 0, failures = 0, n_collide = 0, n_in = 0, n_out = 0;

  cts_cc_mux dut (.clk(clk), .rst_n(rst_n), .src_i(src), .dst_cc_i(dst_cc),
                  .cts_o(cts), .ncts_o(ncts), .dst_o(dst));

  // Queue entries: 0 = CTS for source, 1 = NCTS for source, 2 = CC as destination.
  int q[$];

  initial begin
    bit last_src, last_dst;
    src = '0; dst_cc = 0; last_src = 0; last_dst = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      int exp_o;
      src = '0; dst_cc = 0;
      if (!last_src && $urandom % 2 == 0) begin
        if ($urandom % 2 == 0) src.cts = 1; else src.ncts = 1;
      end
      if (!last_dst && $urandom % 2 == 0) dst_cc = 1;
      if ((src.cts || src.ncts) && dst_cc) n_collide++;
      last_src = src.cts || src.ncts;
      last_dst = dst_cc;
      if (src.cts)  begin q.push_back(0); n_in++; end
      if (src.ncts) begin q.push_back(1); n_in++; end
      if (dst_cc)   begin q.push_back(2); n_in++; end
      exp_o = (q.size() > 0) ? q.pop_front() : -1;
      #1;
      checks++;
      if ({cts, ncts, dst} != ((exp_o == 0) ? 3'b100 : (exp_o == 1) ? 3'b010 :
                               (exp_o == 2) ? 3'b101 : 3'b000)) begin
        failures++;
        $display("FAIL it=%0d got cts=%0d ncts=%0d dst=%0d want %0d", it, cts, ncts, dst, exp_o);
      end
      if (cts || ncts) n_out++;
      @(posedge clk); #1;
    end
    src = '0; dst_cc = 0;
    while (q.size() > 0) begin
      void'(q.pop_front());
      #1 if (cts || ncts) n_out++;
      @(posedge clk); #1;
    end
    checks++;
    if (n_in != n_out || n_collide == 0) begin
      failures++; $display("FAIL in=%0d out=%0d collisions=%0d", n_in, n_out, n_collide);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
