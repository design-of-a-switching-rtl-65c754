// tb_physical_plane: a 6-segment plane. Each cycle the test either closes
// one or two new connections (CC on both ends, one tag per connection),
// breaks one (DC on one end), or sends symbols. A reference crosspoint
// matrix, kept by the test, says which crosspoints must be closed and so
// which line each segment must receive (its peer's, in the same cycle, or
// idle). Two connections made in the same cycle must not close the two
// crossed crosspoints.
module tb_physical_plane;
  import sw_pkg::*;

  localparam int unsigned N = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pair_line_t [N-1:0]        seg_i, seg_o;
  logic       [N-1:0][N-1:0] on;
  logic ref_on [N][N];
  int peer [N];
  int checks = 0, failures = 0, n_double = 0, n_pass = 0;

  physical_plane #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .seg_i(seg_i), .seg_o(seg_o), .on_o(on));

  function automatic int pick_free(input int not_this);
    int c [$];
    for (int s = 0; s < int'(N); s++) if (peer[s] < 0 && s != not_this) c.push_back(s);
    return (c.size() == 0) ? -1 : c[$urandom % c.size()];
  endfunction

  initial begin
    for (int a = 0; a < int'(N); a++) begin peer[a] = -1; for (int b = 0; b < int'(N); b++) ref_on[a][b] = 0; end
    seg_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int r, made;
      made = 0;
      for (int s = 0; s < int'(N); s++)
        seg_i[s] = '{prim: P_DATA, tag: '0, sym: sym_t'($urandom)};
      r = int'($urandom % 4);
      if (r <= 1) begin
        // Close one or two connections in this cycle.
        int k, a, b;
        k = (r == 0) ? 1 : 2;
        for (int j = 0; j < k; j++) begin
          a = pick_free(-1);
          b = (a >= 0) ? pick_free(a) : -1;
          if (a >= 0 && b >= 0) begin
            seg_i[a] = '{prim: P_CTS, tag: TAG_W'(b), sym: '0};
            seg_i[b] = '{prim: P_CTS, tag: TAG_W'(b), sym: '0};
            peer[a] = b; peer[b] = a;
            made++;
          end
        end
        if (made == 2) n_double++;
      end else if (r == 2) begin
        automatic int c [$];
        for (int s = 0; s < int'(N); s++) if (peer[s] >= 0) c.push_back(s);
        if (c.size() > 0) begin
          int s;
          s = c[$urandom % c.size()];
          seg_i[s] = '{prim: P_NCTS, tag: '0, sym: '0};
          peer[peer[s]] = -1; peer[s] = -1;
        end
      end
      #1;
      for (int a = 0; a < int'(N); a++) begin
        pair_line_t want;
        want = PAIR_IDLE;
        for (int b = int'(N) - 1; b >= 0; b--) if (ref_on[a][b]) want = seg_i[b];
        checks++;
        if (seg_o[a] != want) begin failures++; $display("FAIL it=%0d seg %0d output", it, a); end
        else if (want.prim == P_DATA) n_pass++;
        for (int b = 0; b < int'(N); b++) begin
          checks++;
          if (on[a][b] != ref_on[a][b]) begin failures++; $display("FAIL it=%0d on[%0d][%0d]", it, a, b); end
        end
      end
      // Reference crosspoint update for this cycle's primitives.
      for (int a = 0; a < int'(N); a++)
        for (int b = 0; b < int'(N); b++)
          if (a != b) begin
            if (seg_i[a].prim == P_NCTS || seg_i[b].prim == P_NCTS) ref_on[a][b] = 0;
            else if (seg_i[a].prim == P_CTS && seg_i[b].prim == P_CTS && seg_i[a].tag == seg_i[b].tag)
              ref_on[a][b] = 1;
          end
      @(posedge clk); #1;
    end
    checks++;
    if (n_double == 0 || n_pass == 0) begin failures++; $display("FAIL coverage"); end
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
