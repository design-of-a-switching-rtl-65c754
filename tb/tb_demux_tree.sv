// tb_demux_tree: an 8-leaf routing tree. For every destination the test
// sends the address impulses (most significant bit first), then RTS_EN
// impulses, and checks that each RTS_EN comes out on that leaf alone in the
// same cycle, that a CTS or NCTS sent back on that leaf reaches the input
// and resets every node, and that the address impulses themselves never
// leave the tree.
module tb_demux_tree;
  import sw_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned AW = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  rts_fwd_t          fwd;
  rts_bwd_t          bwd;
  rts_fwd_t [N-1:0]  leaf_fwd;
  rts_bwd_t [N-1:0]  leaf_bwd;
  logic     [N-2:0]  routed;
  int checks = 0, failures = 0;

  demux_tree #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .fwd_i(fwd), .bwd_o(bwd),
                           .leaf_fwd_o(leaf_fwd), .leaf_bwd_i(leaf_bwd), .routed_o(routed));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    fwd = '0; leaf_bwd = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int d = 0; d < int'(N); d++) begin
        for (int b = int'(AW) - 1; b >= 0; b--) begin
          fwd = '{dsa0: !d[b], dsa1: d[b], en: 1'b0};
          #1 check(leaf_fwd == '0, "address impulse leaked");
          @(posedge clk); #1;
          fwd = '0;
        end
        check(routed != '0, "route held");
        for (int k = 0; k < 2; k++) begin
          fwd = '{dsa0: 1'b0, dsa1: 1'b0, en: 1'b1};
          #1;
          for (int l = 0; l < int'(N); l++)
            check(leaf_fwd[l].en == (l == d), $sformatf("RTS_EN to leaf %0d for dsa %0d", l, d));
          @(posedge clk); #1;
          fwd = '0;
        end
        // Return path; alternate CTS and NCTS.
        leaf_bwd[d] = (rep % 2 == 0) ? '{cts: 1'b1, ncts: 1'b0} : '{cts: 1'b0, ncts: 1'b1};
        #1 check(bwd == leaf_bwd[d], "CTS/NCTS back to the input");
        // A response on another leaf must not pass.
        @(posedge clk); #1;
        leaf_bwd = '0;
        check(routed == '0, "tree reset by the returning impulse");
        leaf_bwd[(d + 1) % N] = '{cts: 1'b1, ncts: 1'b0};
        #1 check(bwd == '0, "response on an unrouted leaf blocked");
        @(posedge clk); #1;
        leaf_bwd = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
