// tb_cross_point: random primitives on both segments against a reference
// model of the ON/OFF rule (close on CC on both sides with equal tags,
// open on DC on either side, DC first), and the pass-through of lines when
// closed and idle lines when open.
module tb_cross_point;
  import sw_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pair_line_t a_i, b_i, a_o, b_o;
  logic on;
  logic ref_on;
  int checks = 0, failures = 0, n_close = 0, n_open = 0, n_tagmiss = 0;

  cross_point dut (.clk(clk), .rst_n(rst_n), .a_i(a_i), .b_i(b_i), .a_o(a_o), .b_o(b_o), .on_o(on));

  function automatic pair_line_t rnd();
    pair_line_t l;
    int r;
    r = int'($urandom % 10);
    l.prim = (r < 4) ? P_CTS : (r == 4) ? P_NCTS : (r < 8) ? P_DATA : prim_t'($urandom % 8);
    l.tag  = TAG_W'($urandom % 3);
    l.sym  = sym_t'($urandom);
    return l;
  endfunction

  initial begin
    a_i = PAIR_IDLE; b_i = PAIR_IDLE; ref_on = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      a_i = rnd(); b_i = rnd();
      #1;
      checks += 3;
      if (on != ref_on) begin failures++; $display("FAIL state it=%0d", it); end
      if (a_o != (ref_on ? b_i : PAIR_IDLE)) begin failures++; $display("FAIL a_o it=%0d", it); end
      if (b_o != (ref_on ? a_i : PAIR_IDLE)) begin failures++; $display("FAIL b_o it=%0d", it); end
      if (a_i.prim == P_NCTS || b_i.prim == P_NCTS) begin
        if (ref_on) n_open++;
        ref_on = 1'b0;
      end else if (a_i.prim == P_CTS && b_i.prim == P_CTS) begin
        if (a_i.tag == b_i.tag) begin
          if (!ref_on) n_close++;
          ref_on = 1'b1;
        end else n_tagmiss++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_close == 0 || n_open == 0 || n_tagmiss == 0) begin
      failures++; $display("FAIL coverage close=%0d open=%0d tagmiss=%0d", n_close, n_open, n_tagmiss);
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
