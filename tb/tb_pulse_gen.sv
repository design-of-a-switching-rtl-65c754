// tb_pulse_gen: checks the impulse generator at WIDTH = 3 and WIDTH = 1.
// A rising trigger must give exactly WIDTH high cycles starting one cycle
// later; a held-high trigger gives one impulse; a rising edge inside an
// impulse is ignored.
module tb_pulse_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic trig3, pulse3, trig1, pulse1;
  int checks = 0, failures = 0;

  pulse_gen #(.WIDTH(3)) dut3 (.clk(clk), .rst_n(rst_n), .trig_i(trig3), .pulse_o(pulse3));
  pulse_gen dut1 (.clk(clk), .rst_n(rst_n), .trig_i(trig1), .pulse_o(pulse1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // Drive trig for hi cycles, then record the pulse over the next 8 cycles.
  task automatic run3(input int hi, input int gap, input int hi2, input logic [9:0] want);
    logic [9:0] seen;
    seen = '0;
    for (int c = 0; c < 10; c++) begin
      trig3 = (c < hi) || (c >= hi + gap && c < hi + gap + hi2);
      @(posedge clk); #1;
      seen[c] = pulse3;
    end
    trig3 = 1'b0;
    check(seen == want, $sformatf("WIDTH=3 hi=%0d gap=%0d: got %b want %b", hi, gap, seen, want));
    repeat (4) @(posedge clk); #1;
  endtask

  initial begin
    trig3 = 0; trig1 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // seen[c] is the pulse after the edge that sampled trigger cycle c.
    run3(1, 0, 0, 10'b0000000111);
    run3(5, 0, 0, 10'b0000000111);
    run3(1, 1, 1, 10'b0000000111);   // second edge inside the impulse: ignored
    run3(1, 4, 1, 10'b0011100111);   // second edge after it: new impulse
    // WIDTH = 1: a one-cycle trigger gives a one-cycle impulse, next cycle.
    for (int k = 0; k < 5; k++) begin
      trig1 = 1; @(posedge clk); #1; check(pulse1 == 1, "WIDTH=1 impulse");
      trig1 = 0; @(posedge clk); #1; check(pulse1 == 0, "WIDTH=1 impulse ends");
      @(posedge clk); #1; check(pulse1 == 0, "WIDTH=1 quiet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
