// pulse_gen: CTS/NCTS primitive generator (impulse generator).
//
// When the trigger input rises, the generator emits one impulse of WIDTH
// clock cycles, starting on the cycle after the rising edge. This is the
// synchronous form of the delay-line-and-AND-gate impulse generator of the
// design, whose impulse width is set by the length of the delay; here the
// delay is a cycle counter. A rising edge seen while an impulse is still
// being emitted is ignored. WIDTH = 1 (the default, a choice of this RTL)
// gives the one-cycle impulses the rest of the control plane expects.
//
// Interface: clk, active-low synchronous reset rst_n, trig_i, pulse_o.
// Timing: pulse_o is registered; first high cycle is one cycle after the
// trigger's rising edge.
module pulse_gen #(
  parameter int unsigned WIDTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig_i,
  output logic pulse_o
);

  localparam int unsigned CW = (WIDTH > 1) ? $clog2(WIDTH + 1) : 1;

  logic          trig_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trig_q <= 1'b0;
      cnt_q  <= '0;
    end else begin
      trig_q <= trig_i;
      if (cnt_q != '0)
        cnt_q <= cnt_q - 1'b1;
      else if (trig_i && !trig_q)
        cnt_q <= CW'(WIDTH);
    end
  end

  assign pulse_o = (cnt_q != '0);

  initial assert (WIDTH >= 1) else $error("pulse_gen: WIDTH must be at least 1");

endmodule
