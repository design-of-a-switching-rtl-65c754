// physical_plane: the cross bar switch for one wire pair (DA, DB, DC or DD).
//
// N segments and one crosspoint for every unordered pair of segments
// (N(N-1)/2 crosspoints, the triangular layout of the design's 4x4
// example), each connecting its two segments in full duplex. A segment is
// meant to be in at most one closed crosspoint; if several are closed, the
// line from the lowest-numbered peer is delivered (a choice of this RTL).
//
// Interface: seg_i[s] is the line entering the plane from segment s's
// tri-state switch, seg_o[s] the line the plane returns to it; on_o[a][b]
// (set for both a,b orders) is the crosspoint state. Data passes
// combinationally through closed crosspoints; their state changes on the
// clock edge.
module physical_plane
  import sw_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  pair_line_t [N-1:0]          seg_i,
  output pair_line_t [N-1:0]          seg_o,
  output logic       [N-1:0][N-1:0]   on_o
);

  // pass[a][b]: what crosspoint (a,b) delivers to segment a.
  pair_line_t [N-1:0][N-1:0] pass;

  for (genvar a = 0; a < N; a++) begin : g_row
    for (genvar b = 0; b < N; b++) begin : g_col
      if (a < b) begin : g_xp
        cross_point u_xp (
          .clk   (clk),
          .rst_n (rst_n),
          .a_i   (seg_i[a]),
          .b_i   (seg_i[b]),
          .a_o   (pass[a][b]),
          .b_o   (pass[b][a]),
          .on_o  (on_o[a][b])
        );
        assign on_o[b][a] = on_o[a][b];
      end else if (a == b) begin : g_diag
        assign on_o[a][a] = 1'b0;
        assign pass[a][a] = PAIR_IDLE;
      end
    end
  end

  always_comb begin
    for (int s = 0; s < N; s++) begin
      seg_o[s] = PAIR_IDLE;
      for (int p = N - 1; p >= 0; p--)
        if (on_o[s][p])
          seg_o[s] = pass[s][p];
    end
  end

endmodule
