// hba_model: behavioural model of a host bus adapter, for testbenches only.
//
// On start_i it sends an RTS frame for destination dsa_i, one primitive per
// cycle: RTS_SOF, the address bits most significant first (RTS_DSA0 or
// RTS_DSA1), RTS_CR, RTS_CC, RTS_EOF (RTS_CR and RTS_CC use the RTS_DSA0
// code). It then waits for CTS (a CTS whose tag is dsa_i) or NCTS. On CTS it
// sends len_i cycles of Ethernet symbols, then one DC, and reports done.
// The symbol sent on pair p in data cycle c is pattern(IDX, p, c), so a
// receiver can tell who sent it. Separately it notices when it becomes the
// destination of a connection (a CTS/CC whose tag is its own address) and
// when that ends (DC arriving through the physical plane).
module hba_model
  import sw_pkg::*;
#(
  parameter int unsigned N   = 4,
  parameter int unsigned IDX = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  logic [$clog2(N)-1:0] dsa_i,
  input  int unsigned          len_i,
  input  line_t                rx_i,
  output line_t                tx_o,
  output logic                 busy_o,      // a request or transfer is under way
  output logic                 sending_o,   // Ethernet symbols on tx_o this cycle
  output logic                 granted_o,   // one-cycle: CTS received
  output logic                 denied_o,    // one-cycle: NCTS received
  output int unsigned          latency_o,   // cycles from RTS_SOF to CTS/NCTS
  output logic                 incoming_o   // this host is a connection's destination
);

  localparam int unsigned AW = $clog2(N);

  logic        waiting;
  logic        got_cts, got_ncts;
  int unsigned sof_cycle, cycle;
  logic [AW-1:0] cur_dsa;

  function automatic sym_t pattern(int unsigned idx, int unsigned p, int unsigned c);
    return sym_t'((idx * 5 + p * 3 + c) % 16);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) cycle <= 0;
    else        cycle <= cycle + 1;
  end

  // Response watcher.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      got_cts    <= 1'b0;
      got_ncts   <= 1'b0;
      granted_o  <= 1'b0;
      denied_o   <= 1'b0;
      incoming_o <= 1'b0;
      latency_o  <= 0;
    end else begin
      granted_o <= 1'b0;
      denied_o  <= 1'b0;
      if (waiting && rx_i.prim == P_CTS && rx_i.tag == TAG_W'(cur_dsa)) begin
        got_cts   <= 1'b1;
        granted_o <= 1'b1;
        latency_o <= cycle - sof_cycle;
      end else if (waiting && rx_i.prim == P_NCTS) begin
        got_ncts  <= 1'b1;
        denied_o  <= 1'b1;
        latency_o <= cycle - sof_cycle;
      end else if (!waiting) begin
        got_cts  <= 1'b0;
        got_ncts <= 1'b0;
      end
      if (rx_i.prim == P_CTS && rx_i.tag == TAG_W'(IDX))
        incoming_o <= 1'b1;
      else if (rx_i.prim == P_NCTS && !waiting)
        incoming_o <= 1'b0;
    end
  end

  task automatic send(input prim_t p);
    tx_o <= '{prim: p, tag: '0, sym: '0};
    @(posedge clk);
  endtask

  initial begin
    tx_o      = LINE_IDLE;
    busy_o    = 1'b0;
    sending_o = 1'b0;
    waiting   = 1'b0;
    sof_cycle = 0;
    cur_dsa   = '0;
    forever begin
      @(posedge clk);
      if (rst_n && start_i) begin
        busy_o    <= 1'b1;
        cur_dsa   = dsa_i;
        waiting   = 1'b1;
        sof_cycle = cycle;
        send(P_SOF);
        for (int b = int'(AW) - 1; b >= 0; b--)
          send(cur_dsa[b] ? P_DSA1 : P_DSA0);
        send(P_DSA0);  // RTS_CR
        send(P_DSA0);  // RTS_CC
        send(P_EOF);
        tx_o <= LINE_IDLE;
        while (!got_cts && !got_ncts) @(posedge clk);
        waiting = 1'b0;
        if (got_cts) begin
          for (int unsigned c = 0; c < len_i; c++) begin
            line_t l;
            l.prim = P_DATA;
            l.tag  = '0;
            for (int p = 0; p < int'(NPAIR); p++) l.sym[p] = pattern(IDX, p, c);
            tx_o      <= l;
            sending_o <= 1'b1;
            @(posedge clk);
          end
          sending_o <= 1'b0;
          send(P_NCTS);  // DC
          tx_o <= LINE_IDLE;
        end
        busy_o <= 1'b0;
      end
    end
  end

endmodule
