// bft_noc_model: behavioural stand-in for the packet-switched NoC, used only
// by testbenches.
//
// It is a crossbar over NL leaves: leaf L has address L + PE_BASE (the first
// PE_BASE addresses belong to the configuration and DMA PEs, which the model
// does not have). Each cycle every destination leaf takes at most one packet,
// chosen round robin among the leaves whose head packet is addressed to it,
// and each source sends at most one. It has no internal buffering and models
// neither the tree topology nor its contention, only the one-packet-per-cycle
// limit at every leaf. Packets addressed to a missing leaf are discarded.
module bft_noc_model
  import refine_pkg::*;
#(
  parameter int unsigned NL      = 4,
  parameter int unsigned PE_BASE = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  noc_packet_t tx_pkt   [NL],
  input  logic        tx_valid [NL],
  output logic        tx_ready [NL],
  output noc_packet_t rx_pkt   [NL],
  output logic        rx_valid [NL],
  input  logic        rx_ready [NL],
  output longint      delivered
);

  int unsigned last [NL];
  int          sel  [NL];

  function automatic int dest(noc_packet_t p);
    return int'(p.dst_pe) - int'(PE_BASE);
  endfunction

  always_comb begin
    for (int s = 0; s < int'(NL); s++) tx_ready[s] = 1'b0;
    for (int d = 0; d < int'(NL); d++) begin
      sel[d] = -1;
      for (int k = 1; k <= int'(NL); k++) begin
        int s;
        s = (int'(last[d]) + k) % int'(NL);
        if (sel[d] < 0 && tx_valid[s] && dest(tx_pkt[s]) == d) sel[d] = s;
      end
      rx_valid[d] = sel[d] >= 0;
      rx_pkt[d]   = (sel[d] >= 0) ? tx_pkt[sel[d]] : '0;
      if (sel[d] >= 0 && rx_ready[d]) tx_ready[sel[d]] = 1'b1;
    end
    for (int s = 0; s < int'(NL); s++) begin
      int dd;
      dd = dest(tx_pkt[s]);
      if (tx_valid[s] && (dd < 0 || dd >= int'(NL))) tx_ready[s] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < int'(NL); d++) last[d] <= NL - 1;
      delivered <= 0;
    end else begin
      int n;
      n = 0;
      for (int d = 0; d < int'(NL); d++) begin
        if (sel[d] >= 0 && rx_ready[d]) begin
          last[d] <= unsigned'(sel[d]);
          n++;
        end
      end
      delivered <= delivered + longint'(n);
    end
  end

endmodule
