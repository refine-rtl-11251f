// noc_rx: receive side of a NoC leaf interface.
//
// A packet arriving from the NoC names, in its header, the input stream port
// it is for. noc_rx offers the payload to that stream's input FIFO (write side
// in the NoC clock) and accepts the packet when that FIFO has room. While the
// addressed FIFO is full the packet waits and holds the channel, which is how
// a slow receiver pushes back into the NoC. A packet for a port number this
// interface does not serve is accepted and dropped.
//
// A stream of IN_WORDS[i] > 1 words arrives as that many consecutive packets
// for its port, low word first. The earlier words are accepted at once into a
// per-port assembly register; the packet with the last word is held until the
// FIFO can take the whole stream word. Each port has a single sender, so the
// words of one stream arrive in order even when other streams interleave.
//
// Interface (NoC clock): pkt/pkt_valid/pkt_ready from the NoC; w_valid/
// w_ready/w_data per input FIFO. A single-word packet, or the last word of a
// wide one, moves into the FIFO in the cycle it is offered if the FIFO can
// take it; no extra buffering.
// From the source design: packets carry 32-bit payloads into per-stream input
// FIFOs; streams of 32 and 64 bits. Own choices: header layout, the drop rule,
// the word order of wide streams.
module noc_rx
  import refine_pkg::*;
#(
  parameter int unsigned N_IN      = 2,
  parameter int unsigned MAX_WORDS = 1,
  parameter logic [N_IN-1:0][WORDS_W-1:0] IN_WORDS = {N_IN{WORDS_W'(1)}}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  noc_packet_t          pkt,
  input  logic                 pkt_valid,
  output logic                 pkt_ready,
  output logic                 w_valid [N_IN],
  input  logic                 w_ready [N_IN],
  output logic [MAX_WORDS*PAYLOAD_W-1:0] w_data [N_IN]
);

  // words received so far of each port's current stream word
  logic [WORDS_W-1:0]             rcnt [N_IN];
  logic [MAX_WORDS*PAYLOAD_W-1:0] acc  [N_IN];
  logic [N_IN-1:0]                sel, hit, last;

  always_comb begin
    pkt_ready = 1'b1;
    for (int i = 0; i < int'(N_IN); i++) begin
      sel[i]     = (int'(pkt.dst_port) == i);
      hit[i]     = pkt_valid && sel[i];
      last[i]    = (IN_WORDS[i] <= WORDS_W'(1)) || (rcnt[i] == IN_WORDS[i] - WORDS_W'(1));
      w_valid[i] = hit[i] && last[i];
      w_data[i]  = acc[i];
      w_data[i][PAYLOAD_W*int'(rcnt[i]) +: PAYLOAD_W] = pkt.payload;
      if (sel[i] && last[i]) pkt_ready = w_ready[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_IN); i++) begin
        rcnt[i] <= '0;
        acc[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < int'(N_IN); i++) begin
        // single-word ports keep no assembly state
        if (IN_WORDS[i] > WORDS_W'(1) && hit[i] && pkt_ready) begin
          rcnt[i] <= last[i] ? '0 : rcnt[i] + WORDS_W'(1);
          if (!last[i]) acc[i][PAYLOAD_W*int'(rcnt[i]) +: PAYLOAD_W] <= pkt.payload;
        end
      end
    end
  end

endmodule
