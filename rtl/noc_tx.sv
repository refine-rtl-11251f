// noc_tx: send side of a NoC leaf interface.
//
// The operator's output streams wait in their FIFOs (read side in the NoC
// clock). noc_tx picks one non-empty FIFO per cycle in round-robin order,
// pops its head word and places it, with a header, into a registered output
// packet. The header carries the destination leaf and destination stream
// port from a per-stream routing table, and this leaf's own address and the
// stream number as the source. One packet per cycle leaves when the NoC side
// is ready, so all output streams of one interface share the bandwidth of a
// single 32-bit NoC channel; this sharing is what the full counters expose.
// A stream of OUT_WORDS[j] > 1 words (for example a 64-bit stream) is sent as
// that many consecutive packets of its stream, low word first; its FIFO word
// is popped with the last of them. Packets of different streams may
// interleave, since each goes to its own destination port.
//
// Interface (NoC clock): f_valid/f_ready/f_data per output FIFO; my_pe,
// dst_pe[], dst_port[] routing table (static during a run); pkt/pkt_valid/
// pkt_ready towards the NoC. A word popped at a clock edge is on pkt from
// that edge on (one cycle latency).
// From the source design: 32-bit payload in a 49-bit packet, one NoC channel
// per interface shared by several streams, streams of 32 and 64 bits. Own
// choices: header layout, round-robin order (per packet), the routing table
// as ports, the word order of wide streams.
module noc_tx
  import refine_pkg::*;
#(
  parameter int unsigned N_OUT     = 2,
  // widest stream in words, and each stream's width in words
  parameter int unsigned MAX_WORDS = 1,
  parameter logic [N_OUT-1:0][WORDS_W-1:0] OUT_WORDS = {N_OUT{WORDS_W'(1)}}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PE_W-1:0]      my_pe,
  input  logic [PE_W-1:0]      dst_pe   [N_OUT],
  input  logic [PORT_W-1:0]    dst_port [N_OUT],
  input  logic                 f_valid  [N_OUT],
  output logic                 f_ready  [N_OUT],
  input  logic [MAX_WORDS*PAYLOAD_W-1:0] f_data [N_OUT],
  output noc_packet_t          pkt,
  output logic                 pkt_valid,
  input  logic                 pkt_ready
);

  localparam int unsigned IDX_W = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic             load;
  logic             grant_valid;
  logic [IDX_W-1:0] grant;
  logic [IDX_W-1:0] last;
  // next word to send of each stream's head FIFO word
  logic [WORDS_W-1:0] widx [N_OUT];
  logic               grant_last;

  always_comb begin
    load        = !pkt_valid || pkt_ready;
    grant_valid = 1'b0;
    grant       = '0;
    // Search from the stream after the last one served.
    for (int k = 1; k <= int'(N_OUT); k++) begin
      if (!grant_valid && f_valid[(int'(last) + k) % int'(N_OUT)]) begin
        grant_valid = 1'b1;
        grant       = IDX_W'((int'(last) + k) % int'(N_OUT));
      end
    end
    grant_last = (MAX_WORDS == 1) || (widx[grant] == OUT_WORDS[grant] - WORDS_W'(1));
    for (int j = 0; j < int'(N_OUT); j++) begin
      f_ready[j] = load && grant_valid && grant_last && (int'(grant) == j);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_valid <= 1'b0;
      pkt       <= '0;
      last      <= IDX_W'(N_OUT - 1);
      for (int j = 0; j < int'(N_OUT); j++) widx[j] <= '0;
    end else if (load) begin
      pkt_valid <= grant_valid;
      if (grant_valid) begin
        pkt.dst_pe   <= dst_pe[grant];
        pkt.dst_port <= dst_port[grant];
        pkt.src_pe   <= my_pe;
        pkt.src_port <= SPORT_W'(grant);
        pkt.payload  <= f_data[grant][PAYLOAD_W*int'(widx[grant]) +: PAYLOAD_W];
        last         <= grant;
        if (MAX_WORDS > 1) widx[grant] <= grant_last ? '0 : widx[grant] + WORDS_W'(1);
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    pkt_valid && !pkt_ready |=> pkt_valid && $stable(pkt));

endmodule
