// refine_pkg: constants and types shared by the stream-monitoring overlay.
//
// The overlay joins streaming operators either through a packet-switched NoC
// (one leaf interface per partially reconfigurable page) or, in the final
// monolithic build, directly through FIFOs. Both builds carry event counters
// on the stream FIFOs so that the operator limiting throughput can be found
// from counts read after a run.
//
// Numbers that follow the source design: 28-bit counters, 32-bit payload,
// 49-bit NoC packet, 24 NoC leaf PEs of which two serve configuration and DMA.
// This design's own choice: the split of the 17 header bits (destination PE,
// destination port, source PE, source port), the FIFO depth of 2048 words and
// carrying a stream wider than 32 bits as consecutive packets.
package refine_pkg;

  // Event counter width (stall and full counters).
  localparam int unsigned COUNTER_W  = 28;
  // NoC payload and packet width.
  localparam int unsigned PAYLOAD_W  = 32;
  localparam int unsigned PACKET_W   = 49;
  // Leaf processing elements on the NoC; two of them are used for the NoC
  // configuration and for DMA, the rest host PR pages.
  localparam int unsigned NUM_PE     = 24;
  localparam int unsigned NUM_PAGES  = NUM_PE - 2;
  localparam int unsigned PE_W       = 5;   // enough to address 24 PEs
  localparam int unsigned PORT_W     = 4;   // stream port number at a leaf
  localparam int unsigned SPORT_W    = 3;   // source port number
  // Stream FIFO depth: 2048 x 32 bit is two 36 Kb block RAMs per FIFO.
  localparam int unsigned FIFO_DEPTH = 2048;
  // A stream is a whole number of 32-bit words wide (a 64-bit stream is two
  // words); WORDS_W bits hold a stream's word count, so up to 7 words.
  localparam int unsigned WORDS_W    = 3;

  // 49-bit packet: 17 header bits followed by the 32-bit payload.
  typedef struct packed {
    logic [PE_W-1:0]      dst_pe;
    logic [PORT_W-1:0]    dst_port;
    logic [PE_W-1:0]      src_pe;
    logic [SPORT_W-1:0]   src_port;
    logic [PAYLOAD_W-1:0] payload;
  } noc_packet_t;

  typedef logic [COUNTER_W-1:0] count_t;

endpackage
