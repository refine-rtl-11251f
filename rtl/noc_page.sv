// noc_page: what the overlay places around one user operator in a PR page:
// NUM_IF NoC leaf interfaces and the operator's stall counter.
//
// A page recombined from smaller pages keeps one NoC leaf per original page,
// so an operator with heavy traffic can spread its streams over several
// interfaces. Streams are handed out at elaboration time so that the summed
// stream width per interface is as even as possible, inputs and outputs
// separately: widest stream first, each to the interface with the smallest
// sum so far (the lowest-numbered on a tie). Outputs of 32, 32 and 64 bits on
// two interfaces thus give the 64-bit stream one interface and the two
// 32-bit streams the other. With equal widths this is round robin, stream s
// on interface s mod NUM_IF.
// The stall counter sees every stream of the operator, whichever interface
// carries it, so it stays one counter per operator.
//
// Interface: noc_clk for the NoC side, usr_clk (the page's operator clock) for
// the operator side and all counters. The NoC ports and my_pe are arrays over
// the interfaces. dst_pe/dst_port route output stream s: dst_pe must be the
// leaf that carries the destination stream. stall is the operator's stall
// condition of the current cycle.
// From the source design: several NoC interfaces per recombined page, the
// balancing rule (even sums of stream widths per interface), one stall
// counter per operator. Own choice: the greedy way of evening the sums, which
// is exact for the source design's example but not optimal in general.
module noc_page
  import refine_pkg::*;
#(
  parameter int unsigned NUM_IF    = 1,
  parameter int unsigned N_IN      = 2,
  parameter int unsigned N_OUT     = 2,
  // widest stream in 32-bit words, and each stream's width in words
  parameter int unsigned MAX_WORDS = 1,
  parameter logic [N_IN-1:0][WORDS_W-1:0]  IN_WORDS  = {N_IN{WORDS_W'(1)}},
  parameter logic [N_OUT-1:0][WORDS_W-1:0] OUT_WORDS = {N_OUT{WORDS_W'(1)}},
  parameter int unsigned DEPTH     = FIFO_DEPTH,
  parameter int unsigned COUNTER_W = refine_pkg::COUNTER_W,
  localparam int unsigned DW       = MAX_WORDS * PAYLOAD_W
) (
  input  logic                 noc_clk,
  input  logic                 noc_rst_n,
  input  logic                 usr_clk,
  input  logic                 usr_rst_n,
  input  logic                 cnt_en,
  input  logic                 cnt_clr,
  input  logic [PE_W-1:0]      my_pe    [NUM_IF],
  input  logic [PE_W-1:0]      dst_pe   [N_OUT],
  input  logic [PORT_W-1:0]    dst_port [N_OUT],
  // operator side
  output logic                 in_valid [N_IN],
  input  logic                 in_ready [N_IN],
  output logic [DW-1:0]        in_data  [N_IN],
  input  logic                 out_valid[N_OUT],
  output logic                 out_ready[N_OUT],
  input  logic [DW-1:0]        out_data [N_OUT],
  output logic                 stall,
  output logic [COUNTER_W-1:0] stall_count,
  output logic [COUNTER_W-1:0] in_full_count  [N_IN],
  output logic [COUNTER_W-1:0] out_full_count [N_OUT],
  // NoC side, one channel pair per interface
  output noc_packet_t          tx_pkt   [NUM_IF],
  output logic                 tx_valid [NUM_IF],
  input  logic                 tx_ready [NUM_IF],
  input  noc_packet_t          rx_pkt   [NUM_IF],
  input  logic                 rx_valid [NUM_IF],
  output logic                 rx_ready [NUM_IF]
);

  // Interface that carries input stream s / output stream s: streams taken
  // widest first, each given to the interface whose width sum is smallest.
  function automatic int unsigned in_if(int unsigned s);
    int unsigned sum [NUM_IF];
    int unsigned res, best;
    res = 0;
    for (int unsigned k = 0; k < NUM_IF; k++) sum[k] = 0;
    for (int unsigned w = (1 << WORDS_W) - 1; w >= 1; w--) begin
      for (int unsigned t = 0; t < N_IN; t++) begin
        if (int'(IN_WORDS[t]) == int'(w)) begin
          best = 0;
          for (int unsigned k = 1; k < NUM_IF; k++) if (sum[k] < sum[best]) best = k;
          sum[best] += w;
          if (t == s) res = best;
        end
      end
    end
    return res;
  endfunction

  function automatic int unsigned out_if(int unsigned s);
    int unsigned sum [NUM_IF];
    int unsigned res, best;
    res = 0;
    for (int unsigned k = 0; k < NUM_IF; k++) sum[k] = 0;
    for (int unsigned w = (1 << WORDS_W) - 1; w >= 1; w--) begin
      for (int unsigned t = 0; t < N_OUT; t++) begin
        if (int'(OUT_WORDS[t]) == int'(w)) begin
          best = 0;
          for (int unsigned k = 1; k < NUM_IF; k++) if (sum[k] < sum[best]) best = k;
          sum[best] += w;
          if (t == s) res = best;
        end
      end
    end
    return res;
  endfunction

  function automatic logic [N_IN-1:0] in_mask(int unsigned k);
    logic [N_IN-1:0] m;
    for (int unsigned s = 0; s < N_IN; s++) m[s] = (in_if(s) == k);
    return m;
  endfunction

  function automatic logic [N_OUT-1:0] out_mask(int unsigned k);
    logic [N_OUT-1:0] m;
    for (int unsigned s = 0; s < N_OUT; s++) m[s] = (out_if(s) == k);
    return m;
  endfunction

  // interface of each stream, fixed at elaboration
  typedef int unsigned if_of_in_t  [N_IN];
  typedef int unsigned if_of_out_t [N_OUT];

  function automatic if_of_in_t in_map();
    for (int unsigned s = 0; s < N_IN; s++) in_map[s] = in_if(s);
  endfunction

  function automatic if_of_out_t out_map();
    for (int unsigned s = 0; s < N_OUT; s++) out_map[s] = out_if(s);
  endfunction

  localparam if_of_in_t  IN_IF  = in_map();
  localparam if_of_out_t OUT_IF = out_map();

  logic                 if_in_valid  [NUM_IF][N_IN];
  logic [DW-1:0]        if_in_data   [NUM_IF][N_IN];
  logic                 if_out_ready [NUM_IF][N_OUT];
  logic [N_IN-1:0]      if_in_empty  [NUM_IF];
  logic [N_OUT-1:0]     if_out_full  [NUM_IF];
  logic [COUNTER_W-1:0] if_in_cnt    [NUM_IF][N_IN];
  logic [COUNTER_W-1:0] if_out_cnt   [NUM_IF][N_OUT];
  logic [N_IN-1:0]      in_empty;
  logic [N_OUT-1:0]     out_full;
  logic [N_IN-1:0]      in_ready_v;
  logic [N_OUT-1:0]     out_valid_v;

  for (genvar k = 0; k < NUM_IF; k++) begin : g_if
    noc_interface #(
      .N_IN      (N_IN),
      .N_OUT     (N_OUT),
      .IN_MASK   (in_mask(k)),
      .OUT_MASK  (out_mask(k)),
      .MAX_WORDS (MAX_WORDS),
      .IN_WORDS  (IN_WORDS),
      .OUT_WORDS (OUT_WORDS),
      .DEPTH     (DEPTH),
      .COUNTER_W (COUNTER_W)
    ) u_if (
      .noc_clk        (noc_clk),
      .noc_rst_n      (noc_rst_n),
      .usr_clk        (usr_clk),
      .usr_rst_n      (usr_rst_n),
      .cnt_en         (cnt_en),
      .cnt_clr        (cnt_clr),
      .my_pe          (my_pe[k]),
      .dst_pe         (dst_pe),
      .dst_port       (dst_port),
      .in_valid       (if_in_valid[k]),
      .in_ready       (in_ready),
      .in_data        (if_in_data[k]),
      .out_valid      (out_valid),
      .out_ready      (if_out_ready[k]),
      .out_data       (out_data),
      .in_empty       (if_in_empty[k]),
      .out_full       (if_out_full[k]),
      .in_full_count  (if_in_cnt[k]),
      .out_full_count (if_out_cnt[k]),
      .tx_pkt         (tx_pkt[k]),
      .tx_valid       (tx_valid[k]),
      .tx_ready       (tx_ready[k]),
      .rx_pkt         (rx_pkt[k]),
      .rx_valid       (rx_valid[k]),
      .rx_ready       (rx_ready[k])
    );
  end

  // Each stream takes its signals from the interface that carries it.
  always_comb begin
    for (int unsigned s = 0; s < N_IN; s++) begin
      in_valid[s]      = if_in_valid[IN_IF[s]][s];
      in_data[s]       = if_in_data[IN_IF[s]][s];
      in_empty[s]      = if_in_empty[IN_IF[s]][s];
      in_full_count[s] = if_in_cnt[IN_IF[s]][s];
      in_ready_v[s]    = in_ready[s];
    end
    for (int unsigned s = 0; s < N_OUT; s++) begin
      out_ready[s]      = if_out_ready[OUT_IF[s]][s];
      out_full[s]       = if_out_full[OUT_IF[s]][s];
      out_full_count[s] = if_out_cnt[OUT_IF[s]][s];
      out_valid_v[s]    = out_valid[s];
    end
  end

  stall_counter #(.N_IN(N_IN), .N_OUT(N_OUT), .COUNTER_W(COUNTER_W)) u_stall (
    .clk       (usr_clk),
    .rst_n     (usr_rst_n),
    .cnt_en    (cnt_en),
    .cnt_clr   (cnt_clr),
    .in_empty  (in_empty),
    .in_ready  (in_ready_v),
    .out_full  (out_full),
    .out_valid (out_valid_v),
    .stall     (stall),
    .count     (stall_count)
  );

endmodule
