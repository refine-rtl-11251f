// noc_interface: one leaf interface between a user operator in a PR page and
// the packet-switched NoC, with the counters used to find bottlenecks.
//
// Each input stream has a dual-clock FIFO written from the NoC (through
// noc_rx) and read by the operator; each output stream has one written by the
// operator and drained into the NoC (through noc_tx). The NoC side runs on the
// 400 MHz NoC clock, the operator side on the page's own clock, so operators
// can be given different clocks without touching the NoC. Every FIFO has a
// full counter on its write side, where the full flag is exact: output FIFOs
// count in the operator's clock, input FIFOs in the NoC clock (cnt_en and
// cnt_clr are synchronized into it). The in_empty/out_full flags are also brought out so that the operator's stall
// counter (which may span several interfaces) can be formed outside.
//
// An operator on a large page can own several interfaces. IN_MASK / OUT_MASK
// select which of the operator's streams this interface carries; for the
// others no FIFO is built, their flags read as 0 and their counts as 0.
//
// Streams may be wider than one 32-bit NoC word: IN_WORDS / OUT_WORDS give
// each stream's width in words and MAX_WORDS the width of the data ports.
// Each FIFO holds whole stream words of its own width; noc_tx sends a wide
// word as consecutive packets and noc_rx reassembles it.
//
// Interface:
//   NoC clock : my_pe, dst_pe[], dst_port[] routing table; tx_* packets out,
//               rx_* packets in (valid/ready).
//   user clock: in_* (valid/ready/data) to the operator, out_* from it;
//               in_empty[], out_full[] flags; cnt_en/cnt_clr; output full
//               counts. in_full_count[] is kept in the NoC clock; read it
//               when the run has stopped.
// From the source design: FIFOs and counters in the interface, 28-bit
// counters, 32-bit streams, asynchronous FIFOs between the operator and NoC
// clocks, several interfaces per recombined page, 32- and 64-bit streams.
// Own choices: the masks, the counter control inputs, FIFO depth 2048,
// splitting wide words into packets.
module noc_interface
  import refine_pkg::*;
#(
  parameter int unsigned     N_IN      = 2,
  parameter int unsigned     N_OUT     = 2,
  parameter logic [N_IN-1:0]  IN_MASK  = '1,
  parameter logic [N_OUT-1:0] OUT_MASK = '1,
  parameter int unsigned     MAX_WORDS = 1,
  parameter logic [N_IN-1:0][WORDS_W-1:0]  IN_WORDS  = {N_IN{WORDS_W'(1)}},
  parameter logic [N_OUT-1:0][WORDS_W-1:0] OUT_WORDS = {N_OUT{WORDS_W'(1)}},
  parameter int unsigned     DEPTH     = FIFO_DEPTH,
  parameter int unsigned     COUNTER_W = refine_pkg::COUNTER_W,
  localparam int unsigned    DW        = MAX_WORDS * PAYLOAD_W
) (
  input  logic                 noc_clk,
  input  logic                 noc_rst_n,
  input  logic                 usr_clk,
  input  logic                 usr_rst_n,
  input  logic                 cnt_en,
  input  logic                 cnt_clr,
  // routing table (NoC clock, static during a run)
  input  logic [PE_W-1:0]      my_pe,
  input  logic [PE_W-1:0]      dst_pe   [N_OUT],
  input  logic [PORT_W-1:0]    dst_port [N_OUT],
  // operator side
  output logic                 in_valid [N_IN],
  input  logic                 in_ready [N_IN],
  output logic [DW-1:0]        in_data  [N_IN],
  input  logic                 out_valid[N_OUT],
  output logic                 out_ready[N_OUT],
  input  logic [DW-1:0]        out_data [N_OUT],
  output logic [N_IN-1:0]      in_empty,
  output logic [N_OUT-1:0]     out_full,
  output logic [COUNTER_W-1:0] in_full_count  [N_IN],
  output logic [COUNTER_W-1:0] out_full_count [N_OUT],
  // NoC side
  output noc_packet_t          tx_pkt,
  output logic                 tx_valid,
  input  logic                 tx_ready,
  input  noc_packet_t          rx_pkt,
  input  logic                 rx_valid,
  output logic                 rx_ready
);

  logic                 rxw_valid [N_IN];
  logic                 rxw_ready [N_IN];
  logic [DW-1:0]        rxw_data  [N_IN];
  logic                 txr_valid [N_OUT];
  logic                 txr_ready [N_OUT];
  logic [DW-1:0]        txr_data  [N_OUT];

  noc_rx #(.N_IN(N_IN), .MAX_WORDS(MAX_WORDS), .IN_WORDS(IN_WORDS)) u_rx (
    .clk       (noc_clk),
    .rst_n     (noc_rst_n),
    .pkt       (rx_pkt),
    .pkt_valid (rx_valid),
    .pkt_ready (rx_ready),
    .w_valid   (rxw_valid),
    .w_ready   (rxw_ready),
    .w_data    (rxw_data)
  );

  noc_tx #(.N_OUT(N_OUT), .MAX_WORDS(MAX_WORDS), .OUT_WORDS(OUT_WORDS)) u_tx (
    .clk       (noc_clk),
    .rst_n     (noc_rst_n),
    .my_pe     (my_pe),
    .dst_pe    (dst_pe),
    .dst_port  (dst_port),
    .f_valid   (txr_valid),
    .f_ready   (txr_ready),
    .f_data    (txr_data),
    .pkt       (tx_pkt),
    .pkt_valid (tx_valid),
    .pkt_ready (tx_ready)
  );

  // Counter controls in the NoC clock, for the input FIFOs' full counters.
  logic noc_cnt_en, noc_cnt_clr;
  bit_sync u_sync_en  (.clk(noc_clk), .rst_n(noc_rst_n), .d(cnt_en),  .q(noc_cnt_en));
  bit_sync u_sync_clr (.clk(noc_clk), .rst_n(noc_rst_n), .d(cnt_clr), .q(noc_cnt_clr));

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    if (IN_MASK[i]) begin : g_used
      localparam int unsigned SW = PAYLOAD_W * int'(IN_WORDS[i]);
      logic          w_full;
      logic [SW-1:0] r_data;
      async_fifo #(.DATA_W(SW), .DEPTH(DEPTH)) u_fifo (
        .wclk    (noc_clk),
        .wrst_n  (noc_rst_n),
        .w_valid (rxw_valid[i]),
        .w_ready (rxw_ready[i]),
        .w_data  (rxw_data[i][SW-1:0]),
        .w_full  (w_full),
        .rclk    (usr_clk),
        .rrst_n  (usr_rst_n),
        .r_valid (in_valid[i]),
        .r_ready (in_ready[i]),
        .r_data  (r_data),
        .r_empty (in_empty[i])
      );
      assign in_data[i] = DW'(r_data);
      full_counter #(.COUNTER_W(COUNTER_W)) u_full (
        .clk     (noc_clk),
        .rst_n   (noc_rst_n),
        .cnt_en  (noc_cnt_en),
        .cnt_clr (noc_cnt_clr),
        .full    (w_full),
        .count   (in_full_count[i])
      );
    end else begin : g_unused
      // Carried by another interface of the same operator; packets that
      // still arrive for this port are dropped.
      assign rxw_ready[i]     = 1'b1;
      assign in_valid[i]      = 1'b0;
      assign in_data[i]       = '0;
      assign in_empty[i]      = 1'b0;
      assign in_full_count[i] = '0;
    end
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    if (OUT_MASK[j]) begin : g_used
      localparam int unsigned SW = PAYLOAD_W * int'(OUT_WORDS[j]);
      logic [SW-1:0] r_data;
      async_fifo #(.DATA_W(SW), .DEPTH(DEPTH)) u_fifo (
        .wclk    (usr_clk),
        .wrst_n  (usr_rst_n),
        .w_valid (out_valid[j]),
        .w_ready (out_ready[j]),
        .w_data  (out_data[j][SW-1:0]),
        .w_full  (out_full[j]),
        .rclk    (noc_clk),
        .rrst_n  (noc_rst_n),
        .r_valid (txr_valid[j]),
        .r_ready (txr_ready[j]),
        .r_data  (r_data),
        .r_empty ()
      );
      assign txr_data[j] = DW'(r_data);
      full_counter #(.COUNTER_W(COUNTER_W)) u_full (
        .clk     (usr_clk),
        .rst_n   (usr_rst_n),
        .cnt_en  (cnt_en),
        .cnt_clr (cnt_clr),
        .full    (out_full[j]),
        .count   (out_full_count[j])
      );
    end else begin : g_unused
      assign out_ready[j]      = 1'b0;
      assign out_full[j]       = 1'b0;
      assign txr_valid[j]      = 1'b0;
      assign txr_data[j]       = '0;
      assign out_full_count[j] = '0;
    end
  end

endmodule
