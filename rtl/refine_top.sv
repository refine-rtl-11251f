// refine_top: both builds of the bottleneck-monitoring overlay side by side.
//
// NoC build: NUM_PAGES partially reconfigurable pages, each holding one user
// operator behind PAGE_IFS NoC leaf interfaces (noc_page). Between each leaf
// and the NoC sit PIPE_STAGES skid-buffer stages per direction (noc_pipeline)
// so the links run at the 400 MHz NoC clock. The NoC itself (a butterfly fat
// tree), the operators and the host are outside this module: their signals
// are ports. Every page has its own operator clock; the counter enable and
// clear from the host are synchronized into each page clock.
//
// Monolithic build: mono_wrapper joins MONO_OPS operators directly through
// FIFOs, with the same stall and full counters.
//
// After a run the host reads the counts: the operator with the fewest stall
// cycles is the likely bottleneck, and an output FIFO that is full far more
// often than the input FIFO it feeds points to a NoC bandwidth limit.
//
// Defaults follow the source design where it gives numbers: 24 NoC leaf PEs,
// two of them used for configuration and DMA, hence 22 page leaves; 28-bit
// counters; 49-bit packets with 32-bit payload. Two input and two output
// streams per page, two pipeline stages, FIFO depth 2048 and a four-operator
// monolithic chain are this design's choices. Page streams are one 32-bit
// word wide by default; MAX_WORDS / IN_WORDS / OUT_WORDS make them wider (for
// example 64-bit streams), and the same widths then apply to every page.
// MONO_W sets the width of the monolithic chain's links.
module refine_top
  import refine_pkg::*;
#(
  parameter int unsigned NUM_PAGES   = refine_pkg::NUM_PAGES,
  parameter int unsigned PAGE_IFS    = 1,
  parameter int unsigned N_IN        = 2,
  parameter int unsigned N_OUT       = 2,
  // stream widths of every page operator, in 32-bit words
  parameter int unsigned MAX_WORDS   = 1,
  parameter logic [N_IN-1:0][WORDS_W-1:0]  IN_WORDS  = {N_IN{WORDS_W'(1)}},
  parameter logic [N_OUT-1:0][WORDS_W-1:0] OUT_WORDS = {N_OUT{WORDS_W'(1)}},
  parameter int unsigned PIPE_STAGES = 2,
  parameter int unsigned DEPTH       = FIFO_DEPTH,
  parameter int unsigned COUNTER_W   = refine_pkg::COUNTER_W,
  parameter int unsigned MONO_OPS    = 4,
  parameter int unsigned MONO_W      = PAYLOAD_W
) (
  // ---------------- NoC build ----------------
  input  logic                 noc_clk,
  input  logic                 noc_rst_n,
  input  logic                 page_clk   [NUM_PAGES],
  input  logic                 page_rst_n [NUM_PAGES],
  input  logic                 cnt_en,
  input  logic                 cnt_clr,
  input  logic [PE_W-1:0]      my_pe    [NUM_PAGES][PAGE_IFS],
  input  logic [PE_W-1:0]      dst_pe   [NUM_PAGES][N_OUT],
  input  logic [PORT_W-1:0]    dst_port [NUM_PAGES][N_OUT],
  output logic                 op_in_valid  [NUM_PAGES][N_IN],
  input  logic                 op_in_ready  [NUM_PAGES][N_IN],
  output logic [MAX_WORDS*PAYLOAD_W-1:0] op_in_data  [NUM_PAGES][N_IN],
  input  logic                 op_out_valid [NUM_PAGES][N_OUT],
  output logic                 op_out_ready [NUM_PAGES][N_OUT],
  input  logic [MAX_WORDS*PAYLOAD_W-1:0] op_out_data [NUM_PAGES][N_OUT],
  output logic                 page_stall          [NUM_PAGES],
  output logic [COUNTER_W-1:0] page_stall_count    [NUM_PAGES],
  output logic [COUNTER_W-1:0] page_in_full_count  [NUM_PAGES][N_IN],
  output logic [COUNTER_W-1:0] page_out_full_count [NUM_PAGES][N_OUT],
  output noc_packet_t          leaf_tx_pkt   [NUM_PAGES][PAGE_IFS],
  output logic                 leaf_tx_valid [NUM_PAGES][PAGE_IFS],
  input  logic                 leaf_tx_ready [NUM_PAGES][PAGE_IFS],
  input  noc_packet_t          leaf_rx_pkt   [NUM_PAGES][PAGE_IFS],
  input  logic                 leaf_rx_valid [NUM_PAGES][PAGE_IFS],
  output logic                 leaf_rx_ready [NUM_PAGES][PAGE_IFS],
  // ---------------- monolithic build ----------------
  input  logic                 host_clk,
  input  logic                 mono_op_clk [MONO_OPS],
  input  logic                 mono_rst_n,
  input  logic                 mono_cnt_en,
  input  logic                 mono_cnt_clr,
  input  logic                 host_in_valid,
  output logic                 host_in_ready,
  input  logic [MONO_W-1:0]    host_in_data,
  output logic                 host_out_valid,
  input  logic                 host_out_ready,
  output logic [MONO_W-1:0]    host_out_data,
  output logic                 mono_in_valid  [MONO_OPS],
  input  logic                 mono_in_ready  [MONO_OPS],
  output logic [MONO_W-1:0]    mono_in_data   [MONO_OPS],
  input  logic                 mono_out_valid [MONO_OPS],
  output logic                 mono_out_ready [MONO_OPS],
  input  logic [MONO_W-1:0]    mono_out_data  [MONO_OPS],
  output logic                 mono_stall       [MONO_OPS],
  output logic [COUNTER_W-1:0] mono_stall_count [MONO_OPS],
  output logic [COUNTER_W-1:0] mono_full_count  [MONO_OPS+1]
);

  for (genvar p = 0; p < NUM_PAGES; p++) begin : g_page
    logic        en_s, clr_s;
    noc_packet_t tx_pkt   [PAGE_IFS];
    logic        tx_valid [PAGE_IFS];
    logic        tx_ready [PAGE_IFS];
    noc_packet_t rx_pkt   [PAGE_IFS];
    logic        rx_valid [PAGE_IFS];
    logic        rx_ready [PAGE_IFS];

    bit_sync u_en  (.clk(page_clk[p]), .rst_n(page_rst_n[p]), .d(cnt_en),  .q(en_s));
    bit_sync u_clr (.clk(page_clk[p]), .rst_n(page_rst_n[p]), .d(cnt_clr), .q(clr_s));

    noc_page #(
      .NUM_IF    (PAGE_IFS),
      .N_IN      (N_IN),
      .N_OUT     (N_OUT),
      .MAX_WORDS (MAX_WORDS),
      .IN_WORDS  (IN_WORDS),
      .OUT_WORDS (OUT_WORDS),
      .DEPTH     (DEPTH),
      .COUNTER_W (COUNTER_W)
    ) u_page (
      .noc_clk        (noc_clk),
      .noc_rst_n      (noc_rst_n),
      .usr_clk        (page_clk[p]),
      .usr_rst_n      (page_rst_n[p]),
      .cnt_en         (en_s),
      .cnt_clr        (clr_s),
      .my_pe          (my_pe[p]),
      .dst_pe         (dst_pe[p]),
      .dst_port       (dst_port[p]),
      .in_valid       (op_in_valid[p]),
      .in_ready       (op_in_ready[p]),
      .in_data        (op_in_data[p]),
      .out_valid      (op_out_valid[p]),
      .out_ready      (op_out_ready[p]),
      .out_data       (op_out_data[p]),
      .stall          (page_stall[p]),
      .stall_count    (page_stall_count[p]),
      .in_full_count  (page_in_full_count[p]),
      .out_full_count (page_out_full_count[p]),
      .tx_pkt         (tx_pkt),
      .tx_valid       (tx_valid),
      .tx_ready       (tx_ready),
      .rx_pkt         (rx_pkt),
      .rx_valid       (rx_valid),
      .rx_ready       (rx_ready)
    );

    for (genvar k = 0; k < PAGE_IFS; k++) begin : g_link
      noc_pipeline #(.DATA_W(PACKET_W), .STAGES(PIPE_STAGES)) u_tx_pipe (
        .clk     (noc_clk),
        .rst_n   (noc_rst_n),
        .s_valid (tx_valid[k]),
        .s_ready (tx_ready[k]),
        .s_data  (tx_pkt[k]),
        .m_valid (leaf_tx_valid[p][k]),
        .m_ready (leaf_tx_ready[p][k]),
        .m_data  (leaf_tx_pkt[p][k])
      );
      noc_pipeline #(.DATA_W(PACKET_W), .STAGES(PIPE_STAGES)) u_rx_pipe (
        .clk     (noc_clk),
        .rst_n   (noc_rst_n),
        .s_valid (leaf_rx_valid[p][k]),
        .s_ready (leaf_rx_ready[p][k]),
        .s_data  (leaf_rx_pkt[p][k]),
        .m_valid (rx_valid[k]),
        .m_ready (rx_ready[k]),
        .m_data  (rx_pkt[k])
      );
    end
  end

  mono_wrapper #(
    .N_OPS     (MONO_OPS),
    .DATA_W    (MONO_W),
    .DEPTH     (DEPTH),
    .COUNTER_W (COUNTER_W)
  ) u_mono (
    .host_clk       (host_clk),
    .op_clk         (mono_op_clk),
    .rst_n          (mono_rst_n),
    .cnt_en         (mono_cnt_en),
    .cnt_clr        (mono_cnt_clr),
    .host_in_valid  (host_in_valid),
    .host_in_ready  (host_in_ready),
    .host_in_data   (host_in_data),
    .host_out_valid (host_out_valid),
    .host_out_ready (host_out_ready),
    .host_out_data  (host_out_data),
    .op_in_valid    (mono_in_valid),
    .op_in_ready    (mono_in_ready),
    .op_in_data     (mono_in_data),
    .op_out_valid   (mono_out_valid),
    .op_out_ready   (mono_out_ready),
    .op_out_data    (mono_out_data),
    .stall          (mono_stall),
    .stall_count    (mono_stall_count),
    .full_count     (mono_full_count)
  );

endmodule
