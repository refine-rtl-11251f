// tb_refine_top: end-to-end run of both builds at reduced size (5 pages, two
// NoC leaves per page, three output streams per page, 16-deep FIFOs, three
// monolithic operators), with the NoC replaced by a crossbar model.
//
// NoC build, phase A (operator bottleneck): page 0 acts as the DMA source and
// sink; pages 1..3 hold operator models in a chain 0 -> 1 -> 2 -> 3 -> 0, each
// on its own clock, and page 2 is slow. Every word must come back with all
// operators' additions, in order. Stall counts, normalised by clock period,
// must single out page 2.
// Phase B (NoC bandwidth): page 0 writes its three output streams at full
// rate to page 4. Streams 0 and 2 share leaf 0 of page 0, stream 1 has leaf 1
// to itself. The full-count difference (sender output FIFO minus receiver
// input FIFO) must flag streams 0 and 2 as NoC-limited and not stream 1.
// Monolithic build: three operators, the middle one slow, must return every
// word correctly and be identified by its stall count.
// Each mechanism (operator stall, input and output FIFO full, NoC
// backpressure, round-robin sharing of a leaf, use of a second leaf, counter
// clear, both bottleneck verdicts) is counted and must occur.
module tb_refine_top;
  import refine_pkg::*;
  localparam int NP = 5, IFS = 2, NI = 2, NO = 3, D = 16, CW = 28, MOPS = 3;
  localparam int NA = 500, NB = 400, NM = 400;

  localparam int SLOW = 2;       // slow page in phase A
  localparam int MSLOW = 1;      // slow monolithic operator
  localparam int NL = NP * IFS;  // NoC leaves

  // ---------------- top ports ----------------
  logic                 noc_clk = 0, noc_rst_n = 0;
  logic                 page_clk   [NP];
  logic                 page_rst_n [NP];
  logic                 cnt_en, cnt_clr;
  logic [PE_W-1:0]      my_pe    [NP][IFS];
  logic [PE_W-1:0]      dst_pe   [NP][NO];
  logic [PORT_W-1:0]    dst_port [NP][NO];
  logic                 op_in_valid  [NP][NI];
  logic                 op_in_ready  [NP][NI];
  logic [PAYLOAD_W-1:0] op_in_data   [NP][NI];
  logic                 op_out_valid [NP][NO];
  logic                 op_out_ready [NP][NO];
  logic [PAYLOAD_W-1:0] op_out_data  [NP][NO];
  logic                 page_stall          [NP];
  logic [CW-1:0]        page_stall_count    [NP];
  logic [CW-1:0]        page_in_full_count  [NP][NI];
  logic [CW-1:0]        page_out_full_count [NP][NO];
  noc_packet_t          leaf_tx_pkt   [NP][IFS];
  logic                 leaf_tx_valid [NP][IFS];
  logic                 leaf_tx_ready [NP][IFS];
  noc_packet_t          leaf_rx_pkt   [NP][IFS];
  logic                 leaf_rx_valid [NP][IFS];
  logic                 leaf_rx_ready [NP][IFS];
  logic                 host_clk = 0;
  logic                 mono_op_clk [MOPS];
  logic                 mono_rst_n = 0, mono_cnt_en, mono_cnt_clr;
  logic                 host_in_valid, host_in_ready, host_out_valid, host_out_ready;
  logic [PAYLOAD_W-1:0] host_in_data, host_out_data;
  logic                 mono_in_valid  [MOPS];
  logic                 mono_in_ready  [MOPS];
  logic [PAYLOAD_W-1:0] mono_in_data   [MOPS];
  logic                 mono_out_valid [MOPS];
  logic                 mono_out_ready [MOPS];
  logic [PAYLOAD_W-1:0] mono_out_data  [MOPS];
  logic                 mono_stall       [MOPS];
  logic [CW-1:0]        mono_stall_count [MOPS];
  logic [CW-1:0]        mono_full_count  [MOPS+1];

  int checks = 0, failures = 0;
  int phase = 0;

  // ---------------- clocks ----------------
  function automatic int page_period(int p);
    if (p == 0 || p == NP - 1) return 10;
    if (p == SLOW) return 12;
    return (p % 2 == 1) ? 20 : 16;
  endfunction
  function automatic int mono_period(int k);
    return (k % 3 == 0) ? 10 : (k % 3 == 1) ? 8 : 12;
  endfunction

  always #5 noc_clk = ~noc_clk;
  always #5 host_clk = ~host_clk;
  for (genvar p = 0; p < NP; p++) begin : g_clk
    initial begin
      page_clk[p] = 0;
      forever #(page_period(p) / 2) page_clk[p] = ~page_clk[p];
    end
  end
  for (genvar k = 0; k < MOPS; k++) begin : g_mclk
    initial begin
      mono_op_clk[k] = 0;
      forever #(mono_period(k) / 2) mono_op_clk[k] = ~mono_op_clk[k];
    end
  end

  longint noc_cycles = 0;
  always @(posedge noc_clk) noc_cycles <= noc_cycles + 1;

  initial begin
    wait (noc_cycles == 64'd5000000);
    failures++;
    $display("watchdog expired in phase %0d: chain %0d, mono %0d, phase B sink %0d",
             phase, snk_n, m_out, sinkB_total);
    for (int j = 0; j < NO; j++) $display("stream %0d sent %0d received %0d", j, src_n[j], sinkB_n[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- NoC model ----------------
  noc_packet_t n_tx_pkt [NL];
  logic        n_tx_valid [NL];
  logic        n_tx_ready [NL];
  noc_packet_t n_rx_pkt [NL];
  logic        n_rx_valid [NL];
  logic        n_rx_ready [NL];
  longint      delivered;

  for (genvar p = 0; p < NP; p++) begin : g_leaf
    for (genvar k = 0; k < IFS; k++) begin : g_k
      assign n_tx_pkt[p*IFS+k]     = leaf_tx_pkt[p][k];
      assign n_tx_valid[p*IFS+k]   = leaf_tx_valid[p][k];
      assign leaf_tx_ready[p][k]   = n_tx_ready[p*IFS+k];
      assign leaf_rx_pkt[p][k]     = n_rx_pkt[p*IFS+k];
      assign leaf_rx_valid[p][k]   = n_rx_valid[p*IFS+k];
      assign n_rx_ready[p*IFS+k]   = leaf_rx_ready[p][k];
    end
  end

  bft_noc_model #(.NL(NL), .PE_BASE(2)) u_noc (
    .clk (noc_clk), .rst_n (noc_rst_n),
    .tx_pkt (n_tx_pkt), .tx_valid (n_tx_valid), .tx_ready (n_tx_ready),
    .rx_pkt (n_rx_pkt), .rx_valid (n_rx_valid), .rx_ready (n_rx_ready),
    .delivered (delivered)
  );

  // PE address of the leaf that carries input stream s of page p.
  function automatic logic [PE_W-1:0] leaf_pe(int p, int s);
    return PE_W'(p * IFS + (s % IFS) + 2);
  endfunction

  // ---------------- mechanism counters ----------------
  int m_noc_backpressure = 0, m_rr_share = 0, m_second_leaf = 0;
  int m_stream_seen [NO];
  always @(posedge noc_clk) if (noc_rst_n) begin
    for (int p = 0; p < NP; p++) for (int k = 0; k < IFS; k++) begin
      if ((leaf_tx_valid[p][k] && !leaf_tx_ready[p][k]) ||
          (leaf_rx_valid[p][k] && !leaf_rx_ready[p][k])) m_noc_backpressure++;
      if (p == 0 && k == 1 && leaf_tx_valid[p][k] && leaf_tx_ready[p][k]) m_second_leaf++;
    end
    if (phase == 2 && leaf_tx_valid[0][0] && leaf_tx_ready[0][0])
      m_stream_seen[leaf_tx_pkt[0][0].src_port]++;
  end

  // ---------------- operators on pages 1..NP-2 ----------------
  for (genvar p = 1; p < NP - 1; p++) begin : g_op
    stream_op_model #(.PERIOD(p == SLOW ? 3 : 1), .ADD(32'(p))) u_op (
      .clk (page_clk[p]), .rst_n (page_rst_n[p]),
      .in_valid (op_in_valid[p][0]), .in_ready (op_in_ready[p][0]), .in_data (op_in_data[p][0]),
      .out_valid (op_out_valid[p][0]), .out_ready (op_out_ready[p][0]), .out_data (op_out_data[p][0])
    );
    for (genvar i = 1; i < NI; i++) begin : g_i
      assign op_in_ready[p][i] = 1'b0;
    end
    for (genvar j = 1; j < NO; j++) begin : g_j
      assign op_out_valid[p][j] = 1'b0;
      assign op_out_data[p][j]  = '0;
    end
  end

  // ---------------- page 0: source and sink ----------------
  int src_n [NO];
  int snk_n = 0;
  localparam int SUMADD = (NP - 2) * (NP - 1) / 2;   // 1 + 2 + ... + (NP-2)

  logic                 p0_out_valid [NO];
  logic [PAYLOAD_W-1:0] p0_out_data  [NO];
  bit                   p0_taken     [NO] = '{default: 0};
  for (genvar j = 0; j < NO; j++) begin : g_p0out
    assign op_out_valid[0][j] = p0_out_valid[j];
    assign op_out_data[0][j]  = p0_out_data[j];
  end
  for (genvar i = 0; i < NI; i++) begin : g_p0in
    assign op_in_ready[0][i] = (i == 0) && page_rst_n[0];
  end

  always @(negedge page_clk[0]) begin
    for (int j = 0; j < NO; j++) begin
      if (!(p0_out_valid[j] && !p0_taken[j])) begin
        p0_out_valid[j] = (phase == 1 && j == 0 && src_n[j] < NA) ||
                          (phase == 2 && src_n[j] < NB);
        p0_out_data[j]  = (phase == 1) ? 32'(src_n[j]) : {8'(j), 24'(src_n[j])};
      end
    end
  end

  always @(posedge page_clk[0]) if (page_rst_n[0]) begin
    for (int j = 0; j < NO; j++) begin
      p0_taken[j] = op_out_valid[0][j] && op_out_ready[0][j];
      if (p0_taken[j]) src_n[j]++;
    end
    if (op_in_valid[0][0] && op_in_ready[0][0]) begin
      checks++;
      if (op_in_data[0][0] !== 32'(snk_n + SUMADD)) begin
        failures++; $display("chain word %0d: got %0d expected %0d", snk_n, op_in_data[0][0], snk_n + SUMADD);
      end
      snk_n++;
    end
  end

  // ---------------- page NP-1: sink of phase B ----------------
  int sinkB_n [NO];
  int sinkB_total = 0;
  for (genvar i = 0; i < NI; i++) begin : g_sinkrdy
    assign op_in_ready[NP-1][i] = 1'b1;
  end
  for (genvar j = 0; j < NO; j++) begin : g_sinkout
    assign op_out_valid[NP-1][j] = 1'b0;
    assign op_out_data[NP-1][j]  = '0;
  end
  always @(posedge page_clk[NP-1]) if (page_rst_n[NP-1]) begin
    for (int i = 0; i < NI; i++) if (op_in_valid[NP-1][i]) begin
      int j;
      j = int'(op_in_data[NP-1][i][31:24]);
      checks++;
      if (j >= NO || (j % NI) != i || int'(op_in_data[NP-1][i][23:0]) != sinkB_n[j]) begin
        failures++; $display("sink input %0d got %h", i, op_in_data[NP-1][i]);
      end else sinkB_n[j]++;
      sinkB_total++;
    end
  end

  // ---------------- monolithic chain ----------------
  for (genvar k = 0; k < MOPS; k++) begin : g_mop
    stream_op_model #(.PERIOD(k == MSLOW ? 4 : 1), .ADD(32'(k + 1))) u_op (
      .clk (mono_op_clk[k]), .rst_n (mono_rst_n),
      .in_valid (mono_in_valid[k]), .in_ready (mono_in_ready[k]), .in_data (mono_in_data[k]),
      .out_valid (mono_out_valid[k]), .out_ready (mono_out_ready[k]), .out_data (mono_out_data[k])
    );
  end
  int m_in = 0, m_out = 0;
  localparam int MSUM = MOPS * (MOPS + 1) / 2;
  always @(negedge host_clk) begin
    host_in_valid  = mono_rst_n && m_in < NM;
    host_in_data   = 32'(m_in * 3);
    host_out_ready = 1'b1;
  end
  always @(posedge host_clk) if (mono_rst_n) begin
    if (host_in_valid && host_in_ready) m_in++;
    if (host_out_valid && host_out_ready) begin
      checks++;
      if (host_out_data !== 32'(m_out * 3 + MSUM)) begin
        failures++; $display("mono word %0d: got %0d", m_out, host_out_data);
      end
      m_out++;
    end
  end

  // ---------------- sequence ----------------
  task automatic wait_page0(int n);
    repeat (n) @(posedge page_clk[0]);
  endtask

  task automatic route_phase_a();
    for (int p = 0; p < NP; p++) for (int j = 0; j < NO; j++) begin
      int nxt;
      nxt = (p + 1 <= NP - 2) ? p + 1 : 0;
      dst_pe[p][j]   = leaf_pe(nxt, 0);
      dst_port[p][j] = '0;
    end
  endtask

  task automatic route_phase_b();
    for (int j = 0; j < NO; j++) begin
      dst_pe[0][j]   = leaf_pe(NP - 1, j % NI);
      dst_port[0][j] = PORT_W'(j % NI);
    end
  endtask

  int m_clear = 0, m_op_bottleneck = 0, m_noc_flag = 0, m_mono_bottleneck = 0;
  int m_stall = 0, m_in_full = 0, m_out_full = 0;

  initial begin
    for (int p = 0; p < NP; p++) begin
      page_rst_n[p] = 0;
      for (int k = 0; k < IFS; k++) my_pe[p][k] = PE_W'(p * IFS + k + 2);
    end
    for (int j = 0; j < NO; j++) begin
      src_n[j] = 0; sinkB_n[j] = 0; m_stream_seen[j] = 0;
      p0_out_valid[j] = 0; p0_out_data[j] = 0;
    end
    cnt_en = 0; cnt_clr = 0; mono_cnt_en = 0; mono_cnt_clr = 0;
    route_phase_a();
    #53;
    noc_rst_n = 1; mono_rst_n = 1;
    for (int p = 0; p < NP; p++) page_rst_n[p] = 1;
    cnt_en = 1; mono_cnt_en = 1;
    fork
      begin : nocrun
        // ---- phase A ----
        phase = 1;
        wait (snk_n == NA);
        wait_page0(50);
        cnt_en = 0;
        wait_page0(50);
        begin
          longint st [NP];
          int best;
          best = 1;
          for (int p = 1; p < NP - 1; p++) begin
            st[p] = longint'(page_stall_count[p]) * page_period(p);
            if (page_stall_count[p] > 0) m_stall++;
            if (st[p] < st[best]) best = p;
            $display("phase A page %0d: stall %0d (x%0d), in_full %0d, out_full %0d", p,
                     page_stall_count[p], page_period(p), page_in_full_count[p][0], page_out_full_count[p][0]);
          end
          checks++;
          if (best != SLOW) begin failures++; $display("bottleneck found at page %0d, expected %0d", best, SLOW); end
          else m_op_bottleneck++;
          if (page_in_full_count[SLOW][0] > 0) m_in_full++;
          if (page_out_full_count[SLOW-1][0] > 0) m_out_full++;
        end
        // ---- phase B ----
        route_phase_b();
        cnt_clr = 1;
        wait_page0(6);
        cnt_clr = 0;
        wait_page0(2);
        checks++;
        if (page_stall_count[1] == 0 && page_out_full_count[0][0] == 0 && page_in_full_count[SLOW][0] == 0) m_clear++;
        else begin failures++; $display("counter clear failed"); end
        for (int j = 0; j < NO; j++) src_n[j] = 0;
        cnt_en = 1;
        phase = 2;
        wait (sinkB_total == NB * NO);
        wait_page0(50);
        cnt_en = 0;
        wait_page0(50);
        for (int j = 0; j < NO; j++) begin
          int diff, shared, on_leaf;
          bit flag;
          diff = int'(page_out_full_count[0][j]) - int'(page_in_full_count[NP-1][j % NI]);
          flag = diff > NB / 10;
          on_leaf = 0;
          for (int q = 0; q < NO; q++) if (q % IFS == j % IFS) on_leaf++;
          shared = on_leaf > 1;
          $display("phase B stream %0d: out_full %0d, in_full %0d -> NoC-limited %0d (expected %0d)",
                   j, page_out_full_count[0][j], page_in_full_count[NP-1][j % NI], flag, shared);
          checks++;
          if (flag != shared) begin failures++; $display("NoC bandwidth verdict wrong for stream %0d", j); end
          if (flag) m_noc_flag++;
        end
        for (int j = 0; j < NO; j++) if (j % IFS == 0 && m_stream_seen[j] > 0) m_rr_share++;
      end
      begin : monorun
        wait (m_out == NM);
        repeat (20) @(posedge host_clk);
        mono_cnt_en = 0;
        repeat (20) @(posedge host_clk);
        begin
          longint st [MOPS];
          int best;
          best = 0;
          for (int k = 0; k < MOPS; k++) begin
            st[k] = longint'(mono_stall_count[k]) * mono_period(k);
            if (st[k] < st[best]) best = k;
          end
          checks++;
          if (best != MSLOW) begin failures++; $display("monolithic bottleneck at %0d", best); end
          else m_mono_bottleneck++;
        end
      end
    join
    // every mechanism must have happened
    checks++;
    if (m_stall == 0 || m_in_full == 0 || m_out_full == 0 || m_noc_backpressure == 0 ||
        m_rr_share < 2 || (IFS > 1 && m_second_leaf == 0) || m_clear == 0 ||
        m_op_bottleneck == 0 || m_noc_flag == 0 || m_mono_bottleneck == 0) begin
      failures++;
    end
    $display("mechanisms: stall %0d in_full %0d out_full %0d noc_backpressure %0d rr_share %0d second_leaf %0d clear %0d op_bottleneck %0d noc_flag %0d mono_bottleneck %0d",
             m_stall, m_in_full, m_out_full, m_noc_backpressure, m_rr_share, m_second_leaf,
             m_clear, m_op_bottleneck, m_noc_flag, m_mono_bottleneck);
    $display("NoC packets delivered %0d", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  refine_top #(
    .NUM_PAGES (NP), .PAGE_IFS (IFS), .N_IN (NI), .N_OUT (NO),
    .PIPE_STAGES (2), .DEPTH (D), .COUNTER_W (CW), .MONO_OPS (MOPS)
  ) dut (.*);
endmodule
