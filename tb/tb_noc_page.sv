// tb_noc_page: an operator page with two NoC leaf interfaces, two input and
// two output streams, 8-deep FIFOs. Each interface's channel is looped back
// to itself with output stream j routed to input stream j.
// Checks: stream 0 travels only over interface 0 and stream 1 only over
// interface 1 (the balanced split); data returns in order; the operator's
// stall output follows the rule over all four streams, whichever interface
// carries them, and the single stall count equals the number of enabled
// stall cycles. With both output streams written every cycle, the two
// interfaces must together carry more than one packet per NoC cycle, which a
// single interface cannot.
module tb_noc_page;
  import refine_pkg::*;
  localparam int NIF = 2, NI = 2, NO = 2, D = 8, CW = 16;
  logic noc_clk = 0, usr_clk = 0, noc_rst_n = 0, usr_rst_n = 0;
  logic cnt_en, cnt_clr;
  logic [PE_W-1:0]      my_pe    [NIF];
  logic [PE_W-1:0]      dst_pe   [NO];
  logic [PORT_W-1:0]    dst_port [NO];
  logic                 in_valid [NI];
  logic                 in_ready [NI];
  logic [PAYLOAD_W-1:0] in_data  [NI];
  logic                 out_valid[NO];
  logic                 out_ready[NO];
  logic [PAYLOAD_W-1:0] out_data [NO];
  logic                 stall;
  logic [CW-1:0]        stall_count;
  logic [CW-1:0]        in_full_count  [NI];
  logic [CW-1:0]        out_full_count [NO];
  noc_packet_t          tx_pkt   [NIF];
  logic                 tx_valid [NIF];
  logic                 tx_ready [NIF];
  noc_packet_t          rx_pkt   [NIF];
  logic                 rx_valid [NIF];
  logic                 rx_ready [NIF];

  int checks = 0, failures = 0;
  logic [31:0] sb [NO][$];
  int seq [NO];
  bit taken_o [NO] = '{default: 0};
  int ref_stall = 0, n_rx = 0, stall_cycles = 0;
  int rd_pct = 50, wr_pct = 60;
  bit stop = 0;
  int pk_noc = 0, noc_cycles = 0;
  bit meas = 0;

  noc_page #(.NUM_IF(NIF), .N_IN(NI), .N_OUT(NO), .DEPTH(D), .COUNTER_W(CW)) dut (.*);

  for (genvar k = 0; k < NIF; k++) begin : g_loop
    assign rx_pkt[k]   = tx_pkt[k];
    assign rx_valid[k] = tx_valid[k];
    assign tx_ready[k] = rx_ready[k];
  end

  // Same clock for NoC and operator so the page can offer two words a cycle.
  always #5 noc_clk = ~noc_clk;
  always #5 usr_clk = ~usr_clk;

  initial begin
    repeat (100000) @(posedge noc_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge noc_clk) if (noc_rst_n) begin
    if (meas) noc_cycles++;
    for (int k = 0; k < NIF; k++) if (tx_valid[k] && tx_ready[k]) begin
      checks++;
      if (meas) pk_noc++;
      if (int'(tx_pkt[k].src_port) != k || tx_pkt[k].src_pe != my_pe[k]) begin
        failures++; $display("stream %0d seen on interface %0d", tx_pkt[k].src_port, k);
      end
    end
  end

  always @(negedge usr_clk) if (usr_rst_n) begin
    for (int j = 0; j < NO; j++) begin
      if (!(out_valid[j] && !taken_o[j])) begin
        out_valid[j] = !stop && (($urandom % 100) < wr_pct);
        out_data[j]  = {8'(j), 24'(seq[j])};
      end
    end
    for (int i = 0; i < NI; i++) in_ready[i] = ($urandom % 100) < rd_pct;
    #1;
    begin
      bit e;
      e = 0;
      for (int i = 0; i < NI; i++) e |= (!in_valid[i] && in_ready[i]);
      for (int j = 0; j < NO; j++) e |= (!out_ready[j] && out_valid[j]);
      checks++;
      if (stall !== e) begin failures++; $display("stall=%0b expected %0b", stall, e); end
    end
  end

  always @(posedge usr_clk) if (usr_rst_n) begin
    if (stall) stall_cycles++;
    if (cnt_clr) ref_stall = 0;
    else if (cnt_en && stall) ref_stall++;
    for (int j = 0; j < NO; j++) taken_o[j] = out_valid[j] && out_ready[j];
    for (int j = 0; j < NO; j++) if (out_valid[j] && out_ready[j]) begin
      sb[j].push_back(out_data[j]);
      seq[j]++;
    end
    for (int i = 0; i < NI; i++) if (in_valid[i] && in_ready[i]) begin
      logic [31:0] e;
      checks++;
      n_rx++;
      e = sb[i].pop_front();
      if (in_data[i] !== e) begin failures++; $display("stream %0d got %h expected %h", i, in_data[i], e); end
    end
    #1;
    checks++;
    if (int'(stall_count) != ref_stall) begin
      failures++; $display("stall_count=%0d expected %0d", stall_count, ref_stall);
    end
  end

  initial begin
    my_pe[0] = 5'd4; my_pe[1] = 5'd5;
    for (int j = 0; j < NO; j++) begin
      dst_pe[j] = PE_W'(4 + j); dst_port[j] = PORT_W'(j);
      out_valid[j] = 0; out_data[j] = 0; in_ready[j] = 0; seq[j] = 0;
    end
    cnt_en = 0; cnt_clr = 0;
    #33 noc_rst_n = 1; usr_rst_n = 1;
    @(negedge usr_clk) cnt_en = 1;
    repeat (2000) @(posedge usr_clk);
    @(negedge usr_clk) cnt_clr = 1;
    @(negedge usr_clk) cnt_clr = 0;
    // full-rate phase: both streams written and read every cycle
    rd_pct = 100; wr_pct = 100;
    repeat (50) @(posedge usr_clk);
    meas = 1;
    repeat (400) @(posedge usr_clk);
    meas = 0;
    checks++;
    if (pk_noc * 10 < noc_cycles * 15) begin
      failures++; $display("two interfaces carried %0d packets in %0d cycles", pk_noc, noc_cycles);
    end
    @(negedge usr_clk) stop = 1;
    repeat (200) @(posedge usr_clk);
    checks++;
    if (sb[0].size() != 0 || sb[1].size() != 0 || n_rx < 500 || stall_cycles == 0) begin
      failures++; $display("left %0d %0d, received %0d, stalls %0d", sb[0].size(), sb[1].size(), n_rx, stall_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
