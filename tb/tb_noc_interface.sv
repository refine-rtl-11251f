// tb_noc_interface: one leaf interface with two input and two output streams
// and 8-deep FIFOs, its NoC channel looped back onto itself (output stream j
// is routed to input stream j). NoC clock 10 ns, operator clock 16 ns.
// Checks: every word written on output stream j comes back on input stream j
// in order, with a packet header naming this leaf; in_empty mirrors
// !in_valid; the output full counts equal the number of enabled operator
// cycles with out_full high, the input full counts the number of enabled NoC
// cycles with the input FIFO full; counts freeze while cnt_en is low and
// clear on cnt_clr. A slow reader must make both input and output FIFOs fill.
module tb_noc_interface;
  import refine_pkg::*;
  localparam int NI = 2, NO = 2, D = 8, CW = 16;
  logic noc_clk = 0, usr_clk = 0, noc_rst_n = 0, usr_rst_n = 0;
  logic cnt_en, cnt_clr;
  logic [PE_W-1:0]      my_pe;
  logic [PE_W-1:0]      dst_pe   [NO];
  logic [PORT_W-1:0]    dst_port [NO];
  logic                 in_valid [NI];
  logic                 in_ready [NI];
  logic [PAYLOAD_W-1:0] in_data  [NI];
  logic                 out_valid[NO];
  logic                 out_ready[NO];
  logic [PAYLOAD_W-1:0] out_data [NO];
  logic [NI-1:0]        in_empty;
  logic [NO-1:0]        out_full;
  logic [CW-1:0]        in_full_count  [NI];
  logic [CW-1:0]        out_full_count [NO];
  noc_packet_t          tx_pkt, rx_pkt;
  logic                 tx_valid, tx_ready, rx_valid, rx_ready;

  int checks = 0, failures = 0;
  logic [31:0] sb [NO][$];
  int ref_out [NO];
  int ref_in  [NI];
  int n_rx = 0, rd_pct = 10, wr_pct = 80;
  bit stop = 0;

  noc_interface #(.N_IN(NI), .N_OUT(NO), .DEPTH(D), .COUNTER_W(CW)) dut (.*);

  assign rx_pkt   = tx_pkt;
  assign rx_valid = tx_valid;
  assign tx_ready = rx_ready;

  always #5 noc_clk = ~noc_clk;
  always #8 usr_clk = ~usr_clk;

  initial begin
    repeat (100000) @(posedge noc_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // header check on the NoC side
  always @(posedge noc_clk) if (noc_rst_n && tx_valid && tx_ready) begin
    checks++;
    if (tx_pkt.src_pe != my_pe || tx_pkt.dst_pe != dst_pe[tx_pkt.src_port]) begin
      failures++; $display("bad header %h", tx_pkt);
    end
  end

  // operator side: writer, reader, counter models
  logic [NI-1:0] rfull;
  assign rfull = {dut.g_in[1].g_used.w_full, dut.g_in[0].g_used.w_full};

  int seq [NO];
  bit taken_o [NO] = '{default: 0};

  // input FIFO full counts are kept in the NoC clock, with the interface's
  // synchronized enable and clear
  always @(posedge noc_clk) if (noc_rst_n) begin
    for (int i = 0; i < NI; i++) begin
      if (dut.noc_cnt_clr) ref_in[i] = 0;
      else if (dut.noc_cnt_en && rfull[i]) ref_in[i]++;
      if (rfull[i]) rfull_cycles++;
    end
    #1;
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (int'(in_full_count[i]) != ref_in[i]) begin
        failures++; $display("in_full_count[%0d]=%0d expected %0d", i, in_full_count[i], ref_in[i]);
      end
    end
  end
  int full_cycles = 0, rfull_cycles = 0;

  always @(negedge usr_clk) if (usr_rst_n) begin
    for (int j = 0; j < NO; j++) begin
      if (!(out_valid[j] && !taken_o[j])) begin
        out_valid[j] = !stop && (($urandom % 100) < wr_pct);
        out_data[j]  = {8'(j), 24'(seq[j])};
      end
    end
    for (int i = 0; i < NI; i++) in_ready[i] = ($urandom % 100) < rd_pct;
  end

  always @(posedge usr_clk) if (usr_rst_n) begin
    for (int j = 0; j < NO; j++) begin
      if (cnt_clr) ref_out[j] = 0;
      else if (cnt_en && out_full[j]) ref_out[j]++;
      if (out_full[j]) full_cycles++;
      taken_o[j] = out_valid[j] && out_ready[j];
      if (out_valid[j] && out_ready[j]) begin
        sb[j].push_back(out_data[j]);
        seq[j]++;
      end
    end
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (in_empty[i] !== !in_valid[i]) begin failures++; $display("in_empty wrong"); end
      if (in_valid[i] && in_ready[i]) begin
        logic [31:0] e;
        checks++;
        n_rx++;
        e = sb[i].pop_front();
        if (in_data[i] !== e) begin failures++; $display("stream %0d got %h expected %h", i, in_data[i], e); end
      end
    end
    #1;
    for (int j = 0; j < NO; j++) begin
      checks++;
      if (int'(out_full_count[j]) != ref_out[j]) begin
        failures++; $display("out_full_count[%0d]=%0d expected %0d", j, out_full_count[j], ref_out[j]);
      end
    end
  end

  initial begin
    my_pe = 5'd9;
    for (int j = 0; j < NO; j++) begin
      dst_pe[j] = 5'd9; dst_port[j] = PORT_W'(j);
      out_valid[j] = 0; out_data[j] = 0; in_ready[j] = 0; seq[j] = 0;
      ref_out[j] = 0; ref_in[j] = 0;
    end
    cnt_en = 0; cnt_clr = 0;
    #33 noc_rst_n = 1; usr_rst_n = 1;
    @(negedge usr_clk) cnt_en = 1;
    repeat (1500) @(posedge usr_clk);       // slow reader: FIFOs fill
    @(negedge usr_clk) cnt_en = 0;
    rd_pct = 90;
    repeat (300) @(posedge usr_clk);        // counting paused
    @(negedge usr_clk) cnt_clr = 1;
    @(negedge usr_clk) cnt_clr = 0; cnt_en = 1;
    repeat (1500) @(posedge usr_clk);
    @(negedge usr_clk) stop = 1;
    repeat (200) @(posedge usr_clk);
    checks++;
    if (sb[0].size() != 0 || sb[1].size() != 0 || n_rx < 500) begin
      failures++; $display("words lost: %0d %0d left, %0d received", sb[0].size(), sb[1].size(), n_rx);
    end
    checks++;
    if (full_cycles == 0 || rfull_cycles == 0) begin
      failures++; $display("FIFOs never filled (%0d %0d)", full_cycles, rfull_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
