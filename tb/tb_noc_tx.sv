// tb_noc_tx: three output FIFOs (modelled as queues) feeding the packetiser,
// with a randomly stalling NoC. Each packet must carry the word popped from a
// FIFO together with that stream's destination PE and port, this leaf's PE
// and the stream number, in pop order. Whenever all three FIFOs hold data the
// grants must rotate 0, 1, 2, 0, ...; with the NoC always ready one packet
// must leave every cycle.
module tb_noc_tx;
  import refine_pkg::*;
  localparam int NO = 3;
  logic clk = 0, rst_n = 0;
  logic [PE_W-1:0]      my_pe;
  logic [PE_W-1:0]      dst_pe   [NO];
  logic [PORT_W-1:0]    dst_port [NO];
  logic                 f_valid  [NO];
  logic                 f_ready  [NO];
  logic [PAYLOAD_W-1:0] f_data   [NO];
  noc_packet_t          pkt;
  logic                 pkt_valid, pkt_ready;
  int checks = 0, failures = 0;
  logic [PAYLOAD_W-1:0] q [NO][$];
  noc_packet_t exp_q[$];
  int last_g = NO - 1, rr_checks = 0, n_pkts = 0;

  noc_tx #(.N_OUT(NO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int p_push, int p_rdy);
    bit all_valid;
    int g;
    @(negedge clk);
    for (int j = 0; j < NO; j++) begin
      if (($urandom % 100) < p_push) q[j].push_back($urandom);
      f_valid[j] = q[j].size() > 0;
      f_data[j]  = (q[j].size() > 0) ? q[j][0] : '0;
    end
    pkt_ready = ($urandom % 100) < p_rdy;
    all_valid = f_valid[0] && f_valid[1] && f_valid[2];
    @(posedge clk);
    if (pkt_valid && pkt_ready) begin
      noc_packet_t e;
      checks++;
      n_pkts++;
      e = exp_q.pop_front();
      if (pkt !== e) begin failures++; $display("packet %h expected %h", pkt, e); end
    end
    g = -1;
    for (int j = 0; j < NO; j++) begin
      if (f_valid[j] && f_ready[j]) begin
        noc_packet_t e;
        if (g != -1) begin failures++; $display("two grants in one cycle"); end
        g = j;
        e.dst_pe   = dst_pe[j];
        e.dst_port = dst_port[j];
        e.src_pe   = my_pe;
        e.src_port = SPORT_W'(j);
        e.payload  = q[j].pop_front();
        exp_q.push_back(e);
      end
    end
    if (g != -1) begin
      if (all_valid) begin
        checks++;
        rr_checks++;
        if (g != (last_g + 1) % NO) begin
          failures++; $display("grant %0d after %0d with all streams waiting", g, last_g);
        end
      end
      last_g = g;
    end
  endtask

  initial begin
    my_pe = 5'd7;
    for (int j = 0; j < NO; j++) begin
      dst_pe[j] = PE_W'(3 + 5 * j);
      dst_port[j] = PORT_W'(j + 1);
      f_valid[j] = 0; f_data[j] = 0;
    end
    pkt_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) step(30, 60);
    repeat (100) step(0, 100);
    begin
      int n0;
      n0 = n_pkts;
      repeat (300) step(100, 100);
      checks++;
      if (n_pkts - n0 < 298) begin
        failures++; $display("only %0d packets in 300 cycles at full rate", n_pkts - n0);
      end
    end
    checks++;
    if (rr_checks < 50) begin failures++; $display("round robin hardly exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
