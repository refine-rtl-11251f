// tb_noc_pipeline: a three-stage NoC link pipeline under random valid/ready.
// Packets must come out in order and intact; with both ends always willing
// the link must carry one packet per cycle with a latency of exactly three
// cycles.
module tb_noc_pipeline;
  localparam int DW = 49, ST = 3;
  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [DW-1:0] s_data, m_data;
  int checks = 0, failures = 0;
  logic [DW-1:0] sb[$];
  longint t_in[$];
  longint cyc = 0;
  bit taken = 0;
  int n_out = 0;

  noc_pipeline #(.DATA_W(DW), .STAGES(ST)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int pv, int pr);
    @(negedge clk);
    // a word offered but not yet taken must stay; otherwise offer a new one
    if (!(s_valid && !taken)) begin
      s_valid = ($urandom % 100) < pv;
      s_data  = {$urandom, $urandom};
    end
    m_ready = ($urandom % 100) < pr;
    @(posedge clk);
    taken = s_valid && s_ready;
    if (taken) begin sb.push_back(s_data); t_in.push_back(cyc); end
    if (m_valid && m_ready) begin
      logic [DW-1:0] e;
      longint t0;
      checks++;
      e = sb.pop_front();
      t0 = t_in.pop_front();
      if (m_data !== e) begin failures++; $display("out %h expected %h", m_data, e); end
      if (pv == 100 && pr == 100 && cyc != t0 + ST) begin
        failures++; $display("latency %0d cycles, expected %0d", cyc - t0, ST);
      end
      n_out++;
    end
  endtask

  initial begin
    s_valid = 0; s_data = 0; m_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) step(70, 40);
    repeat (30) step(0, 100);
    begin
      int n0;
      n0 = n_out;
      repeat (300) step(100, 100);
      checks++;
      if (n_out - n0 < 300 - ST - 1) begin
        failures++; $display("full-rate phase passed %0d packets in 300 cycles", n_out - n0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
