// tb_skid_buffer: random valid and ready on both sides of one skid stage.
// Words must leave in order, none lost or duplicated, and m_data must hold
// while stalled. With both sides always willing the stage must pass one word
// per cycle, one cycle after it entered.
module tb_skid_buffer;
  localparam int DW = 49;
  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [DW-1:0] s_data, m_data;
  int checks = 0, failures = 0;
  logic [DW-1:0] sb[$];
  int n_out = 0, skid_used = 0;
  longint cyc = 0;
  bit taken = 0;
  longint t_in[$];

  skid_buffer #(.DATA_W(DW)) dut (.*);

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
    if (dut.skid_valid) skid_used++;
    taken = s_valid && s_ready;
    if (taken) begin sb.push_back(s_data); t_in.push_back(cyc); end
    if (m_valid && m_ready) begin
      logic [DW-1:0] e;
      longint t0;
      checks++;
      e = sb.pop_front();
      t0 = t_in.pop_front();
      if (m_data !== e) begin failures++; $display("out %h expected %h", m_data, e); end
      if (pv == 100 && pr == 100 && cyc != t0 + 1) begin
        failures++; $display("latency %0d cycles, expected 1", cyc - t0);
      end
      n_out++;
    end
  endtask

  initial begin
    s_valid = 0; s_data = 0; m_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) step(60, 50);
    // drain, then full-rate phase
    repeat (20) step(0, 100);
    begin
      int n0;
      n0 = n_out;
      repeat (200) step(100, 100);
      checks++;
      if (n_out - n0 < 198) begin
        failures++; $display("full-rate phase passed %0d words in 200 cycles", n_out - n0);
      end
    end
    checks++;
    if (skid_used == 0) begin failures++; $display("skid register never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
