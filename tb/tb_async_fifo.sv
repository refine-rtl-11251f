// tb_async_fifo: a 16-deep dual-clock FIFO between a 10 ns write clock and a
// 14 ns read clock (and, in a second phase, a fast reader). Random writes and
// reads; every word read must be the next one written (scoreboard queue). The
// write side must never accept while w_full, must report full only when all
// 16 entries are taken (allowing for the synchronizer delay of the read
// pointer); the test requires both full and empty to have been seen.
module tb_async_fifo;
  localparam int DW = 32, DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic w_valid, w_ready, w_full;
  logic [DW-1:0] w_data;
  logic r_valid, r_ready, r_empty;
  logic [DW-1:0] r_data;
  int checks = 0, failures = 0;
  logic [DW-1:0] sb[$];
  int n_wr = 0, n_rd = 0, full_seen = 0, empty_seen = 0;
  int rd_pct = 40;
  bit done = 0;

  async_fifo #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    repeat (60000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    w_valid = 0; w_data = 0;
    #23 wrst_n = 1; rrst_n = 1;
    while (n_wr < 3000) begin
      @(negedge wclk);
      w_valid = ($urandom % 100) < 70;
      w_data  = $urandom;
      @(posedge wclk);
      if (w_full) begin
        full_seen++;
        checks++;
        // The read pointer reaches the write side through two flip-flops,
        // so full may still be shown for up to three reads that just happened.
        if (sb.size() > DEPTH || sb.size() < DEPTH - 3) begin
          failures++;
          $display("w_full with %0d words held", sb.size());
        end
        if (w_ready) begin failures++; $display("w_ready while full"); end
      end
      if (w_valid && w_ready) begin
        checks++;
        if (sb.size() >= DEPTH) begin failures++; $display("write accepted beyond depth"); end
        sb.push_back(w_data);
        n_wr++;
      end
    end
    @(negedge wclk);
    w_valid = 0;
  end

  // reader
  initial begin
    r_ready = 0;
    #23;
    while (n_rd < 3000) begin
      @(negedge rclk);
      if (n_rd == 1500) rd_pct = 95;
      r_ready = ($urandom % 100) < rd_pct;
      @(posedge rclk);
      if (r_empty) empty_seen++;
      if (r_valid && r_ready) begin
        checks++;
        if (sb.size() == 0) begin
          failures++; $display("read from empty scoreboard");
        end else begin
          logic [DW-1:0] e;
          e = sb.pop_front();
          if (r_data !== e) begin
            failures++; $display("read %h expected %h", r_data, e);
          end
        end
        n_rd++;
      end
    end
    checks++;
    if (full_seen == 0 || empty_seen == 0) begin
      failures++;
      $display("flags not exercised: full %0d empty %0d", full_seen, empty_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
