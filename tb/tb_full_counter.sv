// tb_full_counter: random full flag, enable and clear into a 5-bit full
// counter; the count is compared every cycle with a saturating model.
module tb_full_counter;
  localparam int CW = 5;
  logic clk = 0, rst_n = 0;
  logic cnt_en, cnt_clr, full;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  int model = 0, sat_seen = 0, clr_seen = 0;

  full_counter #(.COUNTER_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt_en = 0; cnt_clr = 0; full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      full    = ($urandom % 3) != 0;
      cnt_en  = ($urandom % 6) != 0;
      cnt_clr = ($urandom % 150) == 0;
      if (cnt_clr) begin model = 0; clr_seen++; end
      else if (cnt_en && full && model < (1 << CW) - 1) model++;
      @(posedge clk); #1;
      if (model == (1 << CW) - 1) sat_seen++;
      checks++;
      if (int'(count) != model) begin
        failures++;
        $display("cycle %0d: count=%0d expected %0d", cyc, count, model);
      end
    end
    checks++;
    if (sat_seen == 0 || clr_seen == 0) begin
      failures++;
      $display("saturation or clear never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
