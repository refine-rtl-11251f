// tb_stall_counter: random stream flags into a 3-input, 2-output stall
// counter with a 6-bit count. Each cycle the stall output is compared with
// the rule "some input empty while ready, or some output full while valid",
// and the count with a model that counts enabled stall cycles, clears on
// cnt_clr and saturates at 63.
module tb_stall_counter;
  localparam int NI = 3, NO = 2, CW = 6;
  logic clk = 0, rst_n = 0;
  logic cnt_en, cnt_clr;
  logic [NI-1:0] in_empty, in_ready;
  logic [NO-1:0] out_full, out_valid;
  logic stall;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  int model = 0;
  int sat_seen = 0;

  stall_counter #(.N_IN(NI), .N_OUT(NO), .COUNTER_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt_en = 0; cnt_clr = 0; in_empty = 0; in_ready = 0; out_full = 0; out_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic exp_stall;
      @(negedge clk);
      in_empty  = NI'($urandom);
      in_ready  = NI'($urandom) & NI'($urandom);
      out_full  = NO'($urandom) & NO'($urandom);
      out_valid = NO'($urandom);
      cnt_en    = ($urandom % 8) != 0;
      cnt_clr   = ($urandom % 400) == 0;
      #1;
      exp_stall = |(in_empty & in_ready) || |(out_full & out_valid);
      checks++;
      if (stall !== exp_stall) begin
        failures++;
        $display("cycle %0d: stall=%0b expected %0b", cyc, stall, exp_stall);
      end
      if (cnt_clr) model = 0;
      else if (cnt_en && exp_stall && model < (1 << CW) - 1) model++;
      @(posedge clk); #1;
      if (model == (1 << CW) - 1) sat_seen++;
      checks++;
      if (int'(count) != model) begin
        failures++;
        $display("cycle %0d: count=%0d expected %0d", cyc, count, model);
      end
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("saturation never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
