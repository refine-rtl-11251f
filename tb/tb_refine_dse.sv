// tb_refine_dse: the refinement loop the counters exist for, run on the
// monolithic build. Four design points of one four-operator pipeline are
// simulated side by side. Each is a separate build with its own operator
// initiation intervals, and every operator has its own clock (10, 8, 12 and
// 10 ns; host 4 ns). At each point the tuner rule is applied to the counts:
// multiply each stall count by its clock period and take the operator with
// the smallest result as the bottleneck. The next design point is the
// previous one with that operator sped up.
//
// Initiation intervals per design point (cycles per word):
//   point 0: 2 6 3 4   time per word 20 48 36 40 ns -> operator 1 limits
//   point 1: 2 2 3 4   -> operator 3
//   point 2: 2 2 3 1   -> operator 2
//   point 3: 2 2 1 1   -> operator 0
// Checks, per point: all NW words come back as x + 1 + 2 + 3 + 4, in order;
// the counters name the operator whose time per word is largest; the point
// that follows changes exactly the operator named; the run takes no less
// than NW times the slowest operator's time per word; and each point
// finishes sooner than the one before. FIFOs are 16 deep so that operators
// ahead of a bottleneck back up within the run (with very deep FIFOs and a
// short run they would never stall and would look like bottlenecks).
module tb_refine_dse;
  import refine_pkg::*;
  localparam int NDP = 4, NOPS = 4, D = 16, CW = 28, NW = 1500;
  // PER[d][k]: initiation interval of operator k at design point d (the
  // table in the header; each row is written operator 3 first)
  localparam logic [NDP-1:0][NOPS-1:0][3:0] PER = {
    {4'd1, 4'd1, 4'd2, 4'd2},   // point 3
    {4'd1, 4'd3, 4'd2, 4'd2},   // point 2
    {4'd4, 4'd3, 4'd2, 4'd2},   // point 1
    {4'd4, 4'd3, 4'd6, 4'd2}    // point 0
  };
  localparam int CLKP [NOPS] = '{10, 8, 12, 10};
  localparam int HOSTP = 4;

  logic host_clk = 0, rst_n = 0;
  logic cnt_clr = 0;
  always #(HOSTP / 2) host_clk = ~host_clk;

  int     dp_checks [NDP];
  int     dp_fail   [NDP];
  int     dp_bn     [NDP];
  longint dp_time   [NDP];
  bit     dp_done   [NDP];

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  for (genvar d = 0; d < NDP; d++) begin : g_dp
    logic          op_clk [NOPS];
    logic          cnt_en;
    logic          host_in_valid, host_in_ready, host_out_valid, host_out_ready;
    logic [31:0]   host_in_data, host_out_data;
    logic          op_in_valid  [NOPS];
    logic          op_in_ready  [NOPS];
    logic [31:0]   op_in_data   [NOPS];
    logic          op_out_valid [NOPS];
    logic          op_out_ready [NOPS];
    logic [31:0]   op_out_data  [NOPS];
    logic          stall        [NOPS];
    logic [CW-1:0] stall_count  [NOPS];
    logic [CW-1:0] full_count   [NOPS+1];
    int            n_in, n_out;
    longint        t_start;

    mono_wrapper #(.N_OPS(NOPS), .DEPTH(D), .COUNTER_W(CW)) u_w (
      .host_clk       (host_clk),
      .op_clk         (op_clk),
      .rst_n          (rst_n),
      .cnt_en         (cnt_en),
      .cnt_clr        (cnt_clr),
      .host_in_valid  (host_in_valid),
      .host_in_ready  (host_in_ready),
      .host_in_data   (host_in_data),
      .host_out_valid (host_out_valid),
      .host_out_ready (host_out_ready),
      .host_out_data  (host_out_data),
      .op_in_valid    (op_in_valid),
      .op_in_ready    (op_in_ready),
      .op_in_data     (op_in_data),
      .op_out_valid   (op_out_valid),
      .op_out_ready   (op_out_ready),
      .op_out_data    (op_out_data),
      .stall          (stall),
      .stall_count    (stall_count),
      .full_count     (full_count)
    );

    for (genvar k = 0; k < NOPS; k++) begin : g_op
      initial begin
        op_clk[k] = 0;
        forever #(CLKP[k] / 2) op_clk[k] = ~op_clk[k];
      end
      stream_op_model #(.PERIOD(int'(PER[d][k])), .ADD(32'(k + 1))) u_op (
        .clk       (op_clk[k]),
        .rst_n     (rst_n),
        .in_valid  (op_in_valid[k]),
        .in_ready  (op_in_ready[k]),
        .in_data   (op_in_data[k]),
        .out_valid (op_out_valid[k]),
        .out_ready (op_out_ready[k]),
        .out_data  (op_out_data[k])
      );
    end

    // host source and sink, host clock
    assign host_in_valid  = rst_n && (n_in < NW);
    assign host_in_data   = 32'(n_in) * 32'd7;
    assign host_out_ready = 1'b1;

    always @(posedge host_clk) if (rst_n) begin
      if (host_in_valid && host_in_ready) n_in <= n_in + 1;
      if (host_out_valid && host_out_ready) begin
        dp_checks[d]++;
        if (host_out_data !== 32'(n_out) * 32'd7 + 32'd10) begin
          dp_fail[d]++;
          $display("point %0d: word %0d is %0d", d, n_out, host_out_data);
        end
        n_out <= n_out + 1;
      end
    end

    initial begin
      int     best, expect_bn;
      longint score [NOPS];
      longint worst;
      n_in = 0; n_out = 0; cnt_en = 0;
      dp_checks[d] = 0; dp_fail[d] = 0; dp_done[d] = 0;
      wait (rst_n);
      @(negedge host_clk) cnt_en = 1;
      t_start = $time;
      wait (n_out == NW);
      cnt_en = 0;
      dp_time[d] = $time - t_start;
      repeat (10) @(posedge host_clk);
      // tuner rule: normalised stall count, lowest wins
      best = 0;
      for (int k = 0; k < NOPS; k++) begin
        score[k] = longint'(stall_count[k]) * CLKP[k];
        if (score[k] < score[best]) best = k;
      end
      // the truly slowest operator
      expect_bn = 0;
      worst = 0;
      for (int k = 0; k < NOPS; k++) begin
        if (int'(PER[d][k]) * CLKP[k] > worst) begin
          worst = int'(PER[d][k]) * CLKP[k];
          expect_bn = k;
        end
      end
      dp_bn[d] = best;
      $display("point %0d: stall x period %0d %0d %0d %0d, full %0d %0d %0d %0d %0d, bottleneck %0d (expected %0d), %0d ns",
               d, score[0], score[1], score[2], score[3], full_count[0], full_count[1],
               full_count[2], full_count[3], full_count[4], best, expect_bn, dp_time[d]);
      dp_checks[d] += 2;
      if (best != expect_bn) begin
        dp_fail[d]++; $display("point %0d: counters name operator %0d", d, best);
      end
      if (dp_time[d] < longint'(NW) * worst) begin
        dp_fail[d]++; $display("point %0d: %0d ns is faster than the slowest operator allows", d, dp_time[d]);
      end
      dp_done[d] = 1;
    end
  end

  initial begin
    int checks, failures;
    #25 rst_n = 1;
    for (int d = 0; d < NDP; d++) wait (dp_done[d]);
    checks = 0; failures = 0;
    for (int d = 0; d < NDP; d++) begin
      checks += dp_checks[d];
      failures += dp_fail[d];
    end
    // each point follows the previous one's verdict, and each is faster
    for (int d = 0; d + 1 < NDP; d++) begin
      int changed, n_changed;
      n_changed = 0; changed = -1;
      for (int k = 0; k < NOPS; k++) if (PER[d + 1][k] != PER[d][k]) begin
        n_changed++; changed = k;
      end
      checks += 2;
      if (n_changed != 1 || changed != dp_bn[d]) begin
        failures++; $display("point %0d refines operator %0d, counters named %0d", d + 1, changed, dp_bn[d]);
      end
      if (dp_time[d + 1] >= dp_time[d]) begin
        failures++; $display("point %0d is not faster (%0d ns after %0d ns)", d + 1, dp_time[d + 1], dp_time[d]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
