// tb_mono_wrapper: a monolithic chain of three operator models on their own
// clocks (10, 8 and 12 ns; host 10 ns) with 8-deep FIFOs. The middle operator
// accepts a word only every fourth cycle, so it is the bottleneck.
// Checks: every word returns to the host as x + 1 + 2 + 3, in order; each
// operator's stall flag follows its own handshake signals; each
// stall count equals the operator's enabled stall cycles and each full count
// the enabled full cycles of its FIFO (writer's clock); the operator with the
// fewest stall cycles is the middle one; the FIFO in front of it fills while
// the one behind it does not; and the 600 words take at least 4 x 600 cycles
// of the middle operator's clock.
module tb_mono_wrapper;
  import refine_pkg::*;
  localparam int N = 3, D = 8, CW = 20, NWORDS = 600;
  logic host_clk = 0, rst_n = 0;
  logic op_clk [N];
  logic cnt_en, cnt_clr;
  logic host_in_valid, host_in_ready, host_out_valid, host_out_ready;
  logic [31:0] host_in_data, host_out_data;
  logic        op_in_valid [N];
  logic        op_in_ready [N];
  logic [31:0] op_in_data  [N];
  logic        op_out_valid[N];
  logic        op_out_ready[N];
  logic [31:0] op_out_data [N];
  logic        stall [N];
  logic [CW-1:0] stall_count [N];
  logic [CW-1:0] full_count [N+1];
  int checks = 0, failures = 0;
  int ref_stall [N];
  int ref_full [N+1];
  int n_in = 0, n_out = 0;
  longint mid_cycles = 0;

  mono_wrapper #(.N_OPS(N), .DEPTH(D), .COUNTER_W(CW)) dut (.*);

  stream_op_model #(.PERIOD(1), .ADD(1)) u_op0 (.clk(op_clk[0]), .rst_n(rst_n),
    .in_valid(op_in_valid[0]), .in_ready(op_in_ready[0]), .in_data(op_in_data[0]),
    .out_valid(op_out_valid[0]), .out_ready(op_out_ready[0]), .out_data(op_out_data[0]));
  stream_op_model #(.PERIOD(4), .ADD(2)) u_op1 (.clk(op_clk[1]), .rst_n(rst_n),
    .in_valid(op_in_valid[1]), .in_ready(op_in_ready[1]), .in_data(op_in_data[1]),
    .out_valid(op_out_valid[1]), .out_ready(op_out_ready[1]), .out_data(op_out_data[1]));
  stream_op_model #(.PERIOD(1), .ADD(3)) u_op2 (.clk(op_clk[2]), .rst_n(rst_n),
    .in_valid(op_in_valid[2]), .in_ready(op_in_ready[2]), .in_data(op_in_data[2]),
    .out_valid(op_out_valid[2]), .out_ready(op_out_ready[2]), .out_data(op_out_data[2]));

  initial begin op_clk[0] = 0; forever #5 op_clk[0] = ~op_clk[0]; end
  initial begin op_clk[1] = 0; forever #4 op_clk[1] = ~op_clk[1]; end
  initial begin op_clk[2] = 0; forever #6 op_clk[2] = ~op_clk[2]; end
  always #5 host_clk = ~host_clk;

  initial begin
    repeat (200000) @(posedge host_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // counter models, each in its own clock, using the wrapper's synchronized enable
  for (genvar k = 0; k < N; k++) begin : g_ref
    always @(posedge op_clk[k]) if (rst_n) begin
      bit exp_stall;
      // stall rule from the operator's own handshake signals
      exp_stall = (!op_in_valid[k] && op_in_ready[k]) || (op_out_valid[k] && !op_out_ready[k]);
      checks++;
      if (stall[k] !== exp_stall) begin
        failures++; $display("stall[%0d]=%0b expected %0b", k, stall[k], exp_stall);
      end
      if (dut.dom_clr[k+1]) ref_stall[k] = 0;
      else if (dut.dom_en[k+1] && exp_stall) ref_stall[k]++;
      if (dut.dom_clr[k+1]) ref_full[k+1] = 0;
      else if (dut.dom_en[k+1] && dut.f_w_full[k+1]) ref_full[k+1]++;
      if (k == 1 && n_in > 0 && n_out < NWORDS) mid_cycles++;
      #1;
      checks++;
      if (int'(stall_count[k]) != ref_stall[k]) begin
        failures++; $display("stall_count[%0d]=%0d expected %0d", k, stall_count[k], ref_stall[k]);
      end
      checks++;
      if (int'(full_count[k+1]) != ref_full[k+1]) begin
        failures++; $display("full_count[%0d]=%0d expected %0d", k + 1, full_count[k+1], ref_full[k+1]);
      end
    end
  end

  always @(posedge host_clk) if (rst_n) begin
    if (dut.dom_clr[0]) ref_full[0] = 0;
    else if (dut.dom_en[0] && dut.f_w_full[0]) ref_full[0]++;
    if (host_in_valid && host_in_ready) n_in++;
    if (host_out_valid && host_out_ready) begin
      checks++;
      if (host_out_data !== 32'(n_out * 7 + 6)) begin
        failures++; $display("word %0d: got %0d expected %0d", n_out, host_out_data, n_out * 7 + 6);
      end
      n_out++;
    end
    #1;
    checks++;
    if (int'(full_count[0]) != ref_full[0]) begin failures++; $display("full_count[0] wrong"); end
  end

  always @(negedge host_clk) begin
    host_in_valid = rst_n && n_in < NWORDS;
    host_in_data  = 32'(n_in * 7);
    host_out_ready = 1;
  end

  initial begin
    for (int k = 0; k < N; k++) ref_stall[k] = 0;
    for (int k = 0; k <= N; k++) ref_full[k] = 0;
    cnt_en = 0; cnt_clr = 0;
    #27 rst_n = 1;
    cnt_en = 1;
    wait (n_out == NWORDS);
    repeat (10) @(posedge host_clk);
    cnt_en = 0;
    repeat (10) @(posedge host_clk);
    $display("stall counts %0d %0d %0d, full counts %0d %0d %0d %0d",
             stall_count[0], stall_count[1], stall_count[2],
             full_count[0], full_count[1], full_count[2], full_count[3]);
    checks++;
    if (!(stall_count[1] < stall_count[0] && stall_count[1] < stall_count[2])) begin
      failures++; $display("bottleneck not identified as operator 1");
    end
    checks++;
    if (!(full_count[1] > 0 && full_count[2] == 0)) begin
      failures++; $display("FIFO in front of the bottleneck should fill, the one behind should not");
    end
    checks++;
    if (mid_cycles < 4 * NWORDS) begin
      failures++; $display("600 words in %0d cycles of the slow operator", mid_cycles);
    end
    // clear
    cnt_clr = 1;
    repeat (5) @(posedge host_clk);
    cnt_clr = 0;
    repeat (5) @(posedge host_clk);
    checks++;
    if (stall_count[0] != 0 || full_count[1] != 0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
