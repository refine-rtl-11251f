// mono_wrapper: the monolithic build's top-level wrapper around a chain of
// user operators, with the same bottleneck counters as the NoC build.
//
// In the final, monolithic build the operators are joined directly: the
// stream from operator k to operator k+1 goes through one dual-clock FIFO,
// where the NoC build needs an output FIFO, the NoC and an input FIFO. The
// host's input stream feeds the first operator and the last operator's output
// returns to the host, each through a FIFO as well. Every operator may run on
// its own clock. Each FIFO has a full counter (counted in its writer's clock)
// and each operator a stall counter (in its own clock). The host's counter
// enable and clear are synchronized into every clock domain.
//
// Interface:
//   host_clk : host_in_* stream into FIFO 0, host_out_* stream out of FIFO
//              N_OPS, cnt_en/cnt_clr.
//   op_clk[k]: operator k's input (op_in_*, from FIFO k) and output
//              (op_out_*, into FIFO k+1) streams, stall[k], stall_count[k],
//              full_count[k+1].
//   full_count[0] counts in host_clk.
// From the source design: direct FIFO connection, per-operator clocks,
// counters in the wrapper. Own choices: a linear chain of N_OPS operators with
// one input and one output stream each (the real wrapper is generated per
// application graph), one link width DATA_W for the whole chain, FIFO
// depth, a single asynchronous reset.
module mono_wrapper
  import refine_pkg::*;
#(
  parameter int unsigned N_OPS     = 4,
  // width of every link (one FIFO word per operator transfer)
  parameter int unsigned DATA_W    = PAYLOAD_W,
  parameter int unsigned DEPTH     = FIFO_DEPTH,
  parameter int unsigned COUNTER_W = refine_pkg::COUNTER_W
) (
  input  logic                 host_clk,
  input  logic                 op_clk [N_OPS],
  input  logic                 rst_n,
  input  logic                 cnt_en,
  input  logic                 cnt_clr,
  input  logic                 host_in_valid,
  output logic                 host_in_ready,
  input  logic [DATA_W-1:0]    host_in_data,
  output logic                 host_out_valid,
  input  logic                 host_out_ready,
  output logic [DATA_W-1:0]    host_out_data,
  output logic                 op_in_valid  [N_OPS],
  input  logic                 op_in_ready  [N_OPS],
  output logic [DATA_W-1:0]    op_in_data   [N_OPS],
  input  logic                 op_out_valid [N_OPS],
  output logic                 op_out_ready [N_OPS],
  input  logic [DATA_W-1:0]    op_out_data  [N_OPS],
  output logic                 stall        [N_OPS],
  output logic [COUNTER_W-1:0] stall_count  [N_OPS],
  output logic [COUNTER_W-1:0] full_count   [N_OPS+1]
);

  // Clock domain d: 0 = host (writer of FIFO 0), 1..N_OPS = operators,
  // N_OPS+1 = host again (reader of the last FIFO).
  logic dom_clk [N_OPS+2];
  logic dom_en  [N_OPS+2];
  logic dom_clr [N_OPS+2];

  // FIFO k: written in domain k, read in domain k+1.
  logic                 f_w_valid [N_OPS+1];
  logic                 f_w_ready [N_OPS+1];
  logic [DATA_W-1:0]    f_w_data  [N_OPS+1];
  logic                 f_w_full  [N_OPS+1];
  logic                 f_r_valid [N_OPS+1];
  logic                 f_r_ready [N_OPS+1];
  logic [DATA_W-1:0]    f_r_data  [N_OPS+1];
  logic                 f_r_empty [N_OPS+1];

  assign dom_clk[0]       = host_clk;
  assign dom_clk[N_OPS+1] = host_clk;
  for (genvar k = 0; k < N_OPS; k++) begin : g_dom
    assign dom_clk[k+1] = op_clk[k];
  end

  for (genvar d = 0; d < N_OPS + 2; d++) begin : g_sync
    bit_sync u_en  (.clk(dom_clk[d]), .rst_n(rst_n), .d(cnt_en),  .q(dom_en[d]));
    bit_sync u_clr (.clk(dom_clk[d]), .rst_n(rst_n), .d(cnt_clr), .q(dom_clr[d]));
  end

  // Host ends of the chain.
  assign f_w_valid[0]     = host_in_valid;
  assign f_w_data[0]      = host_in_data;
  assign host_in_ready    = f_w_ready[0];
  assign host_out_valid   = f_r_valid[N_OPS];
  assign host_out_data    = f_r_data[N_OPS];
  assign f_r_ready[N_OPS] = host_out_ready;

  for (genvar k = 0; k <= N_OPS; k++) begin : g_fifo
    async_fifo #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_fifo (
      .wclk    (dom_clk[k]),
      .wrst_n  (rst_n),
      .w_valid (f_w_valid[k]),
      .w_ready (f_w_ready[k]),
      .w_data  (f_w_data[k]),
      .w_full  (f_w_full[k]),
      .rclk    (dom_clk[k+1]),
      .rrst_n  (rst_n),
      .r_valid (f_r_valid[k]),
      .r_ready (f_r_ready[k]),
      .r_data  (f_r_data[k]),
      .r_empty (f_r_empty[k])
    );
    full_counter #(.COUNTER_W(COUNTER_W)) u_full (
      .clk     (dom_clk[k]),
      .rst_n   (rst_n),
      .cnt_en  (dom_en[k]),
      .cnt_clr (dom_clr[k]),
      .full    (f_w_full[k]),
      .count   (full_count[k])
    );
  end

  for (genvar k = 0; k < N_OPS; k++) begin : g_op
    // Operator k reads FIFO k and writes FIFO k+1.
    assign op_in_valid[k]  = f_r_valid[k];
    assign op_in_data[k]   = f_r_data[k];
    assign f_r_ready[k]    = op_in_ready[k];
    assign f_w_valid[k+1]  = op_out_valid[k];
    assign f_w_data[k+1]   = op_out_data[k];
    assign op_out_ready[k] = f_w_ready[k+1];

    stall_counter #(.N_IN(1), .N_OUT(1), .COUNTER_W(COUNTER_W)) u_stall (
      .clk       (op_clk[k]),
      .rst_n     (rst_n),
      .cnt_en    (dom_en[k+1]),
      .cnt_clr   (dom_clr[k+1]),
      .in_empty  (f_r_empty[k]),
      .in_ready  (op_in_ready[k]),
      .out_full  (f_w_full[k+1]),
      .out_valid (op_out_valid[k]),
      .stall     (stall[k]),
      .count     (stall_count[k])
    );
  end

endmodule
