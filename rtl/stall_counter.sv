// stall_counter: per-operator stall counter.
//
// An operator is stalled in a cycle when it wants to read an input stream whose
// FIFO is empty, or wants to write an output stream whose FIFO is full. The
// counter adds one for every such cycle while counting is enabled. After a
// run, the operator with the lowest count is the likely bottleneck: it was
// busy while its neighbours waited for it. The stall condition (any input
// stall or any output stall) and the single counter per operator follow the
// source design.
//
// Interface (all in the operator's clock domain):
//   in_empty[i]  - input FIFO i is empty (read side)
//   in_ready[i]  - operator asserts ready on input stream i
//   out_full[j]  - output FIFO j is full (write side)
//   out_valid[j] - operator asserts valid on output stream j
//   cnt_en       - count only while high (the kernel run window)
//   cnt_clr      - synchronous clear, wins over counting
//   stall        - combinational stall condition of this cycle
//   count        - registered count, one cycle behind stall
// Own choices: the count saturates at all-ones instead of wrapping; the clear
// and enable inputs; asynchronous active-low reset.
module stall_counter #(
  parameter int unsigned N_IN      = 1,
  parameter int unsigned N_OUT     = 1,
  parameter int unsigned COUNTER_W = refine_pkg::COUNTER_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cnt_en,
  input  logic                 cnt_clr,
  input  logic [N_IN-1:0]      in_empty,
  input  logic [N_IN-1:0]      in_ready,
  input  logic [N_OUT-1:0]     out_full,
  input  logic [N_OUT-1:0]     out_valid,
  output logic                 stall,
  output logic [COUNTER_W-1:0] count
);

  always_comb begin
    stall = |(in_empty & in_ready) | |(out_full & out_valid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (cnt_clr) begin
      count <= '0;
    end else if (cnt_en && stall && !(&count)) begin
      count <= count + 1'b1;
    end
  end

endmodule
