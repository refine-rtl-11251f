// full_counter: counts the cycles in which a stream FIFO is full.
//
// Comparing the full count of a sender's output FIFO with that of the
// receiver's input FIFO shows whether the link between them (in the NoC build,
// the NoC itself) limits throughput: a sender that keeps finding its FIFO full
// while the receiver's FIFO rarely fills is held back by the link. Counting
// full cycles follows the source design.
//
// Interface (one clock domain): full is the FIFO's full flag in this domain;
// cnt_en gates counting; cnt_clr clears synchronously and wins over counting.
// count is registered, one cycle behind full.
// Own choices: saturation at all-ones, the enable and clear inputs,
// asynchronous active-low reset.
module full_counter #(
  parameter int unsigned COUNTER_W = refine_pkg::COUNTER_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cnt_en,
  input  logic                 cnt_clr,
  input  logic                 full,
  output logic [COUNTER_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (cnt_clr) begin
      count <= '0;
    end else if (cnt_en && full && !(&count)) begin
      count <= count + 1'b1;
    end
  end

endmodule
