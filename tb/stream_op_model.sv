// stream_op_model: behavioural stand-in for a user streaming operator with one
// input and one output stream, used by the testbenches.
//
// It takes a word when it is free and its initiation interval has elapsed,
// and offers word + ADD on its output; it is free again once the result has
// left. PERIOD sets the initiation interval in clock cycles (1 = a word every
// cycle), so a larger PERIOD makes a slower operator. in_ready is asserted
// whenever the operator wants a word, whether or not one is there, as a
// stall counter expects. busy counts the cycles in which it holds work.
module stream_op_model #(
  parameter int unsigned PERIOD = 1,
  parameter logic [31:0] ADD    = 32'd1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data
);

  int unsigned cool;

  assign in_ready = (!out_valid || out_ready) && (cool == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      cool      <= 0;
    end else begin
      if (cool != 0) cool <= cool - 1;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_data  <= in_data + ADD;
        cool      <= PERIOD - 1;
      end
    end
  end

endmodule
