// bit_sync: two-flop synchronizer for a level signal entering a clock domain.
//
// Used for the counter enable and clear levels that a host drives from its own
// clock into every operator clock domain. The output follows the input two
// clock edges later. Reset value is 0. This helper is this design's own.
module bit_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
