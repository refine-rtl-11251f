// skid_buffer: one pipeline stage for a valid/ready stream that registers the
// data, the valid and the ready path.
//
// A plain pipeline register breaks the forward timing path but leaves ready
// combinational through every stage; on a long, heavily pipelined 400 MHz link
// that path would not close. Here s_ready is a flip-flop: while it is high the
// stage can take one more word even if the downstream stalls in the same
// cycle, and that word waits in the skid register. Throughput is one word per
// cycle; latency is one cycle.
//
// Interface: s_* upstream (input) side, m_* downstream (output) side, standard
// valid/ready handshake (a word moves when valid and ready are both high;
// valid and data hold until it moves).
// The source design names skid buffers on the ready signals and pipeline
// registers on the data between the NoC and each NoC interface; the two-entry
// structure is this design's choice.
module skid_buffer #(
  parameter int unsigned DATA_W = refine_pkg::PACKET_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [DATA_W-1:0] s_data,
  output logic              m_valid,
  input  logic              m_ready,
  output logic [DATA_W-1:0] m_data
);

  logic              skid_valid;
  logic [DATA_W-1:0] skid_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid    <= 1'b0;
      m_data     <= '0;
      skid_valid <= 1'b0;
      skid_data  <= '0;
      s_ready    <= 1'b1;
    end else begin
      if (m_ready || !m_valid) begin
        // Output register is free this cycle: refill from skid, else input.
        if (skid_valid) begin
          m_valid    <= 1'b1;
          m_data     <= skid_data;
          skid_valid <= 1'b0;   // s_ready was low, so no new word arrives
        end else begin
          m_valid <= s_valid && s_ready;
          m_data  <= s_data;
        end
        s_ready <= 1'b1;
      end else if (s_valid && s_ready) begin
        // Downstream stalled while a word arrives: park it in the skid.
        skid_valid <= 1'b1;
        skid_data  <= s_data;
        s_ready    <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data));

endmodule
