// noc_pipeline: a chain of STAGES skid buffers between the NoC and a NoC
// interface.
//
// Each stage registers data, valid and ready, so the wire between a PR page
// and the NoC switch can be cut into short hops that close timing at the
// 400 MHz NoC clock. Latency is STAGES cycles, throughput one packet per
// cycle. STAGES = 0 is a plain wire.
// The source design inserts such registers (placed in a region next to each
// page) but does not give their number; two stages per direction is this
// design's choice.
module noc_pipeline #(
  parameter int unsigned DATA_W = refine_pkg::PACKET_W,
  parameter int unsigned STAGES = 2
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

  logic              v [STAGES+1];
  logic              r [STAGES+1];
  logic [DATA_W-1:0] d [STAGES+1];

  assign v[0]    = s_valid;
  assign d[0]    = s_data;
  assign s_ready = r[0];
  assign m_valid = v[STAGES];
  assign m_data  = d[STAGES];
  assign r[STAGES] = m_ready;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    skid_buffer #(.DATA_W(DATA_W)) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .s_valid (v[i]),
      .s_ready (r[i]),
      .s_data  (d[i]),
      .m_valid (v[i+1]),
      .m_ready (r[i+1]),
      .m_data  (d[i+1])
    );
  end

endmodule
