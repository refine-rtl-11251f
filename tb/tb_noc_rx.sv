// tb_noc_rx: random packets into the depacketiser for three input FIFOs
// with random room. The payload must be offered only to the FIFO named by
// dst_port, the packet accepted exactly when that FIFO is ready, and a packet
// for a port the interface does not have must be accepted (dropped).
// A second instance has a 32-bit port 0 and a 64-bit port 1. Its words
// arrive as interleaved packets (two per 64-bit word, low word first) while
// the FIFOs take data at random, and each port must deliver whole words in
// order: a 64-bit word only once both halves are in, and without taking the
// second half's packet before its FIFO has room.
module tb_noc_rx;
  import refine_pkg::*;
  localparam int NI = 3;
  logic                 clk = 0, rst_n = 1;
  noc_packet_t          pkt;
  logic                 pkt_valid, pkt_ready;
  logic                 w_valid [NI];
  logic                 w_ready [NI];
  logic [PAYLOAD_W-1:0] w_data  [NI];
  int checks = 0, failures = 0, drops = 0;

  noc_rx #(.N_IN(NI)) dut (.*);

  // wide instance
  noc_packet_t  wpkt;
  logic         wpkt_valid, wpkt_ready;
  logic         ww_valid [2];
  logic         ww_ready [2];
  logic [63:0]  ww_data  [2];
  int           whalf = 0, wsent = 0, wgot = 0;
  logic [63:0]  wcur;
  bit           fire;

  noc_rx #(.N_IN(2), .MAX_WORDS(2), .IN_WORDS({3'd2, 3'd1})) dut_w (
    .clk(clk), .rst_n(rst_n), .pkt(wpkt), .pkt_valid(wpkt_valid),
    .pkt_ready(wpkt_ready), .w_valid(ww_valid), .w_ready(ww_ready),
    .w_data(ww_data)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the assembly registers reset on the falling edge of rst_n
    #1 rst_n = 0;
    #1;
    for (int n = 0; n < 4000; n++) begin
      bit exp_ready;
      int port;
      pkt       = {$urandom, $urandom};
      pkt.dst_port = PORT_W'($urandom % (NI + 1));
      pkt_valid = ($urandom % 4) != 0;
      for (int i = 0; i < NI; i++) w_ready[i] = $urandom % 2;
      #1;
      port = int'(pkt.dst_port);
      exp_ready = (port < NI) ? w_ready[port] : 1'b1;
      if (port >= NI) drops++;
      checks++;
      if (pkt_ready !== exp_ready) begin failures++; $display("pkt_ready %0b expected %0b", pkt_ready, exp_ready); end
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (w_valid[i] !== (pkt_valid && port == i)) begin
          failures++; $display("w_valid[%0d]=%0b for port %0d", i, w_valid[i], port);
        end
        if (port == i && w_data[i] !== pkt.payload) begin
          failures++; $display("w_data[%0d] wrong", i);
        end
      end
      #1;
    end
    checks++;
    if (drops == 0) failures++;
    // wide phase, clocked
    wpkt = '0; wpkt_valid = 0; ww_ready[0] = 0; ww_ready[1] = 0;
    rst_n = 1;
    wcur = {$urandom, $urandom};
    for (int n = 0; n < 3000; n++) begin
      // offer: port 0 word or the next half of the current port-1 word
      if (!wpkt_valid) begin
        wpkt = '0;
        wpkt_valid = ($urandom % 4) != 0;
        if ($urandom % 2) begin
          wpkt.dst_port = 0; wpkt.payload = $urandom;
        end else begin
          wpkt.dst_port = 1; wpkt.payload = whalf ? wcur[63:32] : wcur[31:0];
        end
      end
      ww_ready[0] = $urandom % 2; ww_ready[1] = $urandom % 2;
      #1;
      for (int i = 0; i < 2; i++) if (ww_valid[i] && ww_ready[i]) begin
        logic [63:0] e;
        checks++; wgot++;
        // port 0 carries the current packet's word, port 1 the whole
        // 64-bit word whose high half is now on the channel
        e = (i == 0) ? {32'd0, wpkt.payload} : wcur;
        if (ww_data[i] !== e) begin
          failures++; $display("wide port %0d got %h expected %h", i, ww_data[i], e);
        end
      end
      // the word to come out: known before the clock
      if (wpkt_valid && wpkt_ready) begin
        if (wpkt.dst_port == 0) begin
          checks++;
          if (!ww_valid[0] || !ww_ready[0]) begin failures++; $display("port 0 packet taken without a write"); end
        end else if (whalf) begin
          checks++;
          if (!ww_valid[1] || !ww_ready[1]) begin failures++; $display("last half taken without a write n=%0d rcnt1=%0d wv=%0b wr=%0b", n, dut_w.rcnt[1], ww_valid[1], ww_ready[1]); end
        end else begin
          checks++;
          if (ww_valid[1]) begin failures++; $display("64-bit word written after one half"); end
        end
      end
      fire = wpkt_valid && wpkt_ready;
      #4 clk = 1;
      #1;
      if (fire) begin
        wsent++;
        if (wpkt.dst_port == 1) begin
          if (whalf) wcur = {$urandom, $urandom};
          whalf = 1 - whalf;
        end
        wpkt_valid = 0;
      end
      #4 clk = 0;
    end
    checks++;
    if (wgot < 800) begin failures++; $display("only %0d wide-instance writes", wgot); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
