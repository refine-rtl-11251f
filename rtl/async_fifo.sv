// async_fifo: dual-clock stream FIFO with full and empty flags on both sides.
//
// Every stream link in the overlay passes through one of these so that the
// producer and the consumer may run on different clocks (operators run at
// 200-400 MHz, the NoC at 400 MHz). Write and read pointers are kept in binary
// in their own domain and cross to the other domain as Gray code through two
// flip-flops, so the flags are conservative: the write side may see the FIFO
// full for two read clocks after a read, the read side may see it empty for
// two write clocks after a write.
//
// Interface:
//   write side (wclk): w_valid/w_ready/w_data handshake, w_full flag
//   read side  (rclk): r_valid/r_ready/r_data handshake (first word falls
//                      through: r_data holds the head word while r_valid),
//                      r_empty flag.
// A word written at a wclk edge is visible at the read side after two to
// three rclk edges. DEPTH must be a power of two.
// Dual-clock FIFOs come from the source design; the pointer scheme and the
// asynchronous-read memory are this design's choices.
module async_fifo #(
  parameter int unsigned DATA_W = refine_pkg::PAYLOAD_W,
  parameter int unsigned DEPTH  = refine_pkg::FIFO_DEPTH
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              w_valid,
  output logic              w_ready,
  input  logic [DATA_W-1:0] w_data,
  output logic              w_full,

  input  logic              rclk,
  input  logic              rrst_n,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [DATA_W-1:0] r_data,
  output logic              r_empty
);

  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [DATA_W-1:0] mem [DEPTH];

  ptr_t wptr, wgray, rgray_w1, rgray_w2;
  ptr_t rptr, rgray, wgray_r1, wgray_r2;
  ptr_t rptr_w;

  // ---------------- write domain ----------------
  always_comb begin
    rptr_w  = gray2bin(rgray_w2);
    w_full  = (wptr[AW] != rptr_w[AW]) && (wptr[AW-1:0] == rptr_w[AW-1:0]);
    w_ready = !w_full;
  end

  always_ff @(posedge wclk) begin
    if (w_valid && w_ready) mem[wptr[AW-1:0]] <= w_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (w_valid && w_ready) begin
        wptr  <= wptr + 1'b1;
        wgray <= bin2gray(wptr + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  always_comb begin
    r_empty = (wgray_r2 == rgray);
    r_valid = !r_empty;
    r_data  = mem[rptr[AW-1:0]];
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (r_valid && r_ready) begin
        rptr  <= rptr + 1'b1;
        rgray <= bin2gray(rptr + 1'b1);
      end
    end
  end

  // A write is never accepted while full, a read never while empty.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n)
    w_full |-> !(w_valid && w_ready));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n)
    r_empty |-> !r_valid);

endmodule
