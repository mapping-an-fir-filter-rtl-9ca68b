// Dual-clock FIFO for a link between two clock domains.
//
// The processors of the array each run from their own clock and talk through
// asynchronous FIFOs. This FIFO is the classic Gray-pointer design: the write
// side keeps a binary and a Gray write pointer in wclk, the read side the same
// in rclk, and each side sees the other's Gray pointer through a two-flop
// synchroniser. full is computed in wclk, empty in rclk; both are
// conservative (they may stay asserted a few cycles longer than necessary,
// never shorter). Reads are first-word-fall-through: rdata shows the head
// word whenever empty is low.
//
// Throughput is one word per cycle on each side once the pointers have
// crossed; the latency from push to !empty is about three rclk cycles.
// DEPTH must be a power of two, at least 4; its default of 8 is this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  if (DEPTH < 4 || (1 << AW) != DEPTH) begin : g_bad_depth
    $error("async_fifo: DEPTH must be a power of two and at least 4");
  end

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in wclk
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in rclk

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  wire          do_push   = push && !full;
  wire [AW:0]   wbin_nxt  = wbin + {{AW{1'b0}}, do_push};

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (do_push) mem[wbin[AW-1:0]] <= wdata;
  end

  // Full when the write pointer is one lap ahead: top two Gray bits inverted.
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ---------------- read side ----------------
  wire          do_pop    = pop && !empty;
  wire [AW:0]   rbin_nxt  = rbin + {{AW{1'b0}}, do_pop};

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(push && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(pop && empty));

endmodule
