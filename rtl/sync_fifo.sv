// Single-clock first-word-fall-through FIFO: the output buffer of each
// processor unit, and its input buffers when the links are built for one
// shared clock.
//
// The head word is visible on rdata whenever empty is low; asserting pop
// removes it at the next clock edge. push writes wdata at the same edge.
// Pushing into a full FIFO or popping an empty one is ignored (and flagged by
// an assertion). A push and a pop in the same cycle are both taken, so a full
// FIFO that is popped may be pushed in the same cycle only if the caller
// checks full first, which the processor unit always does.
//
// The processors are described as having buffers "large enough" that no
// sample is lost; the depth is a parameter and its default of 8 is this
// design's choice. Depth must be a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;   // one extra bit tells full from empty

  wire do_push = push && !full;
  wire do_pop  = pop  && !empty;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wdata;
  end

  // Callers must respect the flags.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
