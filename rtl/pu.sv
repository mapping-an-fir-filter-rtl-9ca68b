// Processor unit of the mesh: two input FIFOs, one output FIFO and an
// execution unit (pu_exec).
//
// Links: the unit sees the head flit of each of its four neighbours' output
// FIFOs (nbr_flit/nbr_valid, indexed N, E, S, W). Each of its two input
// buffers is bound by configuration to one direction and one tag (compared
// under a bit mask) and takes exactly the flits from that neighbour that
// carry that tag, so a unit picks out the words meant for it from everything
// its neighbours broadcast. Both
// buffers may listen to the same neighbour under different tags. A buffer
// bound to DIR_NONE reads as an always-available zero.
//
// Broadcast handshake: a unit's output head is offered to all
// four neighbours at once. A neighbour whose selection matches the flit but
// whose buffer is full raises stall_to_nbr towards the sender. The sender
// pops the flit (out_fire) only in a cycle in which no neighbour, and not the
// external listener (ext_stall), refuses it; every matching buffer writes the
// flit in that same cycle, so each word is delivered once to every unit that
// wants it and dropped if nobody does.
//
// Clocking: with ASYNC_LINKS set (the default) every unit runs from its own
// clock and each input buffer is a dual-clock FIFO whose write side runs on
// the clock of the neighbour it listens to (nbr_clk, chosen by the static
// input selection). The whole handshake above (match, full, stall, write)
// then lives in the sender's clock domain, and only the FIFO pointers cross.
// With ASYNC_LINKS clear the buffers are single-clock FIFOs and all units
// must share one clock. en is synchronised into the unit's clock; the
// configuration and coefficients are written from cfg_clk and must be
// stable while en is high.
//
// Timing: a result pushed into the output FIFO is offered to the neighbours
// from the next cycle; a word written into an input FIFO is usable by the
// execution unit one cycle later (single-clock buffers) or about three
// receiver cycles later (dual-clock buffers). The document gives the
// two-in/one-out buffer structure, tag filtering and asynchronous links
// between clock domains; the handshake, the tag mask and the depths (16 in,
// 4 out) are this design's choices. Sixteen input words cover the extra
// latency of the dual-clock crossings, so that the one-sample-per-clock
// mapping keeps its rate; single-clock links would need only 8.
module pu
  import fir_mesh_pkg::*;
#(
  parameter bit          ASYNC_LINKS = 1'b1,
  parameter int unsigned IN_DEPTH    = 16,
  parameter int unsigned OUT_DEPTH   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  pu_cfg_t          cfg,
  input  logic             cfg_clk,
  input  logic [NDIR-1:0]  nbr_clk,

  input  logic             coef_we,
  input  taddr_t           coef_addr,
  input  word_t            coef_wdata,

  // from the neighbours' output heads
  input  flit_t            nbr_flit  [NDIR],
  input  logic [NDIR-1:0]  nbr_valid,
  input  logic [NDIR-1:0]  nbr_fire,
  output logic [NDIR-1:0]  stall_to_nbr,

  // own output head, broadcast to all neighbours
  output flit_t            out_flit,
  output logic             out_valid,
  output logic             out_fire,
  input  logic [NDIR-1:0]  nbr_stall,
  input  logic             ext_stall,

  output logic             exec_stall,
  output logic             sample_done
);
  localparam int unsigned FW = $bits(flit_t);

  in_sel_t        sel   [2];
  logic [1:0]     ib_valid, ib_pop, ib_match, ib_full, ib_empty, ib_push;
  word_t          ib_data [2];
  flit_t          ib_head [2];

  assign sel[0] = cfg.in0;
  assign sel[1] = cfg.in1;

  for (genvar i = 0; i < 2; i++) begin : g_ib
    logic [1:0] d;
    logic       none;
    assign none        = (sel[i].dir == DIR_NONE);
    assign d           = sel[i].dir[1:0];
    assign ib_match[i] = !none && nbr_valid[d] && (((nbr_flit[d].tag ^ sel[i].tag) & sel[i].mask) == '0);
    assign ib_push[i]  = ib_match[i] && nbr_fire[d];

    if (ASYNC_LINKS) begin : g_async
      // written in the sending neighbour's clock, read in this unit's clock
      async_fifo #(.WIDTH(FW), .DEPTH(IN_DEPTH)) u_ibuf (
        .wclk   (nbr_clk[d]),
        .wrst_n (rst_n),
        .push   (ib_push[i]),
        .wdata  (nbr_flit[d]),
        .full   (ib_full[i]),
        .rclk   (clk),
        .rrst_n (rst_n),
        .pop    (ib_pop[i] && !none),
        .rdata  (ib_head[i]),
        .empty  (ib_empty[i])
      );
    end else begin : g_sync
      sync_fifo #(.WIDTH(FW), .DEPTH(IN_DEPTH)) u_ibuf (
        .clk   (clk),
        .rst_n (rst_n),
        .push  (ib_push[i]),
        .wdata (nbr_flit[d]),
        .pop   (ib_pop[i] && !none),
        .rdata (ib_head[i]),
        .empty (ib_empty[i]),
        .full  (ib_full[i])
      );
    end

    assign ib_valid[i] = none || !ib_empty[i];
    assign ib_data[i]  = none ? word_t'(0) : ib_head[i].data;
  end

  always_comb begin
    stall_to_nbr = '0;
    for (int i = 0; i < 2; i++)
      if (ib_match[i] && ib_full[i]) stall_to_nbr[sel[i].dir[1:0]] = 1'b1;
  end

  logic  ob_push, ob_full, ob_empty;
  flit_t ob_flit;

  // en comes from the configuration side; bring it into this unit's clock
  logic [1:0] en_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_sync <= '0;
    else        en_sync <= {en_sync[0], en};
  end

  pu_exec u_exec (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (en_sync[1]),
    .cfg         (cfg),
    .cfg_clk     (cfg_clk),
    .coef_we     (coef_we),
    .coef_addr   (coef_addr),
    .coef_wdata  (coef_wdata),
    .ib0_valid   (ib_valid[0]),
    .ib0_data    (ib_data[0]),
    .ib0_pop     (ib_pop[0]),
    .ib1_valid   (ib_valid[1]),
    .ib1_data    (ib_data[1]),
    .ib1_pop     (ib_pop[1]),
    .ob_full     (ob_full),
    .ob_push     (ob_push),
    .ob_flit     (ob_flit),
    .stall       (exec_stall),
    .sample_done (sample_done)
  );

  sync_fifo #(.WIDTH(FW), .DEPTH(OUT_DEPTH)) u_obuf (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (ob_push),
    .wdata (ob_flit),
    .pop   (out_fire),
    .rdata (out_flit),
    .empty (ob_empty),
    .full  (ob_full)
  );

  assign out_valid = !ob_empty;
  assign out_fire  = out_valid && !(|nbr_stall) && !ext_stall;

endmodule
