// Two-dimensional mesh of processor units running a direct-form FIR filter.
//
// ROWS x COLS processor units (pu) are connected to their four nearest
// neighbours. A mapping of the filter onto the mesh is loaded by writing each
// unit's configuration (role, tap count, input selections, tags) and its
// coefficients while en is low; raising en starts all units. Different
// mappings trade processor count for throughput, from a single unit doing
// all sixteen multiply-accumulates of a sample in turn, to one unit per
// delay, per multiply and per add, which takes a new sample every clock.
//
// Samples enter from the io clock domain through an asynchronous FIFO that
// acts as the west neighbour of unit (0,0): its words carry tag in_tag. The
// filter output is picked up at unit (out_row, out_col), whose flits tagged
// out_tag are copied into a second asynchronous FIFO read in the io domain.
// This listener takes part in that unit's broadcast handshake, so a full
// output FIFO holds the mesh back rather than dropping words.
//
// Clocking: as in the document, every unit runs from its own clock
// (pu_clk[row*COLS+col]) and the links between units are asynchronous
// FIFOs (ASYNC_LINKS = 1). The clocks may differ in frequency and phase; a
// mapping then runs at the pace of its slowest unit on the critical path.
// Configuration and coefficients are written from clk. The input FIFO is
// read in the clock of unit (0,0); the output FIFO is written in the clock of
// the unit selected by out_row/out_col. With ASYNC_LINKS = 0 the links are
// single-clock FIFOs and all pu_clk bits must carry one clock. rst_n resets
// every domain of the mesh and should be released while the clocks run.
// in_tag, out_row, out_col and out_tag are expected to be static while en is
// high. The array is described only as holding hundreds
// to thousands of processors; the default 10 x 10 size is this design's
// choice, the smallest square that holds every 16-tap mapping (at most 58
// units).
//
// Status: pu_exec_stall and pu_sample_done expose each unit's execution
// stall and end-of-sample strobes (index row*COLS+col); link_stall is high in
// a cycle in which some unit refuses a neighbour's word because its input
// buffer is full. These status bits come from the units' own clock domains.
module fir_mesh
  import fir_mesh_pkg::*;
#(
  parameter int unsigned ROWS        = 10,
  parameter int unsigned COLS        = 10,
  parameter bit          ASYNC_LINKS = 1'b1,
  parameter int unsigned IN_DEPTH    = 16,
  parameter int unsigned OUT_DEPTH   = 4,
  parameter int unsigned IO_DEPTH    = 16
) (
  input  logic                   clk,       // configuration clock
  input  logic [ROWS*COLS-1:0]   pu_clk,    // one clock per unit
  input  logic                   rst_n,
  input  logic                   en,

  // configuration, clk domain, only while en is low
  input  logic                   cfg_we,
  input  logic [7:0]             cfg_row,
  input  logic [7:0]             cfg_col,
  input  pu_cfg_t                cfg_wdata,
  input  logic                   coef_we,
  input  logic [7:0]             coef_row,
  input  logic [7:0]             coef_col,
  input  taddr_t                 coef_addr,
  input  word_t                  coef_wdata,

  input  tag_t                   in_tag,
  input  logic [7:0]             out_row,
  input  logic [7:0]             out_col,
  input  tag_t                   out_tag,

  // sample streams, io_clk domain
  input  logic                   io_clk,
  input  logic                   io_rst_n,
  input  logic                   x_valid,
  input  word_t                  x_data,
  output logic                   x_ready,
  output logic                   y_valid,
  output word_t                  y_data,
  input  logic                   y_ready,

  output logic [ROWS*COLS-1:0]   pu_exec_stall,
  output logic [ROWS*COLS-1:0]   pu_sample_done,
  output logic                   link_stall
);
  localparam int unsigned N = ROWS * COLS;

  pu_cfg_t         cfg_q     [ROWS][COLS];
  flit_t           out_flit  [ROWS][COLS];
  logic            out_valid [ROWS][COLS];
  logic            out_fire  [ROWS][COLS];
  logic [NDIR-1:0] stall_to  [ROWS][COLS];
  logic [N-1:0]    any_link_stall;

  // ---------------- input boundary ----------------
  logic  xin_full, xin_empty, xin_fire;
  word_t xin_data;

  async_fifo #(.WIDTH(DATA_W), .DEPTH(IO_DEPTH)) u_xin (
    .wclk   (io_clk),
    .wrst_n (io_rst_n),
    .push   (x_valid && !xin_full),
    .wdata  (x_data),
    .full   (xin_full),
    .rclk   (pu_clk[0]),
    .rrst_n (rst_n),
    .pop    (xin_fire),
    .rdata  (xin_data),
    .empty  (xin_empty)
  );
  assign x_ready  = !xin_full;
  assign xin_fire = !xin_empty && !stall_to[0][0][IX_W];

  // ---------------- output boundary ----------------
  flit_t sel_flit;
  logic  sel_valid, sel_fire, sel_clk, y_match, yout_full, yout_empty;

  always_comb begin
    sel_flit  = '0;
    sel_valid = 1'b0;
    sel_fire  = 1'b0;
    sel_clk   = pu_clk[0];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (out_row == 8'(r) && out_col == 8'(c)) begin
          sel_flit  = out_flit[r][c];
          sel_valid = out_valid[r][c];
          sel_fire  = out_fire[r][c];
          sel_clk   = pu_clk[r*COLS+c];
        end
  end
  assign y_match = sel_valid && (sel_flit.tag == out_tag);

  async_fifo #(.WIDTH(DATA_W), .DEPTH(IO_DEPTH)) u_yout (
    .wclk   (sel_clk),
    .wrst_n (rst_n),
    .push   (y_match && sel_fire),
    .wdata  (sel_flit.data),
    .full   (yout_full),
    .rclk   (io_clk),
    .rrst_n (io_rst_n),
    .pop    (y_ready && !yout_empty),
    .rdata  (y_data),
    .empty  (yout_empty)
  );
  assign y_valid = !yout_empty;

  // ---------------- the mesh ----------------
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      flit_t           nf [NDIR];
      logic [NDIR-1:0] nv, nfire, nstall, nclk;
      logic            cfg_hit, coef_hit;

      assign cfg_hit  = cfg_we  && cfg_row  == 8'(r) && cfg_col  == 8'(c);
      assign coef_hit = coef_we && coef_row == 8'(r) && coef_col == 8'(c);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)       cfg_q[r][c] <= PU_CFG_IDLE;
        else if (cfg_hit) cfg_q[r][c] <= cfg_wdata;
      end

      // north
      if (r > 0) begin : g_n
        assign nf[IX_N]     = out_flit[r-1][c];
        assign nv[IX_N]     = out_valid[r-1][c];
        assign nfire[IX_N]  = out_fire[r-1][c];
        assign nstall[IX_N] = stall_to[r-1][c][IX_S];
        assign nclk[IX_N]   = pu_clk[(r-1)*COLS+c];
      end else begin : g_n0
        assign nf[IX_N]     = '0;
        assign nv[IX_N]     = 1'b0;
        assign nfire[IX_N]  = 1'b0;
        assign nstall[IX_N] = 1'b0;
        assign nclk[IX_N]   = pu_clk[r*COLS+c];
      end
      // south
      if (r < ROWS - 1) begin : g_s
        assign nf[IX_S]     = out_flit[r+1][c];
        assign nv[IX_S]     = out_valid[r+1][c];
        assign nfire[IX_S]  = out_fire[r+1][c];
        assign nstall[IX_S] = stall_to[r+1][c][IX_N];
        assign nclk[IX_S]   = pu_clk[(r+1)*COLS+c];
      end else begin : g_s0
        assign nf[IX_S]     = '0;
        assign nv[IX_S]     = 1'b0;
        assign nfire[IX_S]  = 1'b0;
        assign nstall[IX_S] = 1'b0;
        assign nclk[IX_S]   = pu_clk[r*COLS+c];
      end
      // east
      if (c < COLS - 1) begin : g_e
        assign nf[IX_E]     = out_flit[r][c+1];
        assign nv[IX_E]     = out_valid[r][c+1];
        assign nfire[IX_E]  = out_fire[r][c+1];
        assign nstall[IX_E] = stall_to[r][c+1][IX_W];
        assign nclk[IX_E]   = pu_clk[r*COLS+c+1];
      end else begin : g_e0
        assign nf[IX_E]     = '0;
        assign nv[IX_E]     = 1'b0;
        assign nfire[IX_E]  = 1'b0;
        assign nstall[IX_E] = 1'b0;
        assign nclk[IX_E]   = pu_clk[r*COLS+c];
      end
      // west; unit (0,0) has the sample input there
      if (c > 0) begin : g_w
        assign nf[IX_W]     = out_flit[r][c-1];
        assign nv[IX_W]     = out_valid[r][c-1];
        assign nfire[IX_W]  = out_fire[r][c-1];
        assign nstall[IX_W] = stall_to[r][c-1][IX_E];
        assign nclk[IX_W]   = pu_clk[r*COLS+c-1];
      end else if (r == 0) begin : g_win
        assign nf[IX_W]     = '{tag: in_tag, data: xin_data};
        assign nv[IX_W]     = !xin_empty;
        assign nfire[IX_W]  = xin_fire;
        assign nstall[IX_W] = 1'b0;
        assign nclk[IX_W]   = pu_clk[r*COLS+c];
      end else begin : g_w0
        assign nf[IX_W]     = '0;
        assign nv[IX_W]     = 1'b0;
        assign nfire[IX_W]  = 1'b0;
        assign nstall[IX_W] = 1'b0;
        assign nclk[IX_W]   = pu_clk[r*COLS+c];
      end

      logic ext_stall;
      assign ext_stall = (out_row == 8'(r)) && (out_col == 8'(c)) && y_match && yout_full;

      pu #(.ASYNC_LINKS(ASYNC_LINKS), .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_pu (
        .clk          (pu_clk[r*COLS+c]),
        .rst_n        (rst_n),
        .en           (en),
        .cfg          (cfg_q[r][c]),
        .cfg_clk      (clk),
        .nbr_clk      (nclk),
        .coef_we      (coef_hit),
        .coef_addr    (coef_addr),
        .coef_wdata   (coef_wdata),
        .nbr_flit     (nf),
        .nbr_valid    (nv),
        .nbr_fire     (nfire),
        .stall_to_nbr (stall_to[r][c]),
        .out_flit     (out_flit[r][c]),
        .out_valid    (out_valid[r][c]),
        .out_fire     (out_fire[r][c]),
        .nbr_stall    (nstall),
        .ext_stall    (ext_stall),
        .exec_stall   (pu_exec_stall[r*COLS+c]),
        .sample_done  (pu_sample_done[r*COLS+c])
      );

      assign any_link_stall[r*COLS+c] = |stall_to[r][c];
    end
  end

  assign link_stall = |any_link_stall;

endmodule
