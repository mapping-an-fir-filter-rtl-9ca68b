// Self-checking test of one processor unit (pu) with modelled neighbours.
//
// Each of the four neighbours offers a random stream of flits whose tags mix
// words meant for the unit with words meant for others. A neighbour pops its
// head when the unit does not stall it (and, at random, holds it anyway to
// model another listener refusing). The unit runs ROLE_ADD; the expected
// output is the element-wise sum of the two streams its input selections
// pick out. The unit's own output is refused at random by the modelled
// neighbours and by the external listener. Checked: every result in order
// and exactly once, stalls raised only towards the selected directions, and
// that stalls in both directions of the link did occur. Run twice: inputs
// from two different directions, then both from the same direction under
// two tags.
module tb_pu;
  import fir_mesh_pkg::*;

  localparam int NW = 300;      // words per neighbour stream

  // the unit runs on clk; the neighbours' streams come from a faster clock
  // (nclk), so the input buffers cross clock domains
  logic clk = 0, nclk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  always #3 nclk = ~nclk;
  logic cfg_clk;
  logic [NDIR-1:0] nbr_clk;
  assign cfg_clk = clk;
  assign nbr_clk = {NDIR{nclk}};

  pu_cfg_t cfg = PU_CFG_IDLE;
  logic    coef_we = 0;
  taddr_t  coef_addr = 0;
  word_t   coef_wdata = 0;
  flit_t   nbr_flit [NDIR];
  logic [NDIR-1:0] nbr_valid, nbr_fire, stall_to_nbr, nbr_stall = '0;
  flit_t   out_flit;
  logic    out_valid, out_fire, ext_stall = 0, exec_stall, sample_done;

  pu #(.IN_DEPTH(4), .OUT_DEPTH(2)) dut (.*);

  int checks = 0, failures = 0, n_stall_in = 0, n_stall_out = 0, n_bad_stall = 0;
  flit_t  src [NDIR][NW];
  int     ptr [NDIR];
  logic [NDIR-1:0] hold;
  word_t  res [$];

  for (genvar d = 0; d < NDIR; d++) begin : g_src
    assign nbr_valid[d] = ptr[d] < NW;
    assign nbr_flit[d]  = (ptr[d] < NW) ? src[d][ptr[d]] : '0;
    assign nbr_fire[d]  = rst_n && nbr_valid[d] && !stall_to_nbr[d] && !hold[d];
  end

  always @(posedge nclk) begin
    for (int d = 0; d < NDIR; d++) if (nbr_fire[d]) ptr[d] <= ptr[d] + 1;
    if (|stall_to_nbr) n_stall_in++;
  end
  always @(negedge nclk)
    for (int d = 0; d < NDIR; d++) hold[d] <= ($urandom_range(0, 4) == 0);
  always @(posedge clk) begin
    if (out_fire) res.push_back(out_flit.data);
    if (out_valid && !out_fire) n_stall_out++;
  end
  always @(negedge clk) begin
    nbr_stall <= ($urandom_range(0, 2) == 0) ? NDIR'(1 << $urandom_range(0, 3)) : '0;
    ext_stall <= ($urandom_range(0, 5) == 0);
  end

  initial begin
    #3ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(dir_e d0, tag_t t0, dir_e d1, tag_t t1);
    word_t s0 [$], s1 [$];
    int n, cyc;
    en = 0; rst_n = 0;
    for (int d = 0; d < NDIR; d++) ptr[d] = 0;
    res.delete();
    // random streams; about a third of the words carry a selected tag
    for (int d = 0; d < NDIR; d++)
      for (int i = 0; i < NW; i++) begin
        src[d][i].data = $signed($urandom_range(0, 65535)) - 32768;
        src[d][i].tag  = tag_t'($urandom_range(0, 15));
        if (d0 == d1) begin
          // one link carries both operands: alternate them, with other
          // neighbours' words in between, as a MAC chain does
          if (d == int'(d0[1:0]))
            src[d][i].tag = (i % 3 == 0) ? t0 : (i % 3 == 1) ? t1 : tag_t'(t1 + 1 + i % 5);
        end else if ($urandom_range(0, 2) == 0)
          src[d][i].tag = (d == int'(d0[1:0])) ? t0 : (d == int'(d1[1:0])) ? t1 : src[d][i].tag;
        if (d == int'(d0[1:0]) && src[d][i].tag == t0) s0.push_back(src[d][i].data);
        if (d == int'(d1[1:0]) && src[d][i].tag == t1) s1.push_back(src[d][i].data);
      end
    n = (s0.size() < s1.size()) ? s0.size() : s1.size();
    cfg = PU_CFG_IDLE;
    cfg.role = ROLE_ADD;
    cfg.in0 = '{dir: d0, tag: t0, mask: '1};
    cfg.in1 = '{dir: d1, tag: t1, mask: '1};
    cfg.out_tag = 4'd6;
    @(negedge clk);
    rst_n = 1;
    en = 1;
    cyc = 0;
    while (res.size() < n && cyc < 20000) begin
      @(posedge nclk);
      cyc++;
      for (int d = 0; d < NDIR; d++)
        if (stall_to_nbr[d] && d != int'(d0[1:0]) && d != int'(d1[1:0])) n_bad_stall++;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (res.size() != n) begin
      failures++;
      $display("%0d results, expected %0d", res.size(), n);
    end
    for (int i = 0; i < n && i < res.size(); i++) begin
      checks++;
      if (res[i] !== s0[i] + s1[i]) begin
        failures++;
        if (failures < 10) $display("result %0d: %0d expected %0d", i, res[i], s0[i] + s1[i]);
      end
    end
  endtask

  initial begin
    hold = '0;
    for (int d = 0; d < NDIR; d++) ptr[d] = 0;
    repeat (2) @(negedge clk);
    run(DIR_N, 4'd3, DIR_E, 4'd7);
    run(DIR_W, 4'd1, DIR_W, 4'd2);
    checks++;
    if (n_bad_stall != 0) begin failures++; $display("%0d stalls towards unselected neighbours", n_bad_stall); end
    checks++;
    if (n_stall_in == 0 || n_stall_out == 0) begin
      failures++;
      $display("coverage: input stalls %0d, output stalls %0d", n_stall_in, n_stall_out);
    end
    $display("input stalls %0d, output stalls %0d", n_stall_in, n_stall_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
