// Self-checking test of pu_exec, the per-sample program sequencer.
//
// Each role is run on random input streams, first with inputs always
// available and the output never full, where the spacing of sample_done
// pulses must equal the role's program length, then with random input gaps
// and random output back-pressure, where only the results are checked.
// Expected results are computed here from the role definitions:
//   DIST       y = x  (delay: previous x, 0 first)
//   MULT       y = h0 * x
//   ADD        y = a + b
//   MULT_ADD   y = h0 * a + b
//   DIST_MULT  forward previous x (fwd tag), then h0 * x (out tag)
//   MAC        forward x(k-K) (fwd tag) if fwd, then sum h_t x(k-t) (+ b if psum)
//   DIST_WIN   x(k), x(k-1), ..., x(k-K+1) (the last under the fwd tag)
//   MACS       sum h_t a(kK+t) over K streamed words (+ b if psum)
//   ADD3       a(2k) + b(k) + a(2k+1)
module tb_pu_exec;
  import fir_mesh_pkg::*;

  localparam int NSMP = 40;
  localparam int NA   = 4 * NSMP;  // input words: a MACS unit takes K per result
  localparam tag_t OT = 4'd5, FT = 4'd9;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic cfg_clk;
  assign cfg_clk = clk;

  pu_cfg_t cfg = PU_CFG_IDLE;
  logic    coef_we = 0;
  taddr_t  coef_addr = 0;
  word_t   coef_wdata = 0;
  logic    ib0_valid, ib1_valid, ib0_pop, ib1_pop, ob_full = 0, ob_push, stall, sample_done;
  word_t   ib0_data, ib1_data;
  flit_t   ob_flit;

  pu_exec dut (.*);

  int checks = 0, failures = 0, n_stall = 0;
  word_t a [NA], b [NSMP], h [NTAPS_MAX];
  int ia, ib, na_lim;
  bit gaps;
  logic gate0, gate1;
  flit_t got [$];
  flit_t expq [$];

  assign ib0_valid = (ia < na_lim) && gate0;
  assign ib0_data  = (ia < na_lim) ? a[ia] : '0;
  assign ib1_valid = (ib < NSMP) && gate1;
  assign ib1_data  = (ib < NSMP) ? b[ib] : '0;

  always @(posedge clk) begin
    if (ib0_pop && ib0_valid) ia <= ia + 1;
    if (ib1_pop && ib1_valid) ib <= ib + 1;
    if (ob_push) got.push_back(ob_flit);
    if (stall) n_stall++;
  end
  always @(negedge clk) begin
    gate0   <= !gaps || $urandom_range(0, 2) != 0;
    gate1   <= !gaps || $urandom_range(0, 2) != 0;
    ob_full <= gaps && $urandom_range(0, 3) == 0;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void build_expected(pu_cfg_t c);
    int k_taps;
    expq.delete();
    k_taps = int'(c.ntaps);
    for (int k = 0; k < NSMP; k++) begin
      word_t prevx, acc;
      prevx = (k > 0) ? a[k-1] : 0;
      unique case (c.role)
        ROLE_DIST:      expq.push_back('{c.out_tag, c.delay ? prevx : a[k]});
        ROLE_MULT:      expq.push_back('{c.out_tag, h[0] * a[k]});
        ROLE_ADD:       expq.push_back('{c.out_tag, a[k] + b[k]});
        ROLE_MULT_ADD:  expq.push_back('{c.out_tag, h[0] * a[k] + b[k]});
        ROLE_DIST_MULT: begin
          expq.push_back('{c.fwd_tag, c.delay ? prevx : a[k]});
          expq.push_back('{c.out_tag, h[0] * a[k]});
        end
        ROLE_DIST_WIN: begin
          for (int t = 0; t < k_taps; t++) begin
            int j;
            j = c.delay ? k - 1 - t : k - t;
            expq.push_back('{(t == k_taps - 1) ? c.fwd_tag : c.out_tag, (j >= 0) ? a[j] : 0});
          end
        end
        ROLE_ADD3:      expq.push_back('{c.out_tag, a[2*k] + b[k] + a[2*k+1]});
        ROLE_MACS: begin
          acc = 0;
          for (int t = 0; t < k_taps; t++) acc += h[t] * a[k * k_taps + t];
          if (c.psum) acc += b[k];
          expq.push_back('{c.out_tag, acc});
        end
        default: begin  // MAC
          if (c.fwd) expq.push_back('{c.fwd_tag, (k - k_taps >= 0) ? a[k - k_taps] : 0});
          acc = 0;
          for (int t = 0; t < k_taps; t++) if (k - t >= 0) acc += h[t] * a[k - t];
          if (c.psum) acc += b[k];
          expq.push_back('{c.out_tag, acc});
        end
      endcase
    end
  endfunction

  task automatic run(string name, pu_cfg_t c, int exp_cpi);
    int t_first, t_last, n_done, cyc;
    for (int pass = 0; pass < 2; pass++) begin
      gaps = (pass == 1);
      en = 0;
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      cfg = c;
      for (int t = 0; t < NTAPS_MAX; t++) begin
        h[t] = $signed($urandom_range(0, 255)) - 128;
        coef_we = 1; coef_addr = taddr_t'(t); coef_wdata = h[t];
        @(negedge clk);
      end
      coef_we = 0;
      for (int k = 0; k < NA; k++) a[k] = $signed($urandom_range(0, 1023)) - 512;
      for (int k = 0; k < NSMP; k++) b[k] = $signed($urandom_range(0, 1023)) - 512;
      ia = 0; ib = 0;
      na_lim = (c.role == ROLE_MACS) ? NSMP * int'(c.ntaps) :
               (c.role == ROLE_ADD3) ? 2 * NSMP : NSMP;
      got.delete();
      build_expected(c);
      @(negedge clk);
      en = 1;
      n_done = 0; cyc = 0; t_first = 0; t_last = 0;
      while (got.size() < expq.size() && cyc < 2000) begin
        @(posedge clk);
        cyc++;
        if (sample_done) begin
          n_done++;
          if (n_done == 5)  t_first = cyc;
          if (n_done == 25) t_last  = cyc;
        end
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (got.size() != expq.size()) begin
        failures++;
        $display("%s: %0d outputs, expected %0d", name, got.size(), expq.size());
      end
      for (int i = 0; i < got.size() && i < expq.size(); i++) begin
        checks++;
        if (got[i] !== expq[i]) begin
          failures++;
          if (failures < 12) $display("%s pass %0d: out %0d = %0d/%0d expected %0d/%0d", name, pass, i,
                                      got[i].tag, got[i].data, expq[i].tag, expq[i].data);
        end
      end
      if (pass == 0) begin
        checks++;
        if (t_last - t_first != 20 * exp_cpi) begin
          failures++;
          $display("%s: %0d cycles for 20 samples, expected %0d", name, t_last - t_first, 20 * exp_cpi);
        end
      end
    end
  endtask

  function automatic pu_cfg_t mk(role_e r, int k = 1, bit dly = 0, bit fwd = 0, bit psum = 0);
    pu_cfg_t c;
    c = PU_CFG_IDLE;
    c.role = r; c.ntaps = 5'(k); c.delay = dly; c.fwd = fwd; c.psum = psum;
    c.out_tag = OT; c.fwd_tag = FT;
    return c;
  endfunction

  initial begin
    gaps = 0; gate0 = 1; gate1 = 1; ia = 0; ib = 0; na_lim = 0;
    repeat (2) @(negedge clk);
    run("dist",            mk(ROLE_DIST),               1);
    run("dist z^-1",       mk(ROLE_DIST, 1, 1),         1);
    run("mult",            mk(ROLE_MULT),               1);
    run("add",             mk(ROLE_ADD),                1);
    run("mult-add",        mk(ROLE_MULT_ADD),           2);
    run("dist-mult",       mk(ROLE_DIST_MULT, 1, 1),    3);
    run("mac K=16 alone",  mk(ROLE_MAC, 16, 0, 0, 0),  18);
    run("mac K=8 chain",   mk(ROLE_MAC, 8, 0, 1, 1),   12);
    run("mac K=6 chain",   mk(ROLE_MAC, 6, 0, 1, 1),   10);
    run("mac K=2 chain",   mk(ROLE_MAC, 2, 0, 1, 1),    6);
    run("mac K=1 chain",   mk(ROLE_MAC, 1, 0, 1, 1),    4);
    run("mac K=5 no fwd",  mk(ROLE_MAC, 5, 0, 0, 1),    8);
    run("window K=4",      mk(ROLE_DIST_WIN, 4, 0),     5);
    run("window K=3 z^-1", mk(ROLE_DIST_WIN, 3, 1),     4);
    run("stream mac K=4",  mk(ROLE_MACS, 4, 0, 0, 0),   5);
    run("stream mac K=2 +",mk(ROLE_MACS, 2, 0, 0, 1),   4);
    run("add three",       mk(ROLE_ADD3),               3);
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
