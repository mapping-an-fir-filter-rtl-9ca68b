// End-to-end test of the FIR mesh at its default size (10 x 10 units).
//
// The same mesh is loaded in turn with each mapping of a 16-tap filter and
// fed a random sample stream; every output is compared with a direct-form
// reference computed here, and the steady-state spacing of outputs is
// compared with the cycles per sample that each mapping's program implies:
//
//   I-type, P units in a chain, K = ceil(16/P) taps per unit:
//     P = 1 : 18 cycles   (load, clear, 16 MACs)
//     P = 16:  4 cycles   (load, multiply, forward, add)
//     else  :  K + 4      (load, forward, clear, K MACs, add)
//   method 1 (distribute units + multiply-add units, 36 units): 2 cycles
//   method 2 (distribute-multiply units + adders, 36 units)   : 3 cycles
//   method 3 (distribute, multiply and add units, 54 units)   : 1 cycle
//   the same three methods in a U-shaped placement (57, 39, 39 units):
//     these reach 1, 2 and 3 cycles only with input buffers of about 128
//     words, because one arm's partial sums arrive at the join about 28
//     hops before the other's; with the default buffers the test checks
//     the results and that the rate is between 1x and 4x those figures
//   the same methods with M units per function, K = ceil(16/M) taps each:
//     method 3: K + 1, method 1: K + 2, method 2: K + 3 cycles
//
// All runs above drive every unit from the same clock. Two runs then give
// each unit its own clock (periods between 9 and 12.5 ns, different phases):
// method 3 and the 4-unit I-type chain must still produce exact results, at
// the pace of the slowest unit. A last run repeats method 3 with a slower io
// clock and a reader that pauses at random, so the output buffer fills and
// back-pressure reaches the units (link stalls). Between runs the mesh is reset and reconfigured. The
// test counts how often each mechanism occurred and fails if one never did.
module tb_fir_mesh;
  import fir_mesh_pkg::*;

  localparam int ROWS = 10, COLS = 10, NT = 16;
  localparam int NS   = 64;             // samples per run
  localparam tag_t TX = 4'd1, TP = 4'd2, TS = 4'd3;
  localparam tag_t TW = 4'b0100, TF = 4'b0101, TWF_MASK = 4'b1110;  // window words, last window word
  localparam realtime CLK_P = 10ns;

  logic clk = 0, io_clk = 0, rst_n = 0, io_rst_n = 0, en = 0;
  realtime io_half = 5ns;
  always #(CLK_P / 2) clk = ~clk;
  always #(io_half)   io_clk = ~io_clk;

  logic    cfg_we = 0, coef_we = 0;
  logic [7:0] cfg_row = 0, cfg_col = 0, coef_row = 0, coef_col = 0;
  pu_cfg_t cfg_wdata = PU_CFG_IDLE;
  taddr_t  coef_addr = 0;
  word_t   coef_wdata = 0;
  tag_t    in_tag = TX, out_tag = TS;
  logic [7:0] out_row = 0, out_col = 0;
  logic    x_valid = 0, x_ready, y_valid, y_ready = 1;
  word_t   x_data = 0, y_data;
  logic [ROWS*COLS-1:0] pu_exec_stall, pu_sample_done;
  logic    link_stall;

  // unit clocks: all equal to clk, or (mixed_clk) one free-running clock per
  // unit; switched only while the mesh is held in reset
  localparam realtime SLOW_P = 12.5ns;  // slowest unit clock
  logic [ROWS*COLS-1:0] pu_clk;
  logic uclk [ROWS*COLS];
  bit   mixed_clk = 0;
  for (genvar i = 0; i < ROWS*COLS; i++) begin : g_uclk
    initial begin
      uclk[i] = 0;
      #(1ns * ((i * 3) % 7));
      forever #(4.5ns + 0.25ns * ((i * 5) % 8)) uclk[i] = ~uclk[i];
    end
    assign pu_clk[i] = mixed_clk ? uclk[i] : clk;
  end

  fir_mesh dut (.*);

  int checks = 0, failures = 0;
  int n_link_stall = 0, n_exec_stall = 0, n_reconfig = 0, n_y_pause = 0, n_slow_io = 0;
  int n_runs_ok = 0, n_mixed = 0;

  always @(posedge clk) begin
    if (link_stall) n_link_stall++;
    if (en && |pu_exec_stall) n_exec_stall++;
  end

  // watchdog
  initial begin
    #(4ms);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mapping tables ----------------
  pu_cfg_t map_cfg [ROWS][COLS];
  word_t   map_h   [ROWS][COLS][NT];
  word_t   h [NT];

  function automatic in_sel_t sel(dir_e d, tag_t t, tag_t m = '1);
    return '{dir: d, tag: t, mask: m};
  endfunction

  function automatic pu_cfg_t mk(role_e role, in_sel_t i0, in_sel_t i1, tag_t ot,
                                 tag_t ft = '0, logic dly = 0, int k = 1,
                                 logic fwd = 0, logic psum = 0);
    pu_cfg_t c;
    c = PU_CFG_IDLE;
    c.role = role; c.in0 = i0; c.in1 = i1; c.out_tag = ot; c.fwd_tag = ft;
    c.delay = dly; c.ntaps = 5'(k); c.fwd = fwd; c.psum = psum;
    return c;
  endfunction

  localparam in_sel_t NONE = '{dir: DIR_NONE, tag: '0, mask: '1};

  task automatic clear_map();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        map_cfg[r][c] = PU_CFG_IDLE;
        for (int t = 0; t < NT; t++) map_h[r][c][t] = 0;
      end
  endtask

  // Snake placement of an I-type chain of P units; returns the last unit.
  task automatic map_itype(int p, output int orow, output int ocol);
    int off = 0, pr = 0, pc = 0;
    for (int j = 0; j < p; j++) begin
      int r, c, k;
      dir_e d;
      r = j / COLS;
      c = (r % 2 == 0) ? j % COLS : COLS - 1 - j % COLS;
      k = NT / p + ((j < NT % p) ? 1 : 0);
      if (j == 0)       d = DIR_W;
      else if (pr < r)  d = DIR_N;
      else if (pc < c)  d = DIR_W;
      else              d = DIR_E;
      if (p == 1)
        map_cfg[r][c] = mk(ROLE_MAC, sel(d, TX), NONE, TS, TX, 0, k, 0, 0);
      else
        map_cfg[r][c] = mk(ROLE_MAC, sel(d, TX), (j == 0) ? NONE : sel(d, TS), TS, TX, 0, k, 1, 1);
      for (int t = 0; t < k; t++) map_h[r][c][t] = h[off + t];
      off += k;
      pr = r; pc = c;
      orow = r; ocol = c;
    end
  endtask

  // Folded two-band layouts. Band A runs east over columns 0..7 (taps 0..7),
  // band B runs west over columns 7..0 (taps 8..15); column 8 carries the
  // sample line from band A to band B through pass units.
  // method: 1, 2 or 3.
  task automatic map_folded(int method, output int orow, output int ocol);
    int rows_b;
    for (int i = 0; i < 8; i++) begin
      int ca, cb;
      ca = i; cb = 7 - i;
      unique case (method)
        1: begin
          // rows 0 dist (E), 1 mult-add (E), 2 mult-add (W), 3 dist (W)
          map_cfg[0][ca] = mk(ROLE_DIST, sel(DIR_W, TX), NONE, TX, '0, ca != 0);
          map_cfg[1][ca] = mk(ROLE_MULT_ADD, sel(DIR_N, TX), (ca == 0) ? NONE : sel(DIR_W, TS), TS);
          map_h[1][ca][0] = h[i];
          map_cfg[3][cb] = mk(ROLE_DIST, sel(DIR_E, TX), NONE, TX, '0, 1);
          map_cfg[2][cb] = mk(ROLE_MULT_ADD, sel(DIR_S, TX), (cb == 7) ? sel(DIR_N, TS) : sel(DIR_E, TS), TS);
          map_h[2][cb][0] = h[8 + i];
        end
        2: begin
          // rows 0 dist-mult (E), 1 add (E), 2 add (W), 3 dist-mult (W)
          map_cfg[0][ca] = mk(ROLE_DIST_MULT, sel(DIR_W, TX), NONE, TP, TX, 1);
          map_h[0][ca][0] = h[i];
          map_cfg[1][ca] = mk(ROLE_ADD, sel(DIR_N, TP), (ca == 0) ? NONE : sel(DIR_W, TS), TS);
          map_cfg[3][cb] = mk(ROLE_DIST_MULT, sel(DIR_E, TX), NONE, TP, TX, 1);
          map_h[3][cb][0] = h[8 + i];
          map_cfg[2][cb] = mk(ROLE_ADD, sel(DIR_S, TP), (cb == 7) ? sel(DIR_N, TS) : sel(DIR_E, TS), TS);
        end
        default: begin
          // rows 0 dist (E), 1 mult, 2 add (E), 3 add (W), 4 mult, 5 dist (W)
          map_cfg[0][ca] = mk(ROLE_DIST, sel(DIR_W, TX), NONE, TX, '0, ca != 0);
          map_cfg[1][ca] = mk(ROLE_MULT, sel(DIR_N, TX), NONE, TP);
          map_h[1][ca][0] = h[i];
          map_cfg[2][ca] = mk(ROLE_ADD, sel(DIR_N, TP), (ca == 0) ? NONE : sel(DIR_W, TS), TS);
          map_cfg[5][cb] = mk(ROLE_DIST, sel(DIR_E, TX), NONE, TX, '0, 1);
          map_cfg[4][cb] = mk(ROLE_MULT, sel(DIR_S, TX), NONE, TP);
          map_h[4][cb][0] = h[8 + i];
          map_cfg[3][cb] = mk(ROLE_ADD, sel(DIR_S, TP), (cb == 7) ? sel(DIR_N, TS) : sel(DIR_E, TS), TS);
        end
      endcase
    end
    // pass units down column 8: from (0,8) to the last row of band B
    rows_b = (method == 3) ? 6 : 4;
    map_cfg[0][8] = mk(ROLE_DIST, sel(DIR_W, TX), NONE, TX);
    for (int r = 1; r < rows_b; r++) map_cfg[r][8] = mk(ROLE_DIST, sel(DIR_N, TX), NONE, TX);
    orow = (method == 3) ? 3 : 2;
    ocol = 0;
  endtask

  // Methods 1-3 with M units per function, K = ceil(16/M) taps per unit,
  // in a straight layout along rows 0..2.
  //   method 3: row 0 window distribute, row 1 streaming MAC, row 2 adders
  //   method 1: row 0 window distribute, row 1 streaming MAC with partial sum
  //   method 2: row 0 MAC segment that forwards samples, row 1 adders
  task automatic map_reduced(int method, int m_units, output int orow, output int ocol);
    int off = 0;
    for (int m = 0; m < m_units; m++) begin
      int k;
      in_sel_t xin;
      k = NT / m_units + ((m < NT % m_units) ? 1 : 0);
      xin = (m == 0) ? sel(DIR_W, TX) : sel(DIR_W, TF);
      unique case (method)
        3: begin
          map_cfg[0][m] = mk(ROLE_DIST_WIN, xin, NONE, TW, TF, m != 0, k);
          map_cfg[1][m] = mk(ROLE_MACS, sel(DIR_N, TW, TWF_MASK), NONE, TP, '0, 0, k);
          map_cfg[2][m] = mk(ROLE_ADD, sel(DIR_N, TP), (m == 0) ? NONE : sel(DIR_W, TS), TS);
          for (int t = 0; t < k; t++) map_h[1][m][t] = h[off + t];
          orow = 2;
        end
        1: begin
          map_cfg[0][m] = mk(ROLE_DIST_WIN, xin, NONE, TW, TF, m != 0, k);
          map_cfg[1][m] = mk(ROLE_MACS, sel(DIR_N, TW, TWF_MASK), (m == 0) ? NONE : sel(DIR_W, TS),
                             TS, '0, 0, k, 0, 1);
          for (int t = 0; t < k; t++) map_h[1][m][t] = h[off + t];
          orow = 1;
        end
        default: begin
          map_cfg[0][m] = mk(ROLE_MAC, xin, NONE, TP, TF, 0, k, 1, 0);
          map_cfg[1][m] = mk(ROLE_ADD, sel(DIR_N, TP), (m == 0) ? NONE : sel(DIR_W, TS), TS);
          for (int t = 0; t < k; t++) map_h[0][m][t] = h[off + t];
          orow = 1;
        end
      endcase
      off += k;
      ocol = m;
    end
  endtask

  // U-shaped placement of method m: the sample line runs down column 0
  // (taps 0..7 in rows 1..8), along row 9 and up column dr (taps 8..15 in
  // rows 8..1). Each arm has its multipliers and partial-sum chain towards
  // the middle; the two chains climb to row 0, where one adder joins them.
  //   method 3: columns dist 0, mult 1, add 2 | add 3, mult 4, dist 5
  //   method 1: columns dist 0, mult-add 1    | mult-add 2, dist 3
  //   method 2: columns dist-mult 0, add 1    | add 2, dist-mult 3
  task automatic map_utype(int method, output int orow, output int ocol);
    int dr, cl, cr;
    dr = (method == 3) ? 5 : 3;
    cl = (method == 3) ? 2 : 1;          // left chain column, output unit above it
    cr = cl + 1;
    map_cfg[0][0] = mk(ROLE_DIST, sel(DIR_W, TX), NONE, TX);
    map_cfg[9][0] = mk(ROLE_DIST, sel(DIR_N, TX), NONE, TX);
    for (int c = 1; c <= dr; c++) map_cfg[9][c] = mk(ROLE_DIST, sel(DIR_W, TX), NONE, TX);
    for (int side = 0; side < 2; side++)
      for (int r = 1; r <= 8; r++) begin
        int tap, cd, cm, cc;
        dir_e up, to_d, to_m;
        tap  = (side == 0) ? r - 1 : 16 - r;
        cd   = (side == 0) ? 0 : dr;             // sample line
        cc   = (side == 0) ? cl : cr;            // partial-sum chain
        cm   = (side == 0) ? 1 : dr - 1;         // multiplier (method 3)
        up   = (side == 0) ? DIR_N : DIR_S;      // where the sample line comes from
        to_d = (side == 0) ? DIR_W : DIR_E;      // towards the sample line
        unique case (method)
          3: begin
            map_cfg[r][cd] = mk(ROLE_DIST, sel(up, TX), NONE, TX, '0, tap != 0);
            map_cfg[r][cm] = mk(ROLE_MULT, sel(to_d, TX), NONE, TP);
            map_h[r][cm][0] = h[tap];
            map_cfg[r][cc] = mk(ROLE_ADD, sel(to_d, TP), (r == 8) ? NONE : sel(DIR_S, TS), TS);
          end
          1: begin
            map_cfg[r][cd] = mk(ROLE_DIST, sel(up, TX), NONE, TX, '0, tap != 0);
            map_cfg[r][cc] = mk(ROLE_MULT_ADD, sel(to_d, TX), (r == 8) ? NONE : sel(DIR_S, TS), TS);
            map_h[r][cc][0] = h[tap];
          end
          default: begin
            map_cfg[r][cd] = mk(ROLE_DIST_MULT, sel(up, TX), NONE, TP, TX, 1);
            map_h[r][cd][0] = h[tap];
            map_cfg[r][cc] = mk(ROLE_ADD, sel(to_d, TP), (r == 8) ? NONE : sel(DIR_S, TS), TS);
          end
        endcase
      end
    map_cfg[0][cl] = mk(ROLE_ADD, sel(DIR_S, TS), sel(DIR_E, TS), TS);
    map_cfg[0][cr] = mk(ROLE_DIST, sel(DIR_S, TS), NONE, TS);
    orow = 0; ocol = cl;
  endtask

  function automatic int units_used();
    int n = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (map_cfg[r][c].role != ROLE_IDLE) n++;
    return n;
  endfunction

  task automatic load_map(int orow, int ocol, bit mixed = 0);
    @(negedge clk);
    en = 0;
    rst_n = 0; io_rst_n = 0;
    mixed_clk = mixed;
    repeat (3) @(negedge clk);
    rst_n = 1; io_rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        cfg_we = 1; cfg_row = 8'(r); cfg_col = 8'(c); cfg_wdata = map_cfg[r][c];
        @(negedge clk);
        cfg_we = 0;
        for (int t = 0; t < NT; t++) begin
          coef_we = 1; coef_row = 8'(r); coef_col = 8'(c);
          coef_addr = taddr_t'(t); coef_wdata = map_h[r][c][t];
          @(negedge clk);
        end
        coef_we = 0;
      end
    out_row = 8'(orow); out_col = 8'(ocol);
    n_reconfig++;
    @(negedge clk);
    en = 1;
  endtask

  // ---------------- one run ----------------
  word_t xs [NS];
  word_t ys [NS];
  realtime t_out [NS];

  task automatic run(string name, int exp_cpi, bit random_pause, bit mixed = 0, bit skewed = 0);
    int nin = 0, nout = 0;
    word_t ref_y;
    // drive inputs (io domain)
    fork
      begin
        while (nin < NS) begin
          @(negedge io_clk);
          x_valid = 1; x_data = xs[nin];
          @(posedge io_clk);
          if (x_ready) nin++;
          #1;
          x_valid = 0;
        end
      end
      begin
        while (nout < NS) begin
          @(negedge io_clk);
          y_ready = random_pause ? ($urandom_range(0, 3) == 0) : 1'b1;
          @(posedge io_clk);
          if (y_valid && !y_ready) n_y_pause++;
          if (y_valid && y_ready) begin
            ys[nout] = y_data;
            t_out[nout] = $realtime;
            nout++;
          end
        end
        #1 y_ready = 1;
      end
    join
    // compare with direct form
    for (int k = 0; k < NS; k++) begin
      ref_y = 0;
      for (int n = 0; n < NT; n++) if (k - n >= 0) ref_y += h[n] * xs[k - n];
      checks++;
      if (ys[k] !== ref_y) begin
        failures++;
        if (failures < 10) $display("%s: y[%0d]=%0d expected %0d", name, k, ys[k], ref_y);
      end
    end
    // with one clock per unit the slowest unit sets the pace; allow for the
    // slack of the clock-domain crossings
    if (mixed) begin
      real cpi;
      cpi = (t_out[NS-1] - t_out[NS-33]) / (32 * SLOW_P);
      checks++;
      if (cpi < exp_cpi * 0.97 || cpi > exp_cpi * 1.10) begin
        failures++;
        $display("%s: %0.3f slowest-clock cycles per sample, expected about %0d", name, cpi, exp_cpi);
      end else begin
        $display("%s: %0d units, %0.3f slowest-clock cycles per sample", name, units_used(), cpi);
      end
      n_mixed++;
    end
    // a placement whose partial-sum paths differ in length reaches exp_cpi
    // only if the buffers on the short path hold the whole difference; with
    // smaller buffers it must still be no faster than exp_cpi and not stall
    // for long
    else if (skewed) begin
      real cpi;
      cpi = (t_out[NS-1] - t_out[NS-33]) / (32 * CLK_P);
      checks++;
      if (cpi < exp_cpi - 0.01 || cpi > 4 * exp_cpi) begin
        failures++;
        $display("%s: %0.3f cycles per sample, expected %0d to %0d", name, cpi, exp_cpi, 4 * exp_cpi);
      end else begin
        $display("%s: %0d units, %0.3f cycles per sample (%0d with buffers deep enough)",
                 name, units_used(), cpi, exp_cpi);
      end
    end
    // steady-state output spacing in mesh clock cycles
    else if (exp_cpi > 0) begin
      real cpi;
      cpi = (t_out[NS-1] - t_out[NS-33]) / (32 * CLK_P);
      checks++;
      if (cpi < exp_cpi - 0.01 || cpi > exp_cpi + 0.01) begin
        failures++;
        $display("%s: %0.3f cycles per sample, expected %0d", name, cpi, exp_cpi);
      end else begin
        $display("%s: %0d units, %0.3f cycles per sample (throughput %0.3f)",
                 name, units_used(), cpi, 1.0 / cpi);
      end
    end
    n_runs_ok++;
  endtask

  initial begin
    int orow, ocol;
    for (int n = 0; n < NT; n++) h[n] = $signed($urandom_range(0, 255)) - 128;
    for (int k = 0; k < NS; k++) xs[k] = $signed($urandom_range(0, 255)) - 128;

    begin
      int plist [6] = '{1, 2, 3, 4, 8, 16};
      foreach (plist[i]) begin
        int p, kmax, cpi;
        p    = plist[i];
        kmax = (NT + p - 1) / p;
        cpi  = (p == 1) ? 18 : (p == 16) ? 4 : kmax + 4;
        clear_map();
        map_itype(p, orow, ocol);
        load_map(orow, ocol);
        run($sformatf("I-type P=%0d", p), cpi, 0);
      end
    end
    for (int m = 1; m <= 3; m++) begin
      clear_map();
      map_folded(m, orow, ocol);
      checks++;
      if (units_used() != ((m == 3) ? 54 : 36)) begin
        failures++;
        $display("method %0d uses %0d units", m, units_used());
      end
      load_map(orow, ocol);
      run($sformatf("method %0d", m), (m == 1) ? 2 : (m == 2) ? 3 : 1, 0);
    end
    // U-shaped placements
    for (int m = 1; m <= 3; m++) begin
      clear_map();
      map_utype(m, orow, ocol);
      checks++;
      if (units_used() != ((m == 3) ? 57 : 39)) begin
        failures++;
        $display("U-type method %0d uses %0d units", m, units_used());
      end
      load_map(orow, ocol);
      run($sformatf("U-type method %0d", m), (m == 1) ? 2 : (m == 2) ? 3 : 1, 0, 0, 1);
    end
    // methods with several taps per unit: {method, units per function}
    begin
      int rl [7][2] = '{'{3, 3}, '{3, 4}, '{3, 8}, '{1, 4}, '{1, 8}, '{2, 2}, '{2, 4}};
      foreach (rl[i]) begin
        int m, mu, kmax, cpi;
        m = rl[i][0]; mu = rl[i][1];
        kmax = (NT + mu - 1) / mu;
        cpi = (m == 3) ? kmax + 1 : (m == 1) ? kmax + 2 : kmax + 3;
        clear_map();
        map_reduced(m, mu, orow, ocol);
        load_map(orow, ocol);
        run($sformatf("method %0d, %0d units per function", m, mu), cpi, 0);
      end
    end
    // one clock per unit
    clear_map();
    map_folded(3, orow, ocol);
    load_map(orow, ocol, 1);
    run("method 3, one clock per unit", 1, 0, 1);
    clear_map();
    map_itype(4, orow, ocol);
    load_map(orow, ocol, 1);
    run("I-type P=4, one clock per unit", 8, 0, 1);
    // back to the one-sample-per-clock mapping for the last run
    clear_map();
    map_folded(3, orow, ocol);
    // slow io clock, pausing reader
    io_half = 7ns;
    n_slow_io++;
    for (int k = 0; k < NS; k++) xs[k] = $signed($urandom_range(0, 255)) - 128;
    load_map(orow, ocol, 0);
    run("method 3, slow io", 0, 1);

    // every mechanism must have happened
    checks++; if (n_link_stall == 0) begin failures++; $display("no link stall"); end
    checks++; if (n_exec_stall == 0) begin failures++; $display("no exec stall"); end
    checks++; if (n_y_pause    == 0) begin failures++; $display("no output pause"); end
    checks++; if (n_reconfig   < 10) begin failures++; $display("too few reconfigurations"); end
    checks++; if (n_slow_io    == 0) begin failures++; $display("no clock ratio change"); end
    checks++; if (n_mixed      <  2) begin failures++; $display("too few runs with one clock per unit"); end
    $display("coverage: link stalls %0d, exec stall cycles %0d, output pauses %0d, reconfigurations %0d, runs %0d",
             n_link_stall, n_exec_stall, n_y_pause, n_reconfig, n_runs_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
