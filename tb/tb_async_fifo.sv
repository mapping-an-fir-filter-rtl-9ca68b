// Self-checking test of async_fifo with unrelated write and read clocks.
//
// A writer in wclk pushes a counting-plus-random sequence whenever the FIFO
// is not full; a reader in rclk pops at random. The reader checks that every
// word arrives once and in order, and that full and empty are asserted at
// some point. A second phase uses a fast reader and checks that words get
// through at close to one per write cycle.
module tb_async_fifo;
  localparam int W = 16, D = 8, NW = 2000;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic push = 0, pop = 0, full, empty;
  logic [W-1:0] wdata = 0, rdata;
  realtime rhalf = 7ns;
  always #5ns wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] seq [NW];
  int nr = 0, nw = 0;
  realtime t0, t1;

  initial begin
    #2ms;
    failures++;
    $display("watchdog: written %0d read %0d", nw, nr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NW; i++) seq[i] = W'(i * 97) ^ W'($urandom_range(0, 15) << 12);
    #20ns wrst_n = 1; rrst_n = 1;
  end

  // writer
  initial begin
    wait (wrst_n);
    while (nw < NW) begin
      @(negedge wclk);
      if (full) n_full++;
      push  = !full && ($urandom_range(0, 9) < 8);
      wdata = seq[nw];
      @(posedge wclk);
      if (push) nw++;
      #1 push = 0;
    end
  end

  // reader
  initial begin
    wait (rrst_n);
    while (nr < NW) begin
      @(negedge rclk);
      if (empty) n_empty++;
      if (nr == NW / 2) rhalf = 2ns;             // second phase: fast reader
      if (nr == NW / 2 + 100) t0 = $realtime;
      if (nr == NW / 2 + 600) t1 = $realtime;
      pop = !empty && (nr >= NW / 2 || $urandom_range(0, 9) < 4);
      if (pop) begin
        checks++;
        if (rdata !== seq[nr]) begin
          failures++;
          if (failures < 10) $display("word %0d: %h expected %h", nr, rdata, seq[nr]);
        end
      end
      @(posedge rclk);
      if (pop) nr++;
      #1 pop = 0;
    end
    // writer offers 8 of 10 cycles at 10 ns: 500 words take about 6.25 us
    checks++;
    if ((t1 - t0) > 7.5us) begin
      failures++;
      $display("slow transfer: %0t for 500 words", t1 - t0);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("coverage: full %0d empty %0d", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
