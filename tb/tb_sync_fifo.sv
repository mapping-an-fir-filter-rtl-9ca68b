// Self-checking test of sync_fifo: random pushes and pops against a queue
// model. Checks data order, the empty and full flags against the model's
// occupancy, and that a push and a pop in one cycle keep the count.
module tb_sync_fifo;
  localparam int W = 12, D = 8;

  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [W-1:0] wdata = 0, rdata;
  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic [W-1:0] q [$];

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D)) begin
        failures++;
        $display("flags: empty=%b full=%b model=%0d", empty, full, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rdata !== q[0]) begin
          failures++;
          $display("data %h expected %h", rdata, q[0]);
        end
      end
      // bias towards filling in the first half, draining in the second
      push  = ($urandom_range(0, 99) < ((i / 500) % 2 ? 35 : 70)) && !full;
      pop   = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 35)) && !empty;
      wdata = W'($urandom);
      if (full) n_full++;
      if (push && pop) n_both++;
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    checks++;
    if (n_full == 0 || n_both == 0) begin
      failures++;
      $display("coverage: full %0d, push+pop %0d", n_full, n_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
