// Testbench for audio_fifo: random pushes and pops against a queue model,
// checking data order, the one-clock read latency, `count`, `full` and
// `empty`, and that a push when full and a pop when empty are ignored. Both
// the full and the empty condition are reached.
module tb_audio_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  localparam int D = 16;
  logic        push, pop, full, empty, flush;
  logic [15:0] din, dout;
  logic [4:0]  count;
  logic [15:0] q [$];
  int          checks = 0, failures = 0, n_full = 0, n_empty = 0;

  audio_fifo #(.DEPTH(D), .WIDTH(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0; flush = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic p, r, pend;
      logic [15:0] exp, d;
      int phase;
      phase = (n / 200) % 2;         // alternate filling and draining
      p = ($urandom % 4) < (phase ? 1 : 3);
      r = ($urandom % 4) < (phase ? 3 : 1);
      d = 16'($urandom);
      @(negedge clk);
      check(32'(count) == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      check(full == (q.size() == D) && empty == (q.size() == 0), "flags");
      if (full) n_full++;
      if (empty) n_empty++;
      push = p; pop = r; din = d;
      pend = r && q.size() > 0;
      if (pend) exp = q.pop_front();
      if (p && (q.size() + (pend ? 1 : 0)) < D + (pend ? 1 : 0) && !(full)) q.push_back(d);
      @(negedge clk);
      push = 0; pop = 0;
      if (pend) check(dout == exp, $sformatf("dout %04h expected %04h", dout, exp));
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
    // flush empties the FIFO; data pushed afterwards comes out first
    @(negedge clk); push = 1; din = 16'h1234;
    @(negedge clk); push = 0; flush = 1;
    @(negedge clk); flush = 0;
    check(empty && count == 0, "flush empties the FIFO");
    @(negedge clk); push = 1; din = 16'hBEEF;
    @(negedge clk); push = 0; pop = 1;
    @(negedge clk); pop = 0;
    check(dout == 16'hBEEF && empty, "first word after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
