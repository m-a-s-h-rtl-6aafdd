// Testbench for circ_buffer_reader feeding an audio_fifo from a memory model
// with random latency while a consumer drains the FIFO. Checks that the
// words come out in circular-buffer order (base .. base+size-1, then wrap),
// that the burst claim `aud_hold` rises only at or below the low-water mark
// and falls when the FIFO is full, that the reader never overfills the
// FIFO, that the address stays stable while a read waits, and that turning
// play off and on restarts at the base address.
module tb_circ_buffer_reader;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  localparam int AW = 12, D = 16, LOW = 8;
  logic          play, aud_hold, aud_req, aud_ack, push, pop, full, empty;
  logic [AW-1:0] base, size, aud_addr, rd_offset;
  logic [15:0]   aud_rdata, din, dout;
  logic [4:0]    count;
  int            checks = 0, failures = 0, got = 0, wraps = 0, claims = 0, releases_full = 0;
  int            expect_off;

  circ_buffer_reader #(.AW(AW), .DW(16), .FIFO_DEPTH(D), .LOW_MARK(LOW)) dut (
    .clk, .rst_n, .play, .buf_base (base), .buf_size (size),
    .aud_hold, .aud_req, .aud_addr, .aud_ack, .aud_rdata,
    .fifo_count (count), .fifo_push (push), .fifo_din (din), .rd_offset
  );
  audio_fifo #(.DEPTH(D)) fifo (.clk, .rst_n, .flush (1'b0), .push, .din, .pop, .dout, .full, .empty, .count);

  function automatic logic [15:0] word_at(logic [AW-1:0] a);
    return 16'(a) * 16'd7 + 16'd3;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model
  initial begin
    aud_ack = 1'b0; aud_rdata = '0;
    forever begin
      @(posedge clk);
      aud_ack <= 1'b0;
      if (aud_req && !aud_ack) begin
        repeat ($urandom % 4) @(posedge clk);
        aud_rdata <= word_at(aud_addr);
        aud_ack   <= 1'b1;
      end
    end
  end

  // consumer: pops now and then, checks order
  logic popped, draining = 1'b0;
  always @(posedge clk) begin
    popped <= pop && !empty;
    if (popped && !draining) begin
      check(dout == word_at(base + AW'(expect_off)), $sformatf("word %0d: %04h", got, dout));
      if (expect_off == 32'(size) - 1) begin expect_off = 0; wraps++; end
      else expect_off++;
      got++;
    end
  end
  always @(posedge clk) pop <= draining || (play && ($urandom % 8 == 0));

  logic hold_q, req_q;
  logic [AW-1:0] addr_q;
  always @(posedge clk) if (rst_n) begin
    hold_q <= aud_hold; req_q <= aud_req && !aud_ack; addr_q <= aud_addr;
    if (aud_hold && !hold_q) begin
      claims++;
      if (!(32'(count) <= LOW + 1)) begin failures++; $display("FAIL: claim above low mark (%0d)", count); end
    end
    if (!aud_hold && hold_q && play) releases_full++;
    if (req_q && aud_addr != addr_q) begin failures++; $display("FAIL: address moved while waiting"); end
    if (rd_offset >= size) begin failures++; $display("FAIL: read offset out of range"); end
    if (push && full) begin failures++; $display("FAIL: push into full FIFO"); end
  end

  initial begin
    play = 1'b0; base = 12'd100; size = 12'd37; expect_off = 0; popped = 0; pop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    play = 1'b1;
    wait (got >= 120);
    // stop: let the FIFO drain, restart at the base
    @(posedge clk); play = 1'b0;
    repeat (10) @(posedge clk);
    draining = 1'b1;
    while (!empty || aud_req) @(posedge clk);
    repeat (3) @(posedge clk);
    draining = 1'b0;
    expect_off = 0;
    play = 1'b1;
    wait (got >= 200);
    check(wraps >= 3, $sformatf("%0d wraps", wraps));
    check(claims >= 3, $sformatf("%0d burst claims", claims));
    check(releases_full >= 2, $sformatf("%0d releases on full", releases_full));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
