// Testbench for audio_ctrl_regs: reset values, write and read back of every
// register and its output, the guards that keep CLKDIV and SIZE non-zero,
// that STATUS shows the underrun count and FIFO level, and that writes to
// the read-only STATUS register and to unused offsets change nothing.
module tb_audio_ctrl_regs;
  import mash_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic        reg_we, play, stereo, bits16;
  logic [2:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [15:0] clk_div, underruns;
  logic [21:0] buf_base, buf_size, rd_offset;
  logic [10:0] fifo_count;
  int          checks = 0, failures = 0;

  audio_ctrl_regs #(.AW(22), .CW(11)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 1'b0;
  endtask

  logic [31:0] v;
  task automatic rd(input logic [2:0] a);
    reg_addr = a; #1;
    v = reg_rdata;
  endtask

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; underruns = 16'h0123; fifo_count = 11'd700; rd_offset = 22'h2A5A5;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!play && clk_div == 18 && stereo && bits16 && buf_base == 0 && buf_size == 4096, "reset values");
    wr(AREG_CLKDIV, 32'd17);      rd(AREG_CLKDIV); check(clk_div == 17 && v == 17, "CLKDIV");
    wr(AREG_CLKDIV, 32'd0);       check(clk_div == 1, "CLKDIV zero guard");
    wr(AREG_FORMAT, 32'd1);       rd(AREG_FORMAT); check(stereo && !bits16 && v == 1, "FORMAT 8-bit stereo");
    wr(AREG_FORMAT, 32'd2);       rd(AREG_FORMAT); check(!stereo && bits16 && v == 2, "FORMAT 16-bit mono");
    wr(AREG_BASE, 32'h12345);     rd(AREG_BASE); check(buf_base == 22'h12345 && v == 32'h12345, "BASE");
    wr(AREG_SIZE, 32'h800);       rd(AREG_SIZE); check(buf_size == 22'h800 && v == 32'h800, "SIZE");
    wr(AREG_SIZE, 32'h0);         check(buf_size == 22'h1, "SIZE zero guard");
    check(buf_base == 22'h12345, "BASE kept");
    wr(AREG_CTRL, 32'h1);         rd(AREG_CTRL); check(play && v == 1, "play on");
    rd(AREG_STATUS); check(v == {16'h0123, 16'd700}, "STATUS");
    rd(AREG_RDPTR); check(v == 32'h2A5A5, "RDPTR");
    wr(AREG_STATUS, 32'hFFFF_FFFF); wr(3'd7, 32'hFFFF_FFFF);
    check(play && clk_div == 1 && !stereo && bits16 && buf_base == 22'h12345 && buf_size == 1,
          "read-only and unused offsets ignored");
    wr(AREG_CTRL, 32'h0);         check(!play, "play off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
