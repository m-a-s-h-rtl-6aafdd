// Testbench for sector_buffer: fills all 256 words with random data, reads
// them back in random order checking the one-clock read latency, and checks
// that a read of the word being written returns the old contents.
module tb_sector_buffer;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic        we;
  logic [7:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [256];
  int          checks = 0, failures = 0;

  sector_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) begin
      @(posedge clk);
      we <= 1'b1; waddr <= 8'(i); wdata <= 16'($urandom);
      #1 model[i] = wdata;
    end
    @(posedge clk); we <= 1'b0;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] a;
      a = 8'($urandom);
      @(posedge clk); raddr <= a;
      @(posedge clk); #1;
      check(rdata == model[a], $sformatf("word %0d = %04h, expected %04h", a, rdata, model[a]));
    end
    // read-during-write returns the old word
    @(posedge clk); we <= 1'b1; waddr <= 8'd7; wdata <= ~model[7]; raddr <= 8'd7;
    @(posedge clk); we <= 1'b0; #1;
    check(rdata == model[7], "read during write gives old word");
    @(posedge clk); #1;
    check(rdata == ~model[7], "new word after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
