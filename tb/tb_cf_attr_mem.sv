// Testbench for cf_attr_mem: writes a CIS image byte by byte as the control
// logic does, checks that `loaded` rises only with the last byte, reads all
// bytes back with one clock of latency, and checks that reset clears
// `loaded`.
module tb_cf_attr_mem;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  localparam int D = 32;
  logic       we, loaded;
  logic [4:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [D];
  int         checks = 0, failures = 0;

  cf_attr_mem #(.DEPTH(D)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .loaded);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D; i++) begin
      model[i] = 8'($urandom);
      @(posedge clk);
      #1 check(!loaded, $sformatf("loaded early before byte %0d", i));
      we <= 1'b1; waddr <= 5'(i); wdata <= model[i];
    end
    @(posedge clk); we <= 1'b0;
    #1 check(loaded, "loaded after the last byte");
    for (int i = D - 1; i >= 0; i--) begin
      @(posedge clk); raddr <= 5'(i);
      @(posedge clk); #1;
      check(rdata == model[i], $sformatf("byte %0d = %02h", i, rdata));
    end
    rst_n = 1'b0; #1;
    check(!loaded, "reset clears loaded");
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
