// Testbench for mem_arbiter with a memory model of random latency, a CPU
// that makes random reads and writes and a DAC path that claims memory in
// bursts. Checks: read data matches a reference copy of memory for both
// requesters; once the DAC path claims memory the CPU gets at most the one
// access already in flight before the DAC path is served; the CPU is never
// served while the DAC path owns memory; every state (CO, AW, AO, CW) is
// visited; no request is lost.
module tb_mem_arbiter;
  import mash_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  localparam int AW = 8;
  logic          cpu_req, cpu_we, cpu_ack, aud_hold, aud_req, aud_ack;
  logic          mem_req, mem_we, mem_ack;
  logic [AW-1:0] cpu_addr, aud_addr, mem_addr;
  logic [15:0]   cpu_wdata, cpu_rdata, aud_rdata, mem_wdata, mem_rdata;
  arb_state_e    state;
  logic [15:0]   mem [256];
  logic [15:0]   ref_mem [256];
  int            checks = 0, failures = 0;
  int            visits [4];
  int            cpu_done = 0, aud_done = 0, cpu_after_claim;

  mem_arbiter #(.AW(AW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory with 1..4 cycles latency
  initial begin
    mem_ack = 1'b0; mem_rdata = '0;
    foreach (mem[i]) begin mem[i] = 16'(i * 3 + 1); ref_mem[i] = mem[i]; end
    forever begin
      @(posedge clk);
      mem_ack <= 1'b0;
      if (mem_req && !mem_ack) begin
        repeat ($urandom % 4) @(posedge clk);
        if (mem_we) mem[mem_addr] = mem_wdata;
        mem_rdata <= mem[mem_addr];
        mem_ack   <= 1'b1;
      end
    end
  end

  // CPU: random accesses, each checked against the reference copy
  initial begin
    cpu_req = 1'b0; cpu_we = 1'b0; cpu_addr = '0; cpu_wdata = '0;
    wait (rst_n);
    repeat (400) begin
      logic [AW-1:0] a; logic w; logic [15:0] d;
      a = AW'($urandom); w = $urandom % 2; d = 16'($urandom);
      @(posedge clk);
      cpu_req <= 1'b1; cpu_we <= w; cpu_addr <= a; cpu_wdata <= d;
      do @(posedge clk); while (!cpu_ack);
      cpu_req <= 1'b0;
      if (w) ref_mem[a] = d;
      else check(cpu_rdata == ref_mem[a], $sformatf("CPU read %0d", a));
      cpu_done++;
      repeat ($urandom % 3) @(posedge clk);
    end
  end

  // DAC path: bursts of reads of addresses 200..255 (the CPU may write there
  // too, so its data is checked against the reference copy)
  initial begin
    aud_hold = 1'b0; aud_req = 1'b0; aud_addr = '0;
    wait (rst_n);
    repeat (40) begin
      repeat (5 + $urandom % 30) @(posedge clk);
      aud_hold <= 1'b1;
      cpu_after_claim = 0;
      repeat (1 + $urandom % 8) begin
        @(posedge clk);
        aud_req <= 1'b1; aud_addr <= AW'(200 + $urandom % 56);
        do @(posedge clk); while (!aud_ack);
        aud_req <= 1'b0;
        check(aud_rdata == ref_mem[aud_addr], $sformatf("audio read %0d", aud_addr));
        check(cpu_after_claim <= 1, $sformatf("%0d CPU accesses after audio claimed", cpu_after_claim));
        aud_done++;
      end
      @(posedge clk);
      aud_hold <= 1'b0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    visits[state]++;
    if (cpu_ack) cpu_after_claim++;
    if ((state == ARB_AO || state == ARB_CW) && cpu_ack) begin
      failures++; $display("FAIL: CPU served while audio owns memory");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (cpu_done == 400 && aud_done > 0);
    repeat (50) @(posedge clk);
    for (int s = 0; s < 4; s++)
      check(visits[s] > 0, $sformatf("state %s visited %0d times", arb_state_e'(s), visits[s]));
    $display("visits CO=%0d AW=%0d AO=%0d CW=%0d audio reads=%0d", visits[0], visits[1], visits[2], visits[3], aud_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
