// Testbench for cf_bus_cycle: single Memory Mode cycles against the card
// model. Checks attribute reads of the CIS, task-file writes read back as
// bytes, a READ SECTORS command followed by status polling and word reads of
// the data register (including cycles stretched by -WAIT), that the card
// model saw no timing violation, and that every cycle lasts at least the
// 300 ns cycle time (15 clocks at 50 MHz).
module tb_cf_bus_cycle;
  import mash_pkg::*;
  import fat_image_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic        start, busy, done;
  cf_req_t     req;
  logic [15:0] rdata;
  logic [10:0] cf_a;
  logic        ce1_n, ce2_n, oe_n, we_n, reg_n, d_oe, wait_n, ready, cd1_n, cd2_n;
  logic [15:0] d_o, d_i;
  int          violations, waits, commands, data_words, attr_reads;
  int          checks = 0, failures = 0;
  logic        reset = 1'b0;

  cf_bus_cycle dut (
    .clk, .rst_n, .start, .req, .busy, .done, .rdata,
    .cf_a, .cf_ce1_n (ce1_n), .cf_ce2_n (ce2_n), .cf_oe_n (oe_n), .cf_we_n (we_n),
    .cf_reg_n (reg_n), .cf_d_o (d_o), .cf_d_oe (d_oe), .cf_d_i (d_i), .cf_wait_n (wait_n)
  );

  cf_card_model #(.BUSY_NS(600), .READY_NS(200), .WAIT_EVERY(5), .WAIT_NS(400)) card (
    .a (cf_a), .ce1_n, .ce2_n, .oe_n, .we_n, .reg_n, .reset, .d_host (d_o), .d_host_oe (d_oe),
    .d_card (d_i), .wait_n, .ready, .cd1_n, .cd2_n,
    .violations, .waits, .commands, .data_words, .attr_reads
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int cycles;
  task automatic cycle(input logic wr, input logic attr, input logic word,
                       input logic [10:0] addr, input logic [15:0] wd, output logic [15:0] rd);
    req   <= '{write: wr, attr: attr, word: word, addr: addr, wdata: wd};
    start <= 1'b1;
    @(posedge clk);
    start  <= 1'b0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
    rd = rdata;
    check(cycles >= 15, $sformatf("cycle of %0d clocks shorter than 300 ns", cycles));
    @(posedge clk);
  endtask

  logic [15:0] v;
  int          max_cycles;

  initial begin
    start = 1'b0; req = '0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    reset = 1'b1; #100 reset = 1'b0;
    wait (ready);
    @(posedge clk);
    // attribute memory: CIS bytes at even addresses
    for (int i = 0; i < 6; i++) begin
      cycle(1'b0, 1'b1, 1'b0, 11'(2 * i), '0, v);
      check(v[7:0] == card.CIS_BYTE(i), $sformatf("CIS byte %0d = %02h", i, v[7:0]));
    end
    // task-file byte writes and read-back
    cycle(1'b1, 1'b0, 1'b0, ATA_LBA0, 16'h00A5, v);
    cycle(1'b1, 1'b0, 1'b0, ATA_LBA1, 16'h003C, v);
    cycle(1'b0, 1'b0, 1'b0, ATA_LBA0, '0, v);
    check(v[7:0] == 8'hA5, "LBA0 read back");
    cycle(1'b0, 1'b0, 1'b0, ATA_LBA1, '0, v);
    check(v[7:0] == 8'h3C, "LBA1 read back");
    // read sector PART_START (the boot record)
    cycle(1'b1, 1'b0, 1'b0, ATA_SECCNT, 16'd1, v);
    cycle(1'b1, 1'b0, 1'b0, ATA_LBA0, 16'(PART_START), v);
    cycle(1'b1, 1'b0, 1'b0, ATA_LBA1, 16'd0, v);
    cycle(1'b1, 1'b0, 1'b0, ATA_LBA2, 16'd0, v);
    cycle(1'b1, 1'b0, 1'b0, ATA_DEVHEAD, 16'h00E0, v);
    cycle(1'b1, 1'b0, 1'b0, ATA_CMDSTAT, 16'h0020, v);
    do cycle(1'b0, 1'b0, 1'b0, ATA_CMDSTAT, '0, v); while (!v[ST_DRQ]);
    check(!v[ST_BSY] && !v[ST_ERR], "status after command");
    max_cycles = 0;
    for (int i = 0; i < 20; i++) begin
      cycle(1'b0, 1'b0, 1'b1, ATA_DATA, '0, v);
      if (cycles > max_cycles) max_cycles = cycles;
      check(v == {img[PART_START * 512 + 2 * i + 1], img[PART_START * 512 + 2 * i]},
            $sformatf("data word %0d = %04h", i, v));
    end
    check(waits >= 3, "card stretched cycles with -WAIT");
    check(max_cycles >= 15 + 400 / 20 - 8, "wait-stretched cycle longer");
    check(violations == 0, $sformatf("%0d timing violations", violations));
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
