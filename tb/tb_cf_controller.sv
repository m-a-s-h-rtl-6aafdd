// Testbench for cf_controller against the card model: checks the start-up
// sequence (card detect, RESET pulse, READY, CIS copy into the attribute
// port), sector reads of several LBAs compared word by word with the disk
// image, a read beyond the image ending in rd_err, that -WAIT stretching
// happened, and that the card model saw no timing violation.
module tb_cf_controller;
  import mash_pkg::*;
  import fat_image_pkg::*;

  localparam int unsigned CIS = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic        rd_req, rd_ready, rd_done, rd_err, init_done;
  logic [27:0] rd_lba;
  logic        buf_we, attr_we;
  logic [7:0]  buf_waddr;
  logic [15:0] buf_wdata;
  logic [3:0]  attr_waddr;
  logic [7:0]  attr_wdata;
  logic [10:0] cf_a;
  logic        ce1_n, ce2_n, oe_n, we_n, reg_n, reset, d_oe, wait_n, ready, cd1_n, cd2_n;
  logic [15:0] d_o, d_i;
  int          violations, waits, commands, data_words, attr_reads;
  int          checks = 0, failures = 0;
  logic [15:0] got [256];
  logic [7:0]  cis [CIS];
  int          nwords, ncis, reset_cycles;

  cf_controller #(.CIS_BYTES(CIS), .RESET_CYCLES(20)) dut (
    .clk, .rst_n, .rd_req, .rd_lba, .rd_ready, .rd_done, .rd_err, .init_done,
    .buf_we, .buf_waddr, .buf_wdata, .attr_we, .attr_waddr, .attr_wdata,
    .cf_a, .cf_ce1_n (ce1_n), .cf_ce2_n (ce2_n), .cf_oe_n (oe_n), .cf_we_n (we_n),
    .cf_reg_n (reg_n), .cf_reset (reset), .cf_d_o (d_o), .cf_d_oe (d_oe), .cf_d_i (d_i),
    .cf_wait_n (wait_n), .cf_ready (ready), .cf_cd1_n (cd1_n), .cf_cd2_n (cd2_n)
  );

  cf_card_model #(.BUSY_NS(800), .READY_NS(1000), .WAIT_EVERY(50), .WAIT_NS(300)) card (
    .a (cf_a), .ce1_n, .ce2_n, .oe_n, .we_n, .reg_n, .reset, .d_host (d_o), .d_host_oe (d_oe),
    .d_card (d_i), .wait_n, .ready, .cd1_n, .cd2_n,
    .violations, .waits, .commands, .data_words, .attr_reads
  );

  always @(posedge clk) begin
    if (!rst_n) ;
    else if (buf_we)  begin got[buf_waddr] <= buf_wdata; nwords <= nwords + 1; end
    if (rst_n && attr_we) begin cis[attr_waddr] <= attr_wdata; ncis <= ncis + 1; end
    if (rst_n && reset) reset_cycles <= reset_cycles + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic read_sector(input int unsigned lba, input bit expect_err);
    int bad;
    wait (rd_ready);
    @(posedge clk);
    nwords = 0;
    rd_req <= 1'b1; rd_lba <= 28'(lba);
    @(posedge clk);
    rd_req <= 1'b0;
    while (!rd_done) @(posedge clk);
    @(posedge clk);  // last buffer write lands with rd_done
    check(rd_err == expect_err, $sformatf("LBA %0d error flag %0b", lba, rd_err));
    if (!expect_err) begin
      bad = 0;
      for (int i = 0; i < 256; i++)
        if (got[i] !== {img[lba * 512 + 2 * i + 1], img[lba * 512 + 2 * i]}) bad++;
      check(bad == 0, $sformatf("LBA %0d: %0d words wrong", lba, bad));
      check(nwords == 256, $sformatf("LBA %0d: %0d buffer writes", lba, nwords));
    end
    @(posedge clk);
  endtask

  initial begin
    rd_req = 1'b0; rd_lba = '0; nwords = 0; ncis = 0; reset_cycles = 0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    repeat (2) @(posedge clk);
    check(reset_cycles == 20, $sformatf("RESET pulse of %0d clocks", reset_cycles));
    check(ncis == CIS, $sformatf("%0d CIS bytes copied", ncis));
    for (int i = 0; i < CIS; i++)
      check(cis[i] == card.CIS_BYTE(i), $sformatf("CIS byte %0d", i));
    read_sector(0, 0);
    read_sector(PART_START, 0);
    read_sector(DATA_START + 3, 0);
    read_sector(NSECT + 5, 1);
    read_sector(DATA_START, 0);
    check(commands == 5, $sformatf("%0d READ SECTORS commands", commands));
    check(waits > 0, "cycles stretched by -WAIT");
    check(violations == 0, $sformatf("%0d timing violations", violations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
