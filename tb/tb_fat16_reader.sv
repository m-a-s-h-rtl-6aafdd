// Testbench for fat16_reader with a sector_buffer and a behavioural sector
// source standing in for the CompactFlash control logic (it copies the
// requested sector of the disk image into the buffer after a delay, or
// reports an error beyond the image). Checks, for files of several shapes
// (fragmented three-cluster WAV, odd-sized TXT, WAV in the second root
// directory sector), the stream contents word by word against the expected
// file bytes, the `last` marker, file size, type flags and cluster count,
// under random back-pressure; and each error: unsupported extension,
// directory, empty entry, bad cluster in the chain, entry index beyond the
// root directory, inactive partition, wrong partition type, sector size
// other than 512, a cluster beyond the end of the partition, and a card
// error.
module tb_fat16_reader;
  import mash_pkg::*;
  import fat_image_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic        start, busy, done, error, is_wav, is_txt;
  fat_err_e    err_code;
  logic [8:0]  entry_idx;
  logic [31:0] file_size_o;
  logic [15:0] first_cluster, cluster_count;
  logic        sec_req, sec_ready, sec_done, sec_err;
  logic [27:0] sec_lba;
  logic [7:0]  buf_raddr;
  logic [15:0] buf_rdata;
  logic        out_valid, out_ready, out_last;
  logic [15:0] out_data;
  logic        sb_we;
  logic [7:0]  sb_waddr;
  logic [15:0] sb_wdata;
  int          checks = 0, failures = 0, sectors_read = 0;
  int          force_card_err = 0;

  fat16_reader dut (
    .clk, .rst_n, .start, .entry_idx, .busy, .done, .error, .err_code,
    .is_wav, .is_txt, .file_size (file_size_o), .first_cluster, .cluster_count,
    .sec_req, .sec_lba, .sec_ready, .sec_done, .sec_err,
    .buf_raddr, .buf_rdata, .out_valid, .out_ready, .out_data, .out_last
  );

  sector_buffer sbuf (
    .clk, .we (sb_we), .waddr (sb_waddr), .wdata (sb_wdata),
    .raddr (buf_raddr), .rdata (buf_rdata)
  );

  // behavioural sector source
  initial begin
    sec_ready = 1'b0; sec_done = 1'b0; sec_err = 1'b0;
    sb_we = 1'b0; sb_waddr = '0; sb_wdata = '0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      sec_ready <= 1'b1;
      if (sec_req) begin
        int unsigned l;
        l = 32'(sec_lba);
        sec_ready <= 1'b0;
        sectors_read++;
        repeat (5) @(posedge clk);
        if (l < NSECT && !force_card_err) begin
          for (int i = 0; i < 256; i++) begin
            sb_we <= 1'b1; sb_waddr <= 8'(i);
            sb_wdata <= {img[l * 512 + 2 * i + 1], img[l * 512 + 2 * i]};
            @(posedge clk);
          end
          sb_we <= 1'b0;
        end
        sec_done <= 1'b1; sec_err <= !(l < NSECT && !force_card_err);
        @(posedge clk);
        sec_done <= 1'b0;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int nwords, bad, lasts;
  always @(posedge clk) out_ready <= ($urandom % 4) != 0;

  task automatic run(input int unsigned idx);
    nwords = 0; bad = 0; lasts = 0;
    @(posedge clk);
    start <= 1'b1; entry_idx <= 9'(idx);
    @(posedge clk);
    start <= 1'b0;
    while (!done) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        logic [15:0] exp;
        exp[7:0]  = file_byte(idx, 2 * nwords);
        exp[15:8] = (2 * nwords + 1 < file_size(idx)) ? file_byte(idx, 2 * nwords + 1) : out_data[15:8];
        if (out_data !== exp) bad++;
        if (out_last) lasts++;
        nwords++;
      end
    end
  endtask

  task automatic good_file(input int unsigned idx, input bit wav, input int unsigned nclus);
    run(idx);
    check(!error, $sformatf("entry %0d: unexpected error %s", idx, err_code.name()));
    check(nwords == (file_size(idx) + 1) / 2, $sformatf("entry %0d: %0d words", idx, nwords));
    check(bad == 0, $sformatf("entry %0d: %0d wrong words", idx, bad));
    check(lasts == 1, $sformatf("entry %0d: %0d last markers", idx, lasts));
    check(file_size_o == file_size(idx), $sformatf("entry %0d: size %0d", idx, file_size_o));
    check(is_wav == wav && is_txt == !wav, $sformatf("entry %0d: type flags", idx));
    check(cluster_count == 16'(nclus), $sformatf("entry %0d: %0d clusters", idx, cluster_count));
  endtask

  task automatic bad_file(input int unsigned idx, input fat_err_e code);
    run(idx);
    check(error && err_code == code,
          $sformatf("entry %0d: error %0b %s, expected %s", idx, error, err_code.name(), code.name()));
    check(nwords == 0 || code == FE_CHAIN, $sformatf("entry %0d: streamed %0d words", idx, nwords));
  endtask

  initial begin
    start = 1'b0; entry_idx = '0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    good_file(0, 1, 3);
    good_file(1, 0, 1);
    good_file(17, 1, 1);
    bad_file(2, FE_NOFILE);
    bad_file(3, FE_FORMAT);
    bad_file(4, FE_CHAIN);
    bad_file(5, FE_NOFILE);
    bad_file(6, FE_CARD);
    bad_file(8, FE_RANGE);
    bad_file(40, FE_ENTRY);
    img[12'h1BE] = 8'h00;  bad_file(0, FE_INACTIVE);  img[12'h1BE] = 8'h80;
    img[12'h1C2] = 8'h0B;  bad_file(0, FE_TYPE);      img[12'h1C2] = 8'h06;
    img[PART_START * 512 + 12] = 8'h04; bad_file(0, FE_SECSIZE); img[PART_START * 512 + 12] = 8'h02;
    force_card_err = 1; bad_file(0, FE_CARD); force_card_err = 0;
    good_file(0, 1, 3);
    $display("sectors read: %0d", sectors_read);
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
