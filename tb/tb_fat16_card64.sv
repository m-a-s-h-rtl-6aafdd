// Workload test of the FAT16 walk on a full-size 64 MB card.
//
// The card holds 131072 sectors of 512 bytes. Its first partition starts
// at LBA 32 and fills the rest of the card, formatted as a typical 64 MB
// FAT16 volume:
//   4 sectors per cluster, 1 reserved sector, 2 FATs of 128 sectors,
//   512 root directory entries (32 sectors),
// which gives the FATs at 33 and 161, the root directory at 289, the data
// area (cluster 2) at 321, and clusters 2..32688, the last one ending at
// sector 131068. The disk is sparse: only the MBR, boot record, FAT and
// directory sectors are stored, and any other sector holds a pattern,
// byte k of sector s = (s * 7 + k * 3 + k / 256) mod 256.
//
// The files exercise what the small test image cannot reach:
//   entry 0   SONG.WAV, 13 fragmented clusters whose FAT entries lie in FAT
//             sectors 0, 1, 2, 15, 48, 78 and 127; the chain includes the
//             last cluster of the volume; the last cluster is part-used;
//   entry 300 LYRICS.TXT in root directory sector 18;
//   entry 511 END.WAV, the very last root entry (sector 31), one byte into
//             its second cluster.
// fat16_reader and sector_buffer run with a behavioural sector source (five
// clocks of latency, then one word per clock). For each file the testbench
// checks every streamed word against the pattern, the size, the type flags
// and the cluster count. It also checks the number of sector reads: MBR,
// boot record and directory sector, one per data sector, and one FAT sector
// per cluster change.
module tb_fat16_card64;
  import mash_pkg::*;

  localparam int unsigned CARD_SECT  = 131072;
  localparam int unsigned PART       = 32;
  localparam int unsigned SPC        = 4;
  localparam int unsigned RSVD       = 1;
  localparam int unsigned SPF        = 128;
  localparam int unsigned ROOT_ENT   = 512;
  localparam int unsigned FAT0       = PART + RSVD;                 // 33
  localparam int unsigned ROOT       = FAT0 + 2 * SPF;              // 289
  localparam int unsigned DATA       = ROOT + ROOT_ENT * 32 / 512;  // 321
  localparam int unsigned LAST_CLUS  = 2 + (CARD_SECT - DATA) / SPC - 1;

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

  // ---------------------------------------------------------------- sparse disk
  logic [7:0] meta [int unsigned];     // byte address -> byte, metadata only

  function automatic logic [7:0] pattern(int unsigned s, int unsigned k);
    return 8'((s * 7 + k * 3 + k / 256) % 256);
  endfunction

  function automatic logic [7:0] disk_byte(int unsigned s, int unsigned k);
    int unsigned a;
    a = s * 512 + k;
    if (meta.exists(a)) return meta[a];
    if (s >= DATA)      return pattern(s, k);
    return 8'h00;
  endfunction

  function automatic void put8(int unsigned a, int unsigned v);
    meta[a] = 8'(v);
  endfunction
  function automatic void put16(int unsigned a, int unsigned v);
    put8(a, v); put8(a + 1, v >> 8);
  endfunction
  function automatic void put32(int unsigned a, int unsigned v);
    put16(a, v & 16'hFFFF); put16(a + 2, v >> 16);
  endfunction

  function automatic void fat_set(int unsigned c, int unsigned v);
    put16(FAT0 * 512 + 2 * c, v);
    put16((FAT0 + SPF) * 512 + 2 * c, v);
  endfunction

  function automatic void dir_entry(int unsigned idx, string name, string ext,
                                    int unsigned clus, int unsigned size);
    int unsigned a;
    a = ROOT * 512 + idx * 32;
    for (int i = 0; i < 8; i++) put8(a + i, (i < name.len()) ? name[i] : 8'h20);
    for (int i = 0; i < 3; i++) put8(a + 8 + i, ext[i]);
    put8(a + 11, 8'h20);
    put16(a + 26, clus);
    put32(a + 28, size);
  endfunction

  // the files: cluster lists and sizes
  int unsigned song_chain [13] = '{2, 3, 255, 256, 511, 512, 4000, 4001, 12345,
                                   20000, LAST_CLUS, 300, 7};
  int unsigned lyr_chain  [1]  = '{1000};
  int unsigned end_chain  [2]  = '{30000, 30001};
  localparam int unsigned SONG_SIZE = 12 * SPC * 512 + 1000;
  localparam int unsigned LYR_SIZE  = 333;
  localparam int unsigned END_SIZE  = SPC * 512 + 1;

  function automatic void chain_fat(int unsigned ch [], int unsigned end_code);
    for (int i = 0; i < ch.size(); i++)
      fat_set(ch[i], (i + 1 < ch.size()) ? ch[i + 1] : end_code);
  endfunction

  function automatic void build();
    // MBR
    put8(16'h1BE, 8'h80); put8(16'h1C2, 8'h06);
    put32(16'h1C6, PART); put32(16'h1CA, CARD_SECT - PART);
    put8(16'h1FE, 8'h55); put8(16'h1FF, 8'hAA);
    // boot record
    put16(PART * 512 + 16'h0B, 512);
    put8 (PART * 512 + 16'h0D, SPC);
    put16(PART * 512 + 16'h0E, RSVD);
    put8 (PART * 512 + 16'h10, 2);
    put16(PART * 512 + 16'h11, ROOT_ENT);
    put8 (PART * 512 + 16'h15, 8'hF8);
    put16(PART * 512 + 16'h16, SPF);
    put32(PART * 512 + 16'h20, CARD_SECT - PART);
    put8 (PART * 512 + 16'h1FE, 8'h55); put8(PART * 512 + 16'h1FF, 8'hAA);
    // FAT
    fat_set(0, 16'hFFF8); fat_set(1, 16'hFFFF);
    chain_fat(song_chain, 16'hFFFF);
    chain_fat(lyr_chain, 16'hFFF8);
    chain_fat(end_chain, 16'hFFFF);
    // root directory
    dir_entry(0,   "SONG",   "WAV", song_chain[0], SONG_SIZE);
    dir_entry(300, "LYRICS", "TXT", lyr_chain[0],  LYR_SIZE);
    dir_entry(511, "END",    "WAV", end_chain[0],  END_SIZE);
  endfunction

  // byte k of a file, from its cluster list
  function automatic logic [7:0] file_byte(int unsigned ch [], int unsigned k);
    int unsigned c, s;
    c = ch[k / (SPC * 512)];
    s = DATA + (c - 2) * SPC + (k % (SPC * 512)) / 512;
    return pattern(s, k % 512);
  endfunction

  // ---------------------------------------------------------------- sector source
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
        for (int i = 0; i < 256; i++) begin
          sb_we <= 1'b1; sb_waddr <= 8'(i);
          sb_wdata <= {disk_byte(l, 2 * i + 1), disk_byte(l, 2 * i)};
          @(posedge clk);
        end
        sb_we <= 1'b0;
        sec_done <= 1'b1; sec_err <= (l >= CARD_SECT);
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

  always @(posedge clk) out_ready <= ($urandom % 4) != 0;

  task automatic play(input int unsigned idx, input int unsigned ch [], input int unsigned size,
                      input bit wav);
    int nwords, bad, lasts, sec0, exp_sect;
    nwords = 0; bad = 0; lasts = 0; sec0 = sectors_read;
    @(posedge clk);
    start <= 1'b1; entry_idx <= 9'(idx);
    @(posedge clk);
    start <= 1'b0;
    while (!done) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        logic [15:0] exp;
        exp[7:0]  = file_byte(ch, 2 * nwords);
        exp[15:8] = (2 * nwords + 1 < size) ? file_byte(ch, 2 * nwords + 1) : out_data[15:8];
        if (out_data !== exp) bad++;
        if (out_last) lasts++;
        nwords++;
      end
    end
    exp_sect = 3 + (size + 511) / 512 + (ch.size() - 1);
    check(!error, $sformatf("entry %0d: unexpected error %s", idx, err_code.name()));
    check(nwords == (size + 1) / 2, $sformatf("entry %0d: %0d words", idx, nwords));
    check(bad == 0, $sformatf("entry %0d: %0d wrong words", idx, bad));
    check(lasts == 1, $sformatf("entry %0d: %0d last markers", idx, lasts));
    check(file_size_o == size, $sformatf("entry %0d: size %0d", idx, file_size_o));
    check(is_wav == wav && is_txt == !wav, $sformatf("entry %0d: type flags", idx));
    check(first_cluster == 16'(ch[0]), $sformatf("entry %0d: first cluster %0d", idx, first_cluster));
    check(cluster_count == 16'(ch.size()), $sformatf("entry %0d: %0d clusters", idx, cluster_count));
    check(sectors_read - sec0 == exp_sect,
          $sformatf("entry %0d: %0d sector reads, expected %0d", idx, sectors_read - sec0, exp_sect));
    $display("entry %0d: %0d bytes in %0d clusters, %0d sector reads", idx, size, ch.size(),
             sectors_read - sec0);
  endtask

  initial begin
    start = 1'b0; entry_idx = '0;
    build();
    check(LAST_CLUS == 32688, $sformatf("volume geometry: last cluster %0d", LAST_CLUS));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    play(0,   song_chain, SONG_SIZE, 1'b1);
    play(300, lyr_chain,  LYR_SIZE,  1'b0);
    play(511, end_chain,  END_SIZE,  1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
