// End-to-end testbench of mash_top at its default parameters.
//
// Around the design it puts the CompactFlash card model holding the test
// FAT16 image, an external memory with random latency, an I2S receiver for
// the DAC, and a task that does what the audio player software does: read a
// file through the FAT16 stream, parse the WAV header, program the audio
// registers, copy the samples into the circular buffer through the CPU
// memory port (never overwriting words the DAC path has not read yet, known
// from the RDPTR register), set play once the buffer has been filled all
// the way round, and stop when the song has been heard.
//
// It plays SONG.WAV (16-bit stereo, 3 clusters, longer than the circular
// buffer, with the DAC sped up about nine times) and then SONG2.WAV (8-bit
// mono, a format change, at its real 22050 Hz rate: CLKDIV 35 gives
// 22321 Hz from 50 MHz), checks every
// received sample against the file bytes, reads the lyrics text file and
// checks it, and checks the error paths (bad cluster, card error, cluster
// beyond the partition). It counts
// each mechanism of the design and fails if one never happened: -WAIT
// stretching, CIS copy, FAT cluster lookup, each memory controller state
// (CO, AW, AO, CW), CPU held off by the DAC path, circular buffer wrap,
// burst claim at the low-water mark and release on FIFO full, DAC underrun,
// and the format switch.
module tb_mash_top;
  import mash_pkg::*;
  import fat_image_pkg::*;

  localparam int unsigned S = 1300;        // circular buffer, words: more than the FIFO holds
  localparam int unsigned BASE = 22'h01000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  // card pins
  logic [10:0] cf_a;
  logic        ce1_n, ce2_n, oe_n, we_n, reg_n, cf_reset, d_oe, wait_n, ready, cd1_n, cd2_n;
  logic [15:0] d_o, d_i;
  int          violations, waits, commands, data_words, attr_reads;
  // design ports
  logic        cf_init_done, attr_loaded;
  logic [5:0]  attr_raddr;
  logic [7:0]  attr_rdata;
  logic        file_start, file_busy, file_done, file_error, file_is_wav, file_is_txt;
  logic [8:0]  file_entry;
  fat_err_e    file_err_code;
  logic [31:0] file_size_o;
  logic [15:0] file_clusters, file_data;
  logic        file_valid, file_ready, file_last;
  logic        cpu_req, cpu_we, cpu_ack;
  logic [21:0] cpu_addr;
  logic [15:0] cpu_wdata, cpu_rdata;
  logic        reg_we;
  logic [2:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic        mem_req, mem_we, mem_ack;
  logic [21:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  logic        bclk, lrclk, sdata;
  arb_state_e  arb_state;

  int checks = 0, failures = 0;

  mash_top dut (
    .clk, .rst_n,
    .cf_a, .cf_ce1_n (ce1_n), .cf_ce2_n (ce2_n), .cf_oe_n (oe_n), .cf_we_n (we_n),
    .cf_reg_n (reg_n), .cf_reset, .cf_d_o (d_o), .cf_d_oe (d_oe), .cf_d_i (d_i),
    .cf_wait_n (wait_n), .cf_ready (ready), .cf_cd1_n (cd1_n), .cf_cd2_n (cd2_n),
    .cf_init_done, .attr_raddr, .attr_rdata, .attr_loaded,
    .file_start, .file_entry, .file_busy, .file_done, .file_error, .file_err_code,
    .file_is_wav, .file_is_txt, .file_size (file_size_o), .file_clusters,
    .file_valid, .file_ready, .file_data, .file_last,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ack, .cpu_rdata,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .dac_bclk (bclk), .dac_lrclk (lrclk), .dac_sdata (sdata), .arb_state
  );

  cf_card_model #(.BUSY_NS(1000), .READY_NS(2000), .WAIT_EVERY(64), .WAIT_NS(400)) card (
    .a (cf_a), .ce1_n, .ce2_n, .oe_n, .we_n, .reg_n, .reset (cf_reset), .d_host (d_o),
    .d_host_oe (d_oe), .d_card (d_i), .wait_n, .ready, .cd1_n, .cd2_n,
    .violations, .waits, .commands, .data_words, .attr_reads
  );

  i2s_dac_model dac (.bclk, .lrclk, .sdata);

  // ---------------------------------------------------------------- memory
  logic [15:0] sdram [int unsigned];
  initial begin
    mem_ack = 1'b0; mem_rdata = '0;
    forever begin
      @(posedge clk);
      mem_ack <= 1'b0;
      if (mem_req && !mem_ack) begin
        repeat (1 + $urandom % 3) @(posedge clk);
        if (mem_we) sdram[32'(mem_addr)] = mem_wdata;
        mem_rdata <= sdram.exists(32'(mem_addr)) ? sdram[32'(mem_addr)] : 16'h0000;
        mem_ack   <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int visits [4];
  int cpu_held = 0, claims = 0, full_releases = 0, wraps = 0;
  logic hold_q = 1'b0;
  logic [21:0] rdptr_q = '0;
  always @(posedge clk) if (rst_n) begin
    visits[arb_state]++;
    if (arb_state == ARB_CW && cpu_req) cpu_held++;
    hold_q <= dut.aud_hold;
    if (dut.aud_hold && !hold_q) claims++;
    if (!dut.aud_hold && hold_q && dut.play && dut.ff_count == 11'(1024)) full_releases++;
    rdptr_q <= dut.rd_offset;
    if (dut.play && dut.rd_offset < rdptr_q) wraps++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- CPU side
  // All CPU-side signals change just after a rising edge and are sampled
  // at the falling edge, so the design sees them stable at the next rising
  // edge.
  task automatic reg_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(posedge clk); #1 reg_we = 1'b0;
  endtask

  task automatic reg_read(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a;
    @(negedge clk); d = reg_rdata;
  endtask

  task automatic mem_write(input int unsigned a, input logic [15:0] d);
    @(negedge clk); cpu_req = 1'b1; cpu_we = 1'b1; cpu_addr = 22'(a); cpu_wdata = d;
    while (!cpu_ack) @(negedge clk);
    @(posedge clk); #1 cpu_req = 1'b0; cpu_we = 1'b0;
  endtask

  task automatic mem_read(input int unsigned a, output logic [15:0] d);
    @(negedge clk); cpu_req = 1'b1; cpu_we = 1'b0; cpu_addr = 22'(a);
    while (!cpu_ack) @(negedge clk);
    d = cpu_rdata;
    @(posedge clk); #1 cpu_req = 1'b0;
  endtask

  // take one word from the file stream
  task automatic get_word(output logic [15:0] w, output logic last);
    @(negedge clk); file_ready = 1'b1;
    while (!file_valid) @(negedge clk);
    w = file_data; last = file_last;
    @(posedge clk); #1 file_ready = 1'b0;
  endtask

  task automatic open_file(input int unsigned idx);
    @(negedge clk); file_start = 1'b1; file_entry = 9'(idx);
    @(posedge clk); #1 file_start = 1'b0;
  endtask

  int files_done = 0;
  always @(posedge clk) if (file_done) files_done++;

  task automatic wait_file_done();
    @(negedge clk);
    while (file_busy) @(negedge clk);
  endtask

  int formats_played = 0;

  task automatic play_song(input int unsigned idx, input bit real_rate);
    logic [7:0]  hdr [44];
    logic [15:0] w;
    logic        last, playing;
    int unsigned ch, rate, bits, dlen, nwords, i, rd_total, last_ptr, nexp, nrx, bad, guard, div;
    logic [31:0] v;
    logic [15:0] el [$];
    logic [15:0] er [$];
    logic [15:0] rl [$];
    logic [15:0] rr [$];

    open_file(idx);
    for (int k = 0; k < 22; k++) begin
      get_word(w, last);
      hdr[2 * k] = w[7:0]; hdr[2 * k + 1] = w[15:8];
    end
    check(file_is_wav, $sformatf("entry %0d recognised as WAV", idx));
    // parse the header as the audio player does
    check({hdr[0], hdr[1], hdr[2], hdr[3]} == "RIFF" && {hdr[8], hdr[9], hdr[10], hdr[11]} == "WAVE",
          "RIFF/WAVE tags");
    ch   = {hdr[23], hdr[22]};
    rate = {hdr[27], hdr[26], hdr[25], hdr[24]};
    bits = {hdr[35], hdr[34]};
    dlen = {hdr[43], hdr[42], hdr[41], hdr[40]};
    nwords = (dlen + 1) / 2;
    $display("entry %0d: %0d channels, %0d Hz, %0d bits, %0d data bytes", idx, ch, rate, bits, dlen);
    // at the real rate the divider is the nearest to 50 MHz / (64 * rate);
    // otherwise the bit clock is sped up (44100 Hz -> 2) to stress the
    // memory path and keep the test short
    div = real_rate ? (50_000_000 + 32 * rate) / (64 * rate) : 88200 / rate;
    reg_write(AREG_CTRL, 0);
    reg_write(AREG_FORMAT, {30'b0, bits == 16, ch == 2});
    reg_write(AREG_CLKDIV, div);
    reg_write(AREG_BASE, BASE);
    reg_write(AREG_SIZE, S);
    // the receiver restarts with the word clock low, as the serializer does
    dac.lq.delete(); dac.rq.delete(); dac.lr_prev = 1'b0;
    playing = 1'b0; rd_total = 0; last_ptr = 0;
    for (i = 0; i < nwords; i++) begin
      get_word(w, last);
      if (i >= S) begin
        // wait until the DAC path has read the slot being overwritten
        do begin
          reg_read(AREG_RDPTR, v);
          rd_total += (v + S - last_ptr) % S;
          last_ptr = v;
        end while (rd_total < i - S + 1);
      end
      mem_write(BASE + i % S, w);
      if (!playing && i == S - 1) begin
        reg_write(AREG_CTRL, 1);
        playing = 1'b1;
      end
    end
    $display("entry %0d: %0d words written at %0t", idx, nwords, $time);
    check(last, "last marker on the final word");
    wait_file_done();
    check(!file_error, "song read without error");
    if (!playing) reg_write(AREG_CTRL, 1);
    // expected samples, silent frames dropped (an underrun also sends silence)
    for (int j = 0; j < 4 * nwords; j++) begin
      logic [15:0] l, r;
      if (bits == 16 && ch == 2) begin
        if (4 * j + 3 >= dlen) break;
        l = {file_byte(idx, 44 + 4 * j + 1), file_byte(idx, 44 + 4 * j)};
        r = {file_byte(idx, 44 + 4 * j + 3), file_byte(idx, 44 + 4 * j + 2)};
      end else begin
        if (j >= dlen) break;
        l = {file_byte(idx, 44 + j) ^ 8'h80, 8'h00};
        r = l;
      end
      if (l != 0 || r != 0) begin el.push_back(l); er.push_back(r); end
    end
    nexp = el.size();
    guard = 0;
    do begin
      // the CPU keeps using memory (reading back the buffer) while the
      // song plays, so DAC-path claims meet CPU accesses in flight
      repeat (100) begin
        logic [15:0] rb;
        mem_read(BASE + $urandom % S, rb);
      end
      nrx = 0;
      foreach (dac.lq[k]) if (dac.lq[k] != 0 || dac.rq[k] != 0) nrx++;
      guard++;
    end while (nrx < nexp && guard < 20000);
    reg_write(AREG_CTRL, 0);
    foreach (dac.lq[k]) if (dac.lq[k] != 0 || dac.rq[k] != 0) begin
      rl.push_back(dac.lq[k]); rr.push_back(dac.rq[k]);
    end
    check(rl.size() >= nexp, $sformatf("entry %0d: %0d of %0d samples heard", idx, rl.size(), nexp));
    bad = 0;
    for (int k = 0; k < nexp && k < rl.size(); k++) if (rl[k] != el[k] || rr[k] != er[k]) begin
      if (bad < 5) $display("sample %0d: heard %04h %04h expected %04h %04h", k, rl[k], rr[k], el[k], er[k]);
      bad++;
    end
    check(bad == 0, $sformatf("entry %0d: %0d samples wrong", idx, bad));
    check(dac.frame_ns == 64 * div * 20, $sformatf("entry %0d: frame period %0t", idx, dac.frame_ns));
    formats_played++;
  endtask

  task automatic read_text(input int unsigned idx);
    logic [15:0] w;
    logic        last;
    int          n, bad;
    open_file(idx);
    n = 0; bad = 0;
    do begin
      get_word(w, last);
      if (w[7:0] != file_byte(idx, 2 * n)) bad++;
      if (2 * n + 1 < file_size(idx) && w[15:8] != file_byte(idx, 2 * n + 1)) bad++;
      n++;
    end while (!last);
    wait_file_done();
    check(file_is_txt && !file_error, "lyrics file read as text");
    check(n == (file_size(idx) + 1) / 2 && bad == 0, $sformatf("lyrics: %0d words, %0d wrong", n, bad));
  endtask

  task automatic expect_error(input int unsigned idx, input fat_err_e code);
    open_file(idx);
    file_ready = 1'b1;
    wait_file_done();
    file_ready = 1'b0;
    check(file_error && file_err_code == code, $sformatf("entry %0d: error %s", idx, file_err_code.name()));
  endtask

  initial begin
    file_start = 0; file_entry = 0; file_ready = 0; cpu_req = 0; cpu_we = 0; cpu_addr = 0;
    cpu_wdata = 0; reg_we = 0; reg_addr = 0; reg_wdata = 0; attr_raddr = 0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (cf_init_done);
    repeat (3) @(posedge clk);
    check(attr_loaded, "CIS copy complete");
    for (int i = 0; i < 64; i++) begin
      @(posedge clk); attr_raddr <= 6'(i);
      @(posedge clk); @(negedge clk);
      check(attr_rdata == card.CIS_BYTE(i), $sformatf("attribute memory byte %0d", i));
    end
    play_song(0, 1'b0);
    check(file_clusters == 3, $sformatf("%0d clusters followed through the FAT", file_clusters));
    read_text(1);
    expect_error(4, FE_CHAIN);
    expect_error(6, FE_CARD);
    expect_error(8, FE_RANGE);
    play_song(17, 1'b1);
    // mechanisms
    check(waits > 0,           $sformatf("-WAIT stretching: %0d", waits));
    check(violations == 0,     $sformatf("card timing violations: %0d", violations));
    for (int s = 0; s < 4; s++)
      check(visits[s] > 0,     $sformatf("memory controller state %s: %0d clocks", arb_state_e'(s), visits[s]));
    check(cpu_held > 0,        $sformatf("CPU held off by the DAC path: %0d clocks", cpu_held));
    check(wraps > 0,           $sformatf("circular buffer wraps: %0d", wraps));
    check(claims > 0,          $sformatf("burst claims at the low-water mark: %0d", claims));
    check(full_releases > 0,   $sformatf("releases on FIFO full: %0d", full_releases));
    check(dut.underruns > 0,   $sformatf("DAC underruns: %0d", dut.underruns));
    check(formats_played == 2, "format switch between songs");
    $display("mechanisms: waits=%0d CO=%0d AW=%0d AO=%0d CW=%0d held=%0d wraps=%0d claims=%0d full=%0d underruns=%0d commands=%0d",
             waits, visits[0], visits[1], visits[2], visits[3], cpu_held, wraps, claims, full_releases,
             dut.underruns, commands);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
