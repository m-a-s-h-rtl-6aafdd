// Testbench for dac_serializer with a FIFO model (one clock read latency)
// and an I2S receiver model. For each sample format (16-bit stereo, 16-bit
// mono, 8-bit stereo, 8-bit mono) it queues a block of words, plays them and
// compares the received left/right samples with values worked out here from
// the words (8-bit samples are unsigned: (b ^ 80h) << 8). It checks the frame
// period of 64 * clk_div clocks, that an empty FIFO produces silent frames
// counted as underruns, and that no word is lost or repeated.
module tb_dac_serializer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  logic        play, stereo, bits16, fifo_empty, fifo_pop, bclk, lrclk, sdata;
  logic [15:0] clk_div, fifo_dout, underruns;
  logic [31:0] frames;
  logic [15:0] fq [$];
  logic [15:0] el [$];
  logic [15:0] er [$];
  int          checks = 0, failures = 0;

  dac_serializer dut (
    .clk, .rst_n, .play, .clk_div, .stereo, .bits16,
    .fifo_empty, .fifo_pop, .fifo_dout,
    .dac_bclk (bclk), .dac_lrclk (lrclk), .dac_sdata (sdata), .underruns, .frames
  );
  i2s_dac_model dac (.bclk, .lrclk, .sdata);

  assign fifo_empty = (fq.size() == 0);
  always @(posedge clk) if (fifo_pop && fq.size() > 0) fifo_dout <= fq.pop_front();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] s8(logic [7:0] b);
    return {b ^ 8'h80, 8'h00};
  endfunction

  function automatic logic [7:0] nz8();   // never the 8-bit code of silence
    logic [7:0] b;
    do b = 8'($urandom); while (b == 8'h80);
    return b;
  endfunction

  task automatic play_format(input logic st, input logic b16, input int nwords, input int div);
    int u0, nsil, nframes, bad;
    logic [15:0] w;
    fq.delete(); el.delete(); er.delete(); dac.lq.delete(); dac.rq.delete();
    for (int i = 0; i < nwords; i++) begin
      w = {nz8(), nz8()};
      fq.push_back(w);
      unique case ({b16, st})
        2'b11: if (i % 2 == 0) el.push_back(w); else er.push_back(w);
        2'b10: begin el.push_back(w); er.push_back(w); end
        2'b01: begin el.push_back(s8(w[7:0])); er.push_back(s8(w[15:8])); end
        default: begin
          el.push_back(s8(w[7:0]));  er.push_back(s8(w[7:0]));
          el.push_back(s8(w[15:8])); er.push_back(s8(w[15:8]));
        end
      endcase
    end
    @(posedge clk);
    stereo <= st; bits16 <= b16; clk_div <= 16'(div);
    @(posedge clk);
    u0 = underruns;
    play <= 1'b1;
    while (fq.size() > 0) @(posedge clk);
    repeat (64 * div * 4) @(posedge clk);
    check(underruns > u0, $sformatf("fmt %0d%0d: underruns counted once the FIFO ran dry", b16, st));
    check(dac.frame_ns == 64 * div * 20, $sformatf("fmt %0d%0d: frame period %0t ns", b16, st, dac.frame_ns));
    play <= 1'b0;
    @(posedge clk);
    // received: leading and trailing silent frames, then the data in order
    while (dac.lq.size() > 0 && dac.lq[0] == 0 && dac.rq[0] == 0) begin
      void'(dac.lq.pop_front()); void'(dac.rq.pop_front());
    end
    nframes = el.size();
    check(dac.lq.size() >= nframes, $sformatf("fmt %0d%0d: %0d frames received, %0d expected",
                                               b16, st, dac.lq.size(), nframes));
    bad = 0;
    for (int i = 0; i < nframes && i < dac.lq.size(); i++)
      if (dac.lq[i] != el[i] || dac.rq[i] != er[i]) bad++;
    check(bad == 0, $sformatf("fmt %0d%0d: %0d frames wrong", b16, st, bad));
    nsil = 0;
    for (int i = nframes; i < dac.lq.size(); i++) if (dac.lq[i] == 0 && dac.rq[i] == 0) nsil++;
    check(nsil == dac.lq.size() - nframes, $sformatf("fmt %0d%0d: extra frames not silent", b16, st));
    repeat (10) @(posedge clk);
  endtask

  initial begin
    play = 1'b0; stereo = 1'b1; bits16 = 1'b1; clk_div = 16'd2; fifo_dout = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    play_format(1'b1, 1'b1, 40, 2);
    play_format(1'b0, 1'b1, 20, 3);
    play_format(1'b1, 1'b0, 20, 2);
    play_format(1'b0, 1'b0, 20, 2);
    play_format(1'b1, 1'b1, 10, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
