// DAC control module: takes audio words from the FIFO and sends them
// serially to the audio DAC.
//
// Output format is I2S with 16-bit slots: the bit clock `dac_bclk` runs at
// f_clk / (2 * clk_div) while `play` is high (the timer starts when playback
// starts and stops with it); data changes on the falling edge of the bit
// clock, MSB first, one bit clock after `dac_lrclk` changes; `dac_lrclk` low
// is the left channel. A frame is 32 bit clocks, so the sample rate is
// f_clk / (64 * clk_div).
//
// The FIFO holds the WAV data words as the file stores them (little-endian,
// channels interleaved). An unpacker prepares the next frame while the
// current one is shifted out:
//   16-bit stereo: two words, left then right;
//   16-bit mono:   one word, sent on both channels;
//   8-bit stereo:  one word, low byte left, high byte right;
//   8-bit mono:    one word holds two samples, low byte first.
// 8-bit WAV samples are unsigned; they become signed 16-bit as
// (byte XOR 80h) * 256. If no frame is ready when one must start, silence is
// sent and `underruns` counts up. FIFO reads use `fifo_pop` with the word on
// `fifo_dout` one clock later.
//
// The document says the WAV settings set up the DAC and that a control
// module sends the FIFO data serially into it; the I2S format, the bit-clock
// divider and the underrun handling are this design's choices.
module dac_serializer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        play,
  input  logic [15:0] clk_div,
  input  logic        stereo,
  input  logic        bits16,
  input  logic        fifo_empty,
  output logic        fifo_pop,
  input  logic [15:0] fifo_dout,
  output logic        dac_bclk,
  output logic        dac_lrclk,
  output logic        dac_sdata,
  output logic [15:0] underruns,
  output logic [31:0] frames
);

  typedef enum logic [2:0] {F_IDLE, F_D1, F_W2, F_D2} fetch_e;

  fetch_e      fst;
  logic [15:0] nxt_l, nxt_r;
  logic        nxt_valid;
  logic [7:0]  hi_byte;
  logic        have_hi;
  logic [15:0] div_cnt;
  logic [4:0]  bit_cnt;
  logic [31:0] shreg;

  function automatic logic [15:0] u8_to_s16(logic [7:0] b);
    return {b ^ 8'h80, 8'h00};
  endfunction

  wire need_word = !nxt_valid && !(!bits16 && !stereo && have_hi);
  wire tick      = play && (div_cnt >= clk_div - 1'b1);
  wire fall      = tick && dac_bclk;
  wire load      = fall && (bit_cnt == 5'd31);

  always_comb begin
    fifo_pop = 1'b0;
    if (play && !fifo_empty) begin
      if (fst == F_IDLE && need_word && !load) fifo_pop = 1'b1;
      if (fst == F_W2)                         fifo_pop = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst <= F_IDLE; nxt_l <= '0; nxt_r <= '0; nxt_valid <= 1'b0;
      hi_byte <= '0; have_hi <= 1'b0;
      div_cnt <= '0; bit_cnt <= 5'd31; shreg <= '0;
      dac_bclk <= 1'b0; dac_lrclk <= 1'b0; dac_sdata <= 1'b0;
      underruns <= '0; frames <= '0;
    end else if (!play) begin
      fst <= F_IDLE; nxt_valid <= 1'b0; have_hi <= 1'b0;
      div_cnt <= '0; bit_cnt <= 5'd31; shreg <= '0;
      dac_bclk <= 1'b0; dac_lrclk <= 1'b0; dac_sdata <= 1'b0;
    end else begin
      // ---- bit clock and shifter
      if (tick) begin
        div_cnt  <= '0;
        dac_bclk <= ~dac_bclk;
      end else div_cnt <= div_cnt + 1'b1;
      if (fall) begin
        dac_sdata <= shreg[31];
        dac_lrclk <= bit_cnt == 5'd31 ? 1'b0 : (bit_cnt + 5'd1 >= 5'd16);
        bit_cnt   <= bit_cnt + 1'b1;
        if (load) begin
          frames <= frames + 1'b1;
          if (nxt_valid) shreg <= {nxt_l, nxt_r};
          else begin
            shreg     <= '0;
            underruns <= underruns + 1'b1;
          end
        end else shreg <= {shreg[30:0], 1'b0};
      end
      // ---- unpacker
      if (load && nxt_valid) nxt_valid <= 1'b0;
      unique case (fst)
        F_IDLE: if (!nxt_valid && !load) begin
          if (!bits16 && !stereo && have_hi) begin
            nxt_l     <= u8_to_s16(hi_byte);
            nxt_r     <= u8_to_s16(hi_byte);
            have_hi   <= 1'b0;
            nxt_valid <= 1'b1;
          end else if (fifo_pop) fst <= F_D1;
        end
        F_D1: begin
          unique case ({bits16, stereo})
            2'b11: begin nxt_l <= fifo_dout; fst <= F_W2; end
            2'b10: begin nxt_l <= fifo_dout; nxt_r <= fifo_dout; nxt_valid <= 1'b1; fst <= F_IDLE; end
            2'b01: begin
              nxt_l <= u8_to_s16(fifo_dout[7:0]);
              nxt_r <= u8_to_s16(fifo_dout[15:8]);
              nxt_valid <= 1'b1; fst <= F_IDLE;
            end
            default: begin
              nxt_l <= u8_to_s16(fifo_dout[7:0]);
              nxt_r <= u8_to_s16(fifo_dout[7:0]);
              hi_byte <= fifo_dout[15:8]; have_hi <= 1'b1;
              nxt_valid <= 1'b1; fst <= F_IDLE;
            end
          endcase
        end
        F_W2: if (fifo_pop) fst <= F_D2;
        F_D2: begin nxt_r <= fifo_dout; nxt_valid <= 1'b1; fst <= F_IDLE; end
        default: fst <= F_IDLE;
      endcase
    end
  end

endmodule
