// Audio control registers, written by the audio player.
//
// After parsing the WAV header the audio player programs how the DAC path
// plays the data, and finally sets the play bit once the circular buffer has
// been filled all the way round. Register map (word offsets on a simple
// write-strobe bus; reads are combinational):
//   0 CTRL    bit0 play
//   1 CLKDIV  system clocks per half period of the DAC bit clock (>= 1);
//             sample rate = f_clk / (64 * CLKDIV), 16-bit stereo slots
//   2 FORMAT  bit0 stereo (else mono), bit1 16-bit samples (else 8-bit)
//   3 BASE    circular buffer start, memory word address
//   4 SIZE    circular buffer length in words (>= 1)
//   5 STATUS  read only: [31:16] underrun count, [15:0] audio FIFO level
//   6 RDPTR   read only: offset in the circular buffer of the next word the
//             DAC path will read, so the player knows which words it may
//             overwrite
// Reset leaves playback off, 16-bit stereo, CLKDIV 18 (about 43 kHz from
// 50 MHz), and a 4096-word buffer at address 0. The document names these
// settings and the start signal; the map, widths and reset values are this
// design's.
module audio_ctrl_regs
  import mash_pkg::*;
#(
  parameter int unsigned AW = 22,
  parameter int unsigned CW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reg_we,
  input  logic [2:0]    reg_addr,
  input  logic [31:0]   reg_wdata,  // bits above AW unused by BASE and SIZE
  output logic [31:0]   reg_rdata,
  output logic          play,
  output logic [15:0]   clk_div,
  output logic          stereo,
  output logic          bits16,
  output logic [AW-1:0] buf_base,
  output logic [AW-1:0] buf_size,
  input  logic [15:0]   underruns,
  input  logic [CW-1:0] fifo_count,
  input  logic [AW-1:0] rd_offset
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      play     <= 1'b0;
      clk_div  <= 16'd18;
      stereo   <= 1'b1;
      bits16   <= 1'b1;
      buf_base <= '0;
      buf_size <= AW'(4096);
    end else if (reg_we) begin
      unique case (reg_addr)
        AREG_CTRL:   play     <= reg_wdata[0];
        AREG_CLKDIV: clk_div  <= (reg_wdata[15:0] == 0) ? 16'd1 : reg_wdata[15:0];
        AREG_FORMAT: {bits16, stereo} <= reg_wdata[1:0];
        AREG_BASE:   buf_base <= reg_wdata[AW-1:0];
        AREG_SIZE:   buf_size <= (reg_wdata[AW-1:0] == 0) ? AW'(1) : reg_wdata[AW-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (reg_addr)
      AREG_CTRL:   reg_rdata = {31'b0, play};
      AREG_CLKDIV: reg_rdata = {16'b0, clk_div};
      AREG_FORMAT: reg_rdata = {30'b0, bits16, stereo};
      AREG_BASE:   reg_rdata = 32'(buf_base);
      AREG_SIZE:   reg_rdata = 32'(buf_size);
      AREG_STATUS: reg_rdata = {underruns, 16'(fifo_count)};
      AREG_RDPTR:  reg_rdata = 32'(rd_offset);
      default:     reg_rdata = '0;
    endcase
  end

endmodule
