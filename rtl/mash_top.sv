// Karaoke player datapath: CompactFlash card to audio DAC.
//
// Two paths meet at the processor that runs the audio player software, which
// is outside this block and reaches it through three ports:
//   Card side   cf_controller drives the CompactFlash card in Memory Mode,
//               copies its CIS into cf_attr_mem at start-up and loads
//               sectors into sector_buffer; fat16_reader walks the FAT16
//               volume and streams the chosen file (a WAV song or a TXT
//               lyrics file) on the `file_*` stream.
//   CPU ports   the processor reads that stream, parses the WAV header,
//               writes the audio words into a circular buffer in memory
//               through the `cpu_*` memory port, programs audio_ctrl_regs
//               through the `reg_*` port and sets play.
//   Audio side  mem_arbiter shares the external memory (`mem_*`, e.g. an
//               SDRAM controller) between the CPU and circ_buffer_reader,
//               which has priority and refills audio_fifo from the circular
//               buffer; dac_serializer empties the FIFO into the DAC as an
//               I2S stream.
// The card's bidirectional data bus is split into `cf_d_i`, `cf_d_o` and
// the output enable `cf_d_oe` for the pad. All logic runs on `clk`
// (CLK_MHZ) with an active-low asynchronous reset.
module mash_top
  import mash_pkg::*;
#(
  parameter int unsigned CLK_MHZ      = 50,
  parameter int unsigned CIS_BYTES    = 64,
  parameter int unsigned RESET_CYCLES = 500,
  parameter int unsigned MEM_AW       = 22,
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter int unsigned LOW_MARK     = 512,
  localparam int unsigned ATTR_AW     = $clog2(CIS_BYTES),
  localparam int unsigned FCW         = $clog2(FIFO_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // CompactFlash card pins
  output logic [10:0]        cf_a,
  output logic               cf_ce1_n,
  output logic               cf_ce2_n,
  output logic               cf_oe_n,
  output logic               cf_we_n,
  output logic               cf_reg_n,
  output logic               cf_reset,
  output logic [15:0]        cf_d_o,
  output logic               cf_d_oe,
  input  logic [15:0]        cf_d_i,
  input  logic               cf_wait_n,
  input  logic               cf_ready,
  input  logic               cf_cd1_n,
  input  logic               cf_cd2_n,
  // card information
  output logic               cf_init_done,
  input  logic [ATTR_AW-1:0] attr_raddr,
  output logic [7:0]         attr_rdata,
  output logic               attr_loaded,
  // file selection and file data stream
  input  logic               file_start,
  input  logic [8:0]         file_entry,
  output logic               file_busy,
  output logic               file_done,
  output logic               file_error,
  output fat_err_e           file_err_code,
  output logic               file_is_wav,
  output logic               file_is_txt,
  output logic [31:0]        file_size,
  output logic [15:0]        file_clusters,
  output logic               file_valid,
  input  logic               file_ready,
  output logic [15:0]        file_data,
  output logic               file_last,
  // CPU memory port
  input  logic               cpu_req,
  input  logic               cpu_we,
  input  logic [MEM_AW-1:0]  cpu_addr,
  input  logic [15:0]        cpu_wdata,
  output logic               cpu_ack,
  output logic [15:0]        cpu_rdata,
  // CPU register port
  input  logic               reg_we,
  input  logic [2:0]         reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata,
  // external memory
  output logic               mem_req,
  output logic               mem_we,
  output logic [MEM_AW-1:0]  mem_addr,
  output logic [15:0]        mem_wdata,
  input  logic               mem_ack,
  input  logic [15:0]        mem_rdata,
  // audio DAC
  output logic               dac_bclk,
  output logic               dac_lrclk,
  output logic               dac_sdata,
  output arb_state_e         arb_state
);

  // ---------------------------------------------------------------- card side
  logic               sec_req, sec_ready, sec_done, sec_err;
  logic [27:0]        sec_lba;
  logic               sb_we;
  logic [7:0]         sb_waddr, sb_raddr;
  logic [15:0]        sb_wdata, sb_rdata;
  logic               at_we;
  logic [ATTR_AW-1:0] at_waddr;
  logic [7:0]         at_wdata;

  cf_controller #(.CLK_MHZ(CLK_MHZ), .CIS_BYTES(CIS_BYTES), .RESET_CYCLES(RESET_CYCLES)) u_cf (
    .clk, .rst_n,
    .rd_req (sec_req), .rd_lba (sec_lba), .rd_ready (sec_ready),
    .rd_done (sec_done), .rd_err (sec_err), .init_done (cf_init_done),
    .buf_we (sb_we), .buf_waddr (sb_waddr), .buf_wdata (sb_wdata),
    .attr_we (at_we), .attr_waddr (at_waddr), .attr_wdata (at_wdata),
    .cf_a, .cf_ce1_n, .cf_ce2_n, .cf_oe_n, .cf_we_n, .cf_reg_n, .cf_reset,
    .cf_d_o, .cf_d_oe, .cf_d_i, .cf_wait_n, .cf_ready, .cf_cd1_n, .cf_cd2_n
  );

  cf_attr_mem #(.DEPTH(CIS_BYTES)) u_attr (
    .clk, .rst_n,
    .we (at_we), .waddr (at_waddr), .wdata (at_wdata),
    .raddr (attr_raddr), .rdata (attr_rdata), .loaded (attr_loaded)
  );

  sector_buffer u_sbuf (
    .clk,
    .we (sb_we), .waddr (sb_waddr), .wdata (sb_wdata),
    .raddr (sb_raddr), .rdata (sb_rdata)
  );

  fat16_reader u_fat (
    .clk, .rst_n,
    .start (file_start), .entry_idx (file_entry),
    .busy (file_busy), .done (file_done), .error (file_error), .err_code (file_err_code),
    .is_wav (file_is_wav), .is_txt (file_is_txt), .file_size,
    .first_cluster (), .cluster_count (file_clusters),
    .sec_req, .sec_lba, .sec_ready, .sec_done, .sec_err,
    .buf_raddr (sb_raddr), .buf_rdata (sb_rdata),
    .out_valid (file_valid), .out_ready (file_ready),
    .out_data (file_data), .out_last (file_last)
  );

  // ---------------------------------------------------------------- audio side
  logic              play, stereo, bits16;
  logic [15:0]       clk_div, underruns;
  logic [MEM_AW-1:0] buf_base, buf_size, rd_offset;
  logic              aud_hold, aud_req, aud_ack;
  logic [MEM_AW-1:0] aud_addr;
  logic [15:0]       aud_rdata;
  logic              ff_push, ff_pop, ff_full, ff_empty;
  logic [15:0]       ff_din, ff_dout;
  logic [FCW-1:0]    ff_count;

  audio_ctrl_regs #(.AW(MEM_AW), .CW(FCW)) u_regs (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .play, .clk_div, .stereo, .bits16, .buf_base, .buf_size,
    .underruns, .fifo_count (ff_count), .rd_offset
  );

  mem_arbiter #(.AW(MEM_AW), .DW(16)) u_arb (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ack, .cpu_rdata,
    .aud_hold, .aud_req, .aud_addr, .aud_ack, .aud_rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .state (arb_state)
  );

  circ_buffer_reader #(.AW(MEM_AW), .DW(16), .FIFO_DEPTH(FIFO_DEPTH), .LOW_MARK(LOW_MARK)) u_rd (
    .clk, .rst_n,
    .play, .buf_base, .buf_size,
    .aud_hold, .aud_req, .aud_addr, .aud_ack, .aud_rdata,
    .fifo_count (ff_count), .fifo_push (ff_push), .fifo_din (ff_din), .rd_offset
  );

  audio_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(16)) u_fifo (
    .clk, .rst_n,
    .flush (!play), .push (ff_push), .din (ff_din), .pop (ff_pop), .dout (ff_dout),
    .full (ff_full), .empty (ff_empty), .count (ff_count)
  );

  dac_serializer u_dac (
    .clk, .rst_n,
    .play, .clk_div, .stereo, .bits16,
    .fifo_empty (ff_empty), .fifo_pop (ff_pop), .fifo_dout (ff_dout),
    .dac_bclk, .dac_lrclk, .dac_sdata,
    .underruns, .frames ()
  );

endmodule
