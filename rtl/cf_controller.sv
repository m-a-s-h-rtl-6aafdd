// CompactFlash control logic (Memory Mode).
//
// Brings the card up and then reads 512-byte sectors by logical block number.
// Start-up: wait until both card-detect pins are low (card fully inserted),
// pulse RESET high for RESET_CYCLES, wait for READY to go high, then copy the
// first CIS_BYTES bytes of the card information structure (the even addresses
// 0, 2, 4, ... of attribute memory) into the attribute memory block through
// the `attr_*` write port. `init_done` then rises.
//
// Sector read (`rd_req` while `rd_ready`, address `rd_lba`): poll the ATA
// status register until BSY is clear; write sector count 1, the 28-bit LBA
// and the READ SECTORS command (20h) to the task-file registers at common
// memory offsets 2..7; poll status until DRQ is set (or ERR); then read the
// data register 256 times as 16-bit words, writing each word to the sector
// buffer (`buf_we`, `buf_waddr`, `buf_wdata`). `rd_done` pulses at the end
// with `rd_err` set if the card reported ERR.
//
// The document gives the Memory Mode pins and read timing and says what this
// logic is for; the task-file protocol and LBA addressing are the
// CompactFlash standard's, and the reset pulse width, CIS copy length and
// the polling scheme are this design's choices. Every bus cycle is carried
// out by cf_bus_cycle.
module cf_controller
  import mash_pkg::*;
#(
  parameter int unsigned CLK_MHZ      = 50,
  parameter int unsigned CIS_BYTES    = 64,
  parameter int unsigned RESET_CYCLES = 500,
  localparam int unsigned AW_ATTR     = $clog2(CIS_BYTES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // sector request from the FAT16 layer
  input  logic               rd_req,
  input  logic [27:0]        rd_lba,
  output logic               rd_ready,
  output logic               rd_done,
  output logic               rd_err,
  output logic               init_done,
  // sector buffer write port
  output logic               buf_we,
  output logic [7:0]         buf_waddr,
  output logic [15:0]        buf_wdata,
  // attribute memory write port
  output logic               attr_we,
  output logic [AW_ATTR-1:0] attr_waddr,
  output logic [7:0]         attr_wdata,
  // card pins
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
  input  logic               cf_cd2_n
);

  typedef enum logic [3:0] {
    S_DETECT, S_RESET, S_WAIT_READY, S_CIS, S_IDLE,
    S_POLL_BSY, S_WRITE_TF, S_POLL_DRQ, S_DATA
  } state_e;

  state_e      state;
  logic [15:0] cnt;          // reset timer / loop index
  logic [27:0] lba;
  logic        issued;       // a bus cycle for the current step is running
  logic        bc_start, bc_done;
  cf_req_t     bc_req;
  logic [15:0] bc_rdata;
  logic [1:0]  ready_sync, cd_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready_sync <= '0;
      cd_sync    <= 2'b11;
    end else begin
      ready_sync <= {ready_sync[0], cf_ready};
      cd_sync    <= {cd_sync[0], cf_cd1_n | cf_cd2_n};
    end
  end

  // Task-file write sequence for READ SECTORS.
  function automatic cf_req_t tf_write(logic [2:0] idx, logic [27:0] l);
    cf_req_t q;
    q = '0;
    q.write = 1'b1;
    unique case (idx)
      3'd0:    begin q.addr = ATA_SECCNT;  q.wdata = 16'd1; end
      3'd1:    begin q.addr = ATA_LBA0;    q.wdata = {8'h00, l[7:0]}; end
      3'd2:    begin q.addr = ATA_LBA1;    q.wdata = {8'h00, l[15:8]}; end
      3'd3:    begin q.addr = ATA_LBA2;    q.wdata = {8'h00, l[23:16]}; end
      3'd4:    begin q.addr = ATA_DEVHEAD; q.wdata = {8'h00, ATA_DEVHEAD_LBA | {4'h0, l[27:24]}}; end
      default: begin q.addr = ATA_CMDSTAT; q.wdata = {8'h00, ATA_CMD_READ_SECTORS}; end
    endcase
    return q;
  endfunction

  function automatic cf_req_t status_read();
    cf_req_t q;
    q = '0;
    q.addr = ATA_CMDSTAT;
    return q;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_DETECT;
      cnt        <= '0;
      lba        <= '0;
      issued     <= 1'b0;
      bc_start   <= 1'b0;
      bc_req     <= '0;
      rd_done    <= 1'b0;
      rd_err     <= 1'b0;
      init_done  <= 1'b0;
      buf_we     <= 1'b0;
      buf_waddr  <= '0;
      buf_wdata  <= '0;
      attr_we    <= 1'b0;
      attr_waddr <= '0;
      attr_wdata <= '0;
    end else begin
      bc_start <= 1'b0;
      rd_done  <= 1'b0;
      buf_we   <= 1'b0;
      attr_we  <= 1'b0;
      unique case (state)
        S_DETECT: if (!cd_sync[1]) begin
          state <= S_RESET;
          cnt   <= 16'(RESET_CYCLES - 1);
        end
        S_RESET: if (cnt == 0) state <= S_WAIT_READY;
          else cnt <= cnt - 1'b1;
        S_WAIT_READY: if (ready_sync[1]) begin
          state <= S_CIS;
          cnt   <= '0;
        end
        S_CIS: if (!issued) begin
          bc_req      <= '0;
          bc_req.attr <= 1'b1;
          bc_req.addr <= 11'({cnt[9:0], 1'b0});
          bc_start    <= 1'b1;
          issued      <= 1'b1;
        end else if (bc_done) begin
          issued     <= 1'b0;
          attr_we    <= 1'b1;
          attr_waddr <= AW_ATTR'(cnt);
          attr_wdata <= bc_rdata[7:0];
          if (32'(cnt) == CIS_BYTES - 1) begin
            state     <= S_IDLE;
            init_done <= 1'b1;
          end
          cnt <= cnt + 1'b1;
        end
        S_IDLE: if (rd_req) begin
          lba   <= rd_lba;
          state <= S_POLL_BSY;
        end
        S_POLL_BSY: if (!issued) begin
          bc_req   <= status_read();
          bc_start <= 1'b1;
          issued   <= 1'b1;
        end else if (bc_done) begin
          issued <= 1'b0;
          if (!bc_rdata[ST_BSY]) begin
            state <= S_WRITE_TF;
            cnt   <= '0;
          end
        end
        S_WRITE_TF: if (!issued) begin
          bc_req   <= tf_write(cnt[2:0], lba);
          bc_start <= 1'b1;
          issued   <= 1'b1;
        end else if (bc_done) begin
          issued <= 1'b0;
          if (cnt == 5) state <= S_POLL_DRQ;
          cnt <= cnt + 1'b1;
        end
        S_POLL_DRQ: if (!issued) begin
          bc_req   <= status_read();
          bc_start <= 1'b1;
          issued   <= 1'b1;
        end else if (bc_done) begin
          issued <= 1'b0;
          if (!bc_rdata[ST_BSY] && bc_rdata[ST_ERR]) begin
            state   <= S_IDLE;
            rd_done <= 1'b1;
            rd_err  <= 1'b1;
          end else if (!bc_rdata[ST_BSY] && bc_rdata[ST_DRQ]) begin
            state <= S_DATA;
            cnt   <= '0;
          end
        end
        S_DATA: if (!issued) begin
          bc_req      <= '0;
          bc_req.word <= 1'b1;
          bc_req.addr <= ATA_DATA;
          bc_start    <= 1'b1;
          issued      <= 1'b1;
        end else if (bc_done) begin
          issued    <= 1'b0;
          buf_we    <= 1'b1;
          buf_waddr <= cnt[7:0];
          buf_wdata <= bc_rdata;
          if (32'(cnt) == SECTOR_WORDS - 1) begin
            state   <= S_IDLE;
            rd_done <= 1'b1;
            rd_err  <= 1'b0;
          end
          cnt <= cnt + 1'b1;
        end
        default: state <= S_DETECT;
      endcase
    end
  end

  assign rd_ready = (state == S_IDLE) && init_done;
  assign cf_reset = (state == S_RESET);

  cf_bus_cycle #(.CLK_MHZ(CLK_MHZ)) u_bus (
    .clk, .rst_n,
    .start (bc_start),
    .req   (bc_req),
    .busy  (),
    .done  (bc_done),
    .rdata (bc_rdata),
    .cf_a, .cf_ce1_n, .cf_ce2_n, .cf_oe_n, .cf_we_n, .cf_reg_n,
    .cf_d_o, .cf_d_oe, .cf_d_i, .cf_wait_n
  );

endmodule
