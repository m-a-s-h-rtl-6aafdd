// FAT16 layer: finds a file in the root directory of the card's first
// partition and streams its contents.
//
// On `start` it works through the steps of a FAT16 volume, reading every
// sector it needs through the CompactFlash control logic (`sec_*`) and the
// sector buffer (`buf_raddr`/`buf_rdata`, one clock read latency):
//   1. sector 0, the master boot record: the first partition entry at 1BEh
//      must be active (80h) and of type 06h; its start sector and size
//      are kept, and no sector beyond the partition is ever read;
//   2. the partition's boot record: bytes per sector (must be 512), sectors
//      per cluster, reserved sectors, number of FAT copies, maximum root
//      directory entries and sectors per FAT. From them
//        FAT start  = partition start + reserved sectors
//        root start = FAT start + copies * sectors per FAT
//        data start = root start + root entries * 32 / 512;
//   3. directory entry `entry_idx` of the root directory: it must be in use,
//      not a directory or volume label, and named *.WAV or *.TXT; its first
//      cluster and file size are kept;
//   4. the file's clusters: each cluster n covers sectors
//      data start + (n - 2) * sectors per cluster onward; after the last
//      sector of a cluster the FAT entry of n (FAT sector n / 256, word
//      n mod 256) gives the next cluster, until the file size is used up.
//      A chain that ends (FFF8h-FFFFh) before that, or that meets a free,
//      reserved or bad code, is an error.
// File data leaves as 16-bit little-endian words on a valid/ready stream
// (`out_*`), `out_last` on the word holding the final byte; for an odd size
// the high byte of that word is not file data. `done` pulses at the end,
// with `error` and `err_code` set if a check failed.
//
// The sequence, the fields and the cluster codes are the document's. Taking
// the file size as the end of the file (the chain end is checked only for
// consistency), using the FAT-copies field instead of a fixed two, choosing
// the entry by index and the stream interface are this design's choices.
module fat16_reader
  import mash_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [8:0]  entry_idx,
  output logic        busy,
  output logic        done,
  output logic        error,
  output fat_err_e    err_code,
  output logic        is_wav,
  output logic        is_txt,
  output logic [31:0] file_size,
  output logic [15:0] first_cluster,
  output logic [15:0] cluster_count,
  // sector reads through the CompactFlash control logic
  output logic        sec_req,
  output logic [27:0] sec_lba,
  input  logic        sec_ready,
  input  logic        sec_done,
  input  logic        sec_err,
  // sector buffer read port
  output logic [7:0]  buf_raddr,
  input  logic [15:0] buf_rdata,
  // file data stream
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_data,
  output logic        out_last
);

  typedef enum logic [4:0] {
    S_IDLE, S_LOAD, S_LOADW, S_FLD_A, S_FLD_D,
    S_MBR0, S_MBR1, S_MBR2, S_MBR3, S_MBR4,
    S_BR0, S_BR1, S_BR2, S_BR3, S_BR4, S_BR5, S_BR6, S_GEOM,
    S_DIR0, S_DIR1, S_DIR2, S_DIR3, S_DIR4, S_DIR5,
    S_CLUS, S_STR_A, S_STR_D, S_STR_O, S_FAT_A, S_FAT_D, S_END
  } state_e;

  state_e      state, ret, fret;
  logic [27:0] lba;
  logic [31:0] part_start, part_end, fat_start, data_start;
  logic [7:0]  spc, nfats, sec_in_clus;
  logic [15:0] reserved, max_root, spf, cluster;
  logic [31:0] bytes_left;
  logic [7:0]  widx;
  logic [8:0]  fbase;
  logic [2:0]  flen, fi;
  logic [31:0] fval;
  logic [8:0]  ent_idx;
  logic [23:0] ext;

  wire  [8:0]  fbyte   = fbase + 9'(fi);
  wire  [8:0]  dbase   = {ent_idx[3:0], 5'b0};
  wire  [31:0] fat_start_c  = part_start + 32'(reserved);
  wire  [31:0] root_start_c = fat_start_c + 32'(nfats) * 32'(spf);
  wire  [31:0] data_start_c = root_start_c + 32'(max_root >> 4);

  always_comb begin
    unique case (state)
      S_FLD_A: buf_raddr = fbyte[8:1];
      S_STR_A: buf_raddr = widx;
      S_FAT_A: buf_raddr = cluster[7:0];
      default: buf_raddr = '0;
    endcase
  end

  assign busy      = (state != S_IDLE);
  assign sec_lba   = lba;
  assign out_valid = (state == S_STR_O);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ret <= S_IDLE; fret <= S_IDLE;
      lba <= '0; part_start <= '0; part_end <= '0; fat_start <= '0; data_start <= '0;
      spc <= '0; nfats <= '0; sec_in_clus <= '0; reserved <= '0; max_root <= '0;
      spf <= '0; cluster <= '0; bytes_left <= '0; widx <= '0; fbase <= '0;
      flen <= '0; fi <= '0; fval <= '0; ent_idx <= '0; ext <= '0;
      done <= 1'b0; error <= 1'b0; err_code <= FE_NONE; is_wav <= 1'b0; is_txt <= 1'b0;
      file_size <= '0; first_cluster <= '0; cluster_count <= '0;
      sec_req <= 1'b0; out_data <= '0; out_last <= 1'b0;
    end else begin
      done    <= 1'b0;
      sec_req <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ent_idx <= entry_idx;
          error <= 1'b0; err_code <= FE_NONE; is_wav <= 1'b0; is_txt <= 1'b0;
          cluster_count <= '0;
          lba <= '0; ret <= S_MBR0; state <= S_LOAD;
        end
        // ---- sector load through the control logic
        S_LOAD: if (ret != S_MBR0 && 32'(lba) >= part_end) fail(FE_RANGE);
          else if (sec_ready) begin
            sec_req <= 1'b1;
            state   <= S_LOADW;
          end
        S_LOADW: if (sec_done) begin
          if (sec_err) fail(FE_CARD);
          else state <= ret;
        end
        // ---- little-endian field of flen bytes at byte offset fbase
        S_FLD_A: state <= S_FLD_D;
        S_FLD_D: begin
          fval[8*fi +: 8] <= fbyte[0] ? buf_rdata[15:8] : buf_rdata[7:0];
          if (fi == flen - 1) state <= fret;
          else begin
            fi    <= fi + 1'b1;
            state <= S_FLD_A;
          end
        end
        // ---- master boot record
        S_MBR0: field(MBR_PART0 + PE_STATE, 3'd1, S_MBR1);
        S_MBR1: if (fval[7:0] != PART_ACTIVE) fail(FE_INACTIVE);
                else field(MBR_PART0 + PE_TYPE, 3'd1, S_MBR2);
        S_MBR2: if (fval[7:0] != PART_FAT16_BIG) fail(FE_TYPE);
                else field(MBR_PART0 + PE_LBA_START, 3'd4, S_MBR3);
        S_MBR3: begin
          part_start <= fval;
          field(MBR_PART0 + PE_NUM_SECT, 3'd4, S_MBR4);
        end
        S_MBR4: begin
          part_end <= part_start + fval;
          lba <= part_start[27:0]; ret <= S_BR0; state <= S_LOAD;
        end
        // ---- boot record
        S_BR0: field(BR_BYTES_PER_SEC, 3'd2, S_BR1);
        S_BR1: if (fval[15:0] != 16'd512) fail(FE_SECSIZE);
               else field(BR_SEC_PER_CLUS, 3'd1, S_BR2);
        S_BR2: begin spc      <= fval[7:0];  field(BR_RESERVED,     3'd2, S_BR3); end
        S_BR3: begin reserved <= fval[15:0]; field(BR_NUM_FATS,     3'd1, S_BR4); end
        S_BR4: begin nfats    <= fval[7:0];  field(BR_ROOT_ENTRIES, 3'd2, S_BR5); end
        S_BR5: begin max_root <= fval[15:0]; field(BR_SEC_PER_FAT,  3'd2, S_BR6); end
        S_BR6: begin spf      <= fval[15:0]; state <= S_GEOM; end
        S_GEOM: begin
          fat_start  <= fat_start_c;
          data_start <= data_start_c;
          if (16'(ent_idx) >= max_root) fail(FE_ENTRY);
          else begin
            lba   <= 28'(root_start_c + 32'(ent_idx >> 4));
            ret   <= S_DIR0;
            state <= S_LOAD;
          end
        end
        // ---- directory entry
        S_DIR0: field(dbase + DE_NAME, 3'd1, S_DIR1);
        S_DIR1: if (fval[7:0] == 8'h00 || fval[7:0] == 8'hE5) fail(FE_NOFILE);
                else field(dbase + DE_EXT, 3'd3, S_DIR2);
        S_DIR2: begin ext <= fval[23:0]; field(dbase + DE_ATTR, 3'd1, S_DIR3); end
        S_DIR3: if (fval[ATTR_BIT_D] || fval[ATTR_BIT_V]) fail(FE_NOFILE);
                else field(dbase + DE_CLUSTER, 3'd2, S_DIR4);
        S_DIR4: begin first_cluster <= fval[15:0]; cluster <= fval[15:0];
                      field(dbase + DE_SIZE, 3'd4, S_DIR5); end
        S_DIR5: begin
          file_size  <= fval;
          bytes_left <= fval;
          sec_in_clus <= '0;
          if (ext == "VAW")       is_wav <= 1'b1;   // bytes 'W','A','V', little-endian
          else if (ext == "TXT")  is_txt <= 1'b1;
          if (ext != "VAW" && ext != "TXT")            fail(FE_FORMAT);
          else if (fval == 0)                          state <= S_END;
          else if (cluster < 16'd2 || cluster >= FAT_RSVD_MIN) fail(FE_CHAIN);
          else state <= S_CLUS;
        end
        // ---- file data
        S_CLUS: begin
          lba <= 28'(data_start + 32'(cluster - 16'd2) * 32'(spc) + 32'(sec_in_clus));
          cluster_count <= (sec_in_clus == 0) ? cluster_count + 1'b1 : cluster_count;
          widx <= '0; ret <= S_STR_A; state <= S_LOAD;
        end
        S_STR_A: state <= S_STR_D;
        S_STR_D: begin
          out_data <= buf_rdata;
          out_last <= (bytes_left <= 32'd2);
          state    <= S_STR_O;
        end
        S_STR_O: if (out_ready) begin
          bytes_left <= (bytes_left >= 32'd2) ? bytes_left - 32'd2 : '0;
          if (bytes_left <= 32'd2) state <= S_END;
          else if (widx != 8'hFF) begin
            widx  <= widx + 1'b1;
            state <= S_STR_A;
          end else if (sec_in_clus + 1'b1 != spc) begin
            sec_in_clus <= sec_in_clus + 1'b1;
            state       <= S_CLUS;
          end else begin
            lba   <= 28'(fat_start + 32'(cluster[15:8]));
            ret   <= S_FAT_A;
            state <= S_LOAD;
          end
        end
        // ---- FAT lookup of the current cluster
        S_FAT_A: state <= S_FAT_D;
        S_FAT_D: begin
          if (buf_rdata < 16'd2 || buf_rdata >= FAT_RSVD_MIN) fail(FE_CHAIN);
          else begin
            cluster     <= buf_rdata;
            sec_in_clus <= '0;
            state       <= S_CLUS;
          end
        end
        S_END: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  task automatic field(input logic [8:0] off, input logic [2:0] len, input state_e next);
    fbase <= off;
    flen  <= len;
    fi    <= '0;
    fval  <= '0;
    fret  <= next;
    state <= S_FLD_A;
  endtask

  task automatic fail(input fat_err_e code);
    error    <= 1'b1;
    err_code <= code;
    state    <= S_END;
  endtask

endmodule
