// Shared constants and types of the karaoke player.
//
// The CompactFlash card is driven in Memory Mode, where the ATA task-file
// registers sit at offsets 0..7 of common memory and the card information
// structure (CIS) sits at the even addresses of attribute memory. The FAT16
// constants are the byte offsets of the master boot record, the FAT16 boot
// record and the 32-byte directory entry, and the FAT16 cluster codes. The
// register offsets and ATA command/status codes follow the CompactFlash
// standard; the FAT16 layout follows the published FAT16 format.
package mash_pkg;

  // ---------------------------------------------------------------- CF bus
  // One Memory Mode bus cycle as requested by the control logic.
  typedef struct packed {
    logic        write;  // 1: -WE strobe, 0: -OE strobe
    logic        attr;   // 1: attribute memory (-REG low), 0: common memory
    logic        word;   // 1: 16-bit access (-CE1 and -CE2 low), 0: byte access
    logic [10:0] addr;   // A10..A0
    logic [15:0] wdata;  // data driven on D15..D0 during a write
  } cf_req_t;

  // ATA task-file registers, contiguous memory-mapped addressing.
  localparam logic [10:0] ATA_DATA    = 11'h000;
  localparam logic [10:0] ATA_SECCNT  = 11'h002;
  localparam logic [10:0] ATA_LBA0    = 11'h003;
  localparam logic [10:0] ATA_LBA1    = 11'h004;
  localparam logic [10:0] ATA_LBA2    = 11'h005;
  localparam logic [10:0] ATA_DEVHEAD = 11'h006;
  localparam logic [10:0] ATA_CMDSTAT = 11'h007;

  localparam logic [7:0] ATA_CMD_READ_SECTORS = 8'h20;
  localparam logic [7:0] ATA_DEVHEAD_LBA      = 8'hE0;  // LBA mode, drive 0

  localparam int unsigned ST_BSY = 7;
  localparam int unsigned ST_RDY = 6;
  localparam int unsigned ST_DRQ = 3;
  localparam int unsigned ST_ERR = 0;

  localparam int unsigned SECTOR_WORDS = 256;  // 512-byte sector, 16-bit words

  // ---------------------------------------------------------------- FAT16
  localparam logic [8:0] MBR_PART0      = 9'h1BE;  // first partition entry
  localparam logic [8:0] PE_STATE       = 9'h00;
  localparam logic [8:0] PE_TYPE        = 9'h04;
  localparam logic [8:0] PE_LBA_START   = 9'h08;
  localparam logic [8:0] PE_NUM_SECT    = 9'h0C;
  localparam logic [7:0] PART_ACTIVE    = 8'h80;
  localparam logic [7:0] PART_FAT16_BIG = 8'h06;   // 16-bit FAT, larger than 32 MB

  localparam logic [8:0] BR_BYTES_PER_SEC = 9'h00B;
  localparam logic [8:0] BR_SEC_PER_CLUS  = 9'h00D;
  localparam logic [8:0] BR_RESERVED      = 9'h00E;
  localparam logic [8:0] BR_NUM_FATS      = 9'h010;
  localparam logic [8:0] BR_ROOT_ENTRIES  = 9'h011;
  localparam logic [8:0] BR_SEC_PER_FAT   = 9'h016;

  localparam logic [8:0] DE_NAME    = 9'd0;
  localparam logic [8:0] DE_EXT     = 9'd8;
  localparam logic [8:0] DE_ATTR    = 9'd11;
  localparam logic [8:0] DE_CLUSTER = 9'd26;
  localparam logic [8:0] DE_SIZE    = 9'd28;
  // Attribute byte as FAT16 volumes store it (00ADVSHR): bit4 directory,
  // bit3 volume label.
  localparam int unsigned ATTR_BIT_D = 4;
  localparam int unsigned ATTR_BIT_V = 3;

  localparam logic [15:0] FAT_FREE      = 16'h0000;
  localparam logic [15:0] FAT_LAST_MIN  = 16'hFFF8;  // FFF8..FFFF: last cluster
  localparam logic [15:0] FAT_RSVD_MIN  = 16'hFFF0;  // FFF0..FFF6 reserved, FFF7 bad

  typedef enum logic [3:0] {
    FE_NONE     = 4'd0,
    FE_CARD     = 4'd1,  // card reported an error
    FE_INACTIVE = 4'd2,  // first partition not active
    FE_TYPE     = 4'd3,  // first partition not FAT16 (type 06h)
    FE_SECSIZE  = 4'd4,  // bytes per sector other than 512
    FE_ENTRY    = 4'd5,  // directory entry index beyond the root directory
    FE_NOFILE   = 4'd6,  // entry empty, deleted, a directory or a volume label
    FE_FORMAT   = 4'd7,  // extension neither WAV nor TXT
    FE_CHAIN    = 4'd8,  // cluster chain broken (free, reserved, bad, too short)
    FE_RANGE    = 4'd9   // sector beyond the end of the partition
  } fat_err_e;

  // ---------------------------------------------------------------- audio
  typedef enum logic [1:0] {
    ARB_CO = 2'd0,  // CPU operating: the audio player owns memory
    ARB_AW = 2'd1,  // audio waiting for the CPU's access in flight to end
    ARB_AO = 2'd2,  // audio operating: the DAC path reads the circular buffer
    ARB_CW = 2'd3   // CPU waiting while audio operates
  } arb_state_e;

  // Audio control register map (word offsets on the register port).
  localparam logic [2:0] AREG_CTRL   = 3'd0;  // bit0 play
  localparam logic [2:0] AREG_CLKDIV = 3'd1;  // system clocks per half bit clock
  localparam logic [2:0] AREG_FORMAT = 3'd2;  // bit0 stereo, bit1 16-bit samples
  localparam logic [2:0] AREG_BASE   = 3'd3;  // circular buffer base word address
  localparam logic [2:0] AREG_SIZE   = 3'd4;  // circular buffer length in words
  localparam logic [2:0] AREG_STATUS = 3'd5;  // read only: underruns, FIFO level
  localparam logic [2:0] AREG_RDPTR  = 3'd6;  // read only: DAC read offset in the buffer

endpackage
