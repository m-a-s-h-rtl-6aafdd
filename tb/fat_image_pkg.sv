// Test FAT16 disk image and the expected contents of its files.
//
// `build()` fills `img` with a small card image:
//   LBA 0        master boot record, first partition active, type 06h,
//                starting at LBA PART_START
//   PART_START   boot record: 512 bytes/sector, 2 sectors/cluster, 1 reserved
//                sector, 2 FAT copies of 2 sectors, 32 root entries
//   +1 .. +4     the two FAT copies
//   +5 .. +6     root directory (32 entries)
//   +7 ..        data area, cluster 2 first
// Root directory entries:
//   0  SONG.WAV    3000 bytes, clusters 2 -> 5 -> 3 (fragmented)
//   1  LYRICS.TXT  701 bytes,  cluster 4 (odd size)
//   2  MUSIC       directory
//   3  README.DOC  unsupported extension
//   4  BAD.WAV     clusters 6 -> bad cluster code FFF7h
//   5  empty
//   6  FAR.TXT     cluster 100, inside the partition but beyond the end of
//                  the card (the partition table claims 508 sectors)
//   8  HUGE.TXT    cluster 1000, beyond the end of the partition
//   17 SONG2.WAV   1024 bytes, cluster 7 (second root directory sector)
// SONG.WAV starts with a 44-byte WAV header for 16-bit stereo at 44100 Hz,
// SONG2.WAV with one for 8-bit mono at 22050 Hz; the rest is the pattern.
// Byte k of cluster c holds (c*37 + k*13 + k/256) mod 256. `file_byte()`
// gives byte k of a file from its cluster list written out here, without
// reading the FAT, so that a reader's result can be checked independently.
package fat_image_pkg;

  localparam int unsigned PART_START = 4;
  localparam int unsigned NSECT      = 32;
  localparam int unsigned DATA_START = PART_START + 7;
  localparam int unsigned SPC        = 2;

  logic [7:0] img [NSECT*512];

  function automatic logic [7:0] pattern(int unsigned c, int unsigned k);
    return 8'((c * 37 + k * 13 + k / 256) % 256);
  endfunction

  function automatic int unsigned file_size(int unsigned entry);
    case (entry)
      0:  return 3000;
      1:  return 701;
      17: return 1024;
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned chain(int unsigned entry, int unsigned i);
    case (entry)
      0:  return (i == 0) ? 2 : (i == 1) ? 5 : 3;
      1:  return 4;
      default: return 7;
    endcase
  endfunction

  // byte k of a canonical 44-byte PCM WAV header
  function automatic logic [7:0] wav_header(int unsigned k, int unsigned ch,
                                            int unsigned rate, int unsigned bits,
                                            int unsigned len);
    logic [7:0] h [44];
    int unsigned v [7];
    string tags = "RIFFWAVEfmt data";
    for (int i = 0; i < 4; i++) begin
      h[i] = tags[i]; h[8 + i] = tags[4 + i]; h[12 + i] = tags[8 + i]; h[36 + i] = tags[12 + i];
    end
    v = '{36 + len, 16, rate, rate * ch * bits / 8, len, 0, 0};
    for (int i = 0; i < 4; i++) begin
      h[4 + i]  = 8'(v[0] >> (8 * i));
      h[16 + i] = 8'(v[1] >> (8 * i));
      h[24 + i] = 8'(v[2] >> (8 * i));
      h[28 + i] = 8'(v[3] >> (8 * i));
      h[40 + i] = 8'(v[4] >> (8 * i));
    end
    h[20] = 8'd1; h[21] = 8'd0;                    // PCM
    h[22] = 8'(ch); h[23] = 8'd0;
    h[32] = 8'(ch * bits / 8); h[33] = 8'd0;       // block align
    h[34] = 8'(bits); h[35] = 8'd0;
    return h[k];
  endfunction

  function automatic logic [7:0] file_byte(int unsigned entry, int unsigned k);
    if (entry == 0 && k < 44)  return wav_header(k, 2, 44100, 16, 3000 - 44);
    if (entry == 17 && k < 44) return wav_header(k, 1, 22050, 8, 1024 - 44);
    return pattern(chain(entry, k / (SPC * 512)), k % (SPC * 512));
  endfunction

  function automatic void put16(int unsigned a, int unsigned v);
    img[a]     = 8'(v);
    img[a + 1] = 8'(v >> 8);
  endfunction

  function automatic void put32(int unsigned a, int unsigned v);
    put16(a, v & 16'hFFFF);
    put16(a + 2, v >> 16);
  endfunction

  function automatic void dir_entry(int unsigned idx, string name, string ext,
                                    int unsigned attr, int unsigned clus, int unsigned size);
    int unsigned a;
    a = (PART_START + 5) * 512 + idx * 32;
    for (int i = 0; i < 8; i++) img[a + i] = (i < name.len()) ? name[i] : 8'h20;
    for (int i = 0; i < 3; i++) img[a + 8 + i] = (i < ext.len()) ? ext[i] : 8'h20;
    img[a + 11] = 8'(attr);
    put16(a + 26, clus);
    put32(a + 28, size);
  endfunction

  function automatic void fat_entry(int unsigned c, int unsigned v);
    put16((PART_START + 1) * 512 + c * 2, v);   // first copy
    put16((PART_START + 3) * 512 + c * 2, v);   // second copy
  endfunction

  function automatic void build();
    int unsigned b;
    foreach (img[i]) img[i] = 8'h00;
    // MBR
    img[16'h1BE] = 8'h80;
    img[16'h1C2] = 8'h06;
    put32(16'h1C6, PART_START);
    put32(16'h1CA, 512 - PART_START);          // more than the model card holds
    img[16'h1FE] = 8'h55; img[16'h1FF] = 8'hAA;
    // boot record
    b = PART_START * 512;
    img[b] = 8'hEB; img[b + 1] = 8'h3C; img[b + 2] = 8'h90;
    put16(b + 16'h0B, 512);
    img[b + 16'h0D] = 8'(SPC);
    put16(b + 16'h0E, 1);
    img[b + 16'h10] = 8'd2;
    put16(b + 16'h11, 32);
    img[b + 16'h15] = 8'hF8;
    put16(b + 16'h16, 2);
    img[b + 16'h26] = 8'h29;
    img[b + 16'h1FE] = 8'h55; img[b + 16'h1FF] = 8'hAA;
    // FAT
    fat_entry(0, 16'hFFF8); fat_entry(1, 16'hFFFF);
    fat_entry(2, 5); fat_entry(5, 3); fat_entry(3, 16'hFFFF);
    fat_entry(4, 16'hFFF8);
    fat_entry(6, 16'hFFF7);
    fat_entry(7, 16'hFFFF);
    // root directory
    dir_entry(0,  "SONG",   "WAV", 8'h20, 2, 3000);
    dir_entry(1,  "LYRICS", "TXT", 8'h20, 4, 701);
    dir_entry(2,  "MUSIC",  "",    8'h10, 8, 0);
    dir_entry(3,  "README", "DOC", 8'h20, 8, 10);
    dir_entry(4,  "BAD",    "WAV", 8'h20, 6, 3000);
    dir_entry(6,  "FAR",    "TXT", 8'h20, 100, 50);
    dir_entry(8,  "HUGE",   "TXT", 8'h20, 1000, 50);
    dir_entry(17, "SONG2",  "WAV", 8'h20, 7, 1024);
    // data area: clusters 2..8
    for (int unsigned c = 2; c <= 8; c++)
      for (int unsigned k = 0; k < SPC * 512; k++)
        img[(DATA_START + (c - 2) * SPC) * 512 + k] = pattern(c, k);
    for (int unsigned k = 0; k < 44; k++) begin
      img[DATA_START * 512 + k]                 = file_byte(0, k);
      img[(DATA_START + 5 * SPC) * 512 + k]     = file_byte(17, k);
    end
  endfunction

endpackage
