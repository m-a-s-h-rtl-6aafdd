# M.A.S.H. karaoke player — card-to-DAC datapath

A karaoke machine plays songs stored as WAV files on a CompactFlash card and
shows their lyrics, which are kept in text files next to the songs. This RTL
is the hardware that sits between the card and the audio DAC. It has three
jobs:

* It drives the card in CompactFlash **Memory Mode** and reads 512-byte
  sectors from it.
* It walks the card's **FAT16** file system to a file in the root directory
  and streams that file out.
* It plays audio from a **circular buffer** in external memory. A memory
  controller always lets the audio path go first, so playback never skips
  while the processor is busy.

The audio player software runs on a processor outside this RTL. It parses the
WAV header, copies the samples into the circular buffer and starts
playback. It reaches the hardware through three plain ports: a file stream, a
memory port and a small register bank.

```
 CompactFlash card                                      external memory (SDRAM ctrl)
   |  A10..A0 D15..D0 -CE1 -CE2 -OE -WE -REG                     ^ mem_*
   |  READY -WAIT RESET -CD1 -CD2                                |
 +-v--------------+   +--------------+                    +------+------+
 | cf_controller  |-->| sector_buffer|                    | mem_arbiter |<-- cpu_* (audio player)
 |  cf_bus_cycle  |   +------+-------+                    | CO AW AO CW |
 +--+----------+--+          |                            +------+------+
    |          |      +------v-------+                           | aud_*
    |          +----->| fat16_reader |--> file_* stream   +------v-------------+
    v                 +--------------+    (to player)     | circ_buffer_reader |
 cf_attr_mem (CIS copy)                                   +------+-------------+
                                                                 v
 audio_ctrl_regs <-- reg_* (player)  ---settings--->  audio_fifo --> dac_serializer --> I2S DAC
```

Everything runs on one clock, `clk`, with an asynchronous active-low reset
`rst_n`. The default clock is `CLK_MHZ = 50`. All card timing is derived from
that parameter.

## Files

| file | contents |
|---|---|
| `rtl/mash_pkg.sv` | shared constants: ATA registers and codes, FAT16 offsets and codes, error and state enums, register map |
| `rtl/cf_bus_cycle.sv` | one Memory Mode read or write cycle on the card pins |
| `rtl/cf_controller.sv` | card start-up, CIS copy, sector reads via the ATA task file |
| `rtl/cf_attr_mem.sv` | local copy of the card information structure |
| `rtl/sector_buffer.sv` | one-sector dual-port RAM between controller and FAT16 layer |
| `rtl/fat16_reader.sv` | MBR, boot record, directory entry and cluster-chain walk; file stream |
| `rtl/mem_arbiter.sv` | four-state memory controller, audio path first |
| `rtl/circ_buffer_reader.sv` | reads the circular buffer in bursts into the audio FIFO |
| `rtl/audio_fifo.sv` | 1024 x 16 block-RAM FIFO |
| `rtl/audio_ctrl_regs.sv` | play, clock divider, format, buffer base/size, status |
| `rtl/dac_serializer.sv` | unpacks WAV words and sends them as I2S |
| `rtl/mash_top.sv` | wires it all together |
| `tb/*.sv` | one self-checking testbench per block, the end-to-end test, and models of the card, the DAC receiver and a FAT16 test image |

## 1. Talking to the card: one Memory Mode bus cycle

In Memory Mode the card behaves like a slow asynchronous RAM with two
spaces:

* **Attribute memory**, selected by `-REG` low. It holds the card
  information structure (CIS), one byte at each even address.
* **Common memory**, with `-REG` high. Its offsets 0..7 are the ATA task-file
  registers: data, error/features, sector count, LBA 7..0, LBA 15..8,
  LBA 23..16, drive/head, and status/command.

`cf_bus_cycle` performs exactly one access. Each phase is a counter of clock
periods, and each count is the time in nanoseconds divided by the clock period,
rounded up:

| phase | pins | minimum time | at 50 MHz |
|---|---|---|---|
| SETUP | address, `-REG`, `-CE` driven; strobes high | tsu(A) = 30 ns | 2 clocks |
| STROBE | `-OE` (read) or `-WE` (write) low | attribute read: ta(OE) = 150 ns and ta(A) = ta(CE) = 300 ns from the address; common read: ta(OE) = 125 ns; write: 150 ns | 13 / 7 / 8 |
| (stretch) | strobe stays low while the card holds `-WAIT` low | as long as the card asks | |
| HOLD | strobe high, address and `-CE` held | th(A) = th(CE) = 20 ns | 1 |
| RECOV | `-CE` high | pads the cycle to tc = 300 ns; after a read also at least tdis(OE) = 100 ns from `-OE` rising, so a following write never fights the card for the bus | rest, >= 4 after a read |

Notes on this table:

* **Reads** sample the data at the end of the strobe.
* **-WAIT** passes through a two-flop synchroniser. The card drives it at
  most 35 ns after `-OE` falls, and the strobe is far longer than that, so
  the synchronised value is current when the strobe would end.
* **CE setup** before `-OE` is 0 ns, so `-CE` falls together with the
  address.
* **Byte or word:** a byte access drives `-CE1` low and `-CE2` high, with A0
  choosing the even or odd byte; the card returns it on D7..D0. A word access
  drives both enables low.
* **Between cycles:** the card needs `-CE`, or both strobes, released
  between cycles. The RECOV phase releases both.
* **Write timing** is not in the read-timing tables this design follows. The
  150 ns write pulse and the reuse of the read setup, hold and cycle times
  are this design's choice. Check them against the datasheet of the card you
  use.

Assertions in the module check that `-OE` and `-WE` are never low together
and that a strobe is only low while `-CE1` is low.

## 2. Card control logic

`cf_controller` starts the card up and then serves sector requests.

**Start-up:**

1. It waits until both card-detect pins are low, meaning the card is fully
   inserted.
2. It holds RESET high for `RESET_CYCLES` clocks (10 µs by default).
3. It waits for READY to go high.
4. It copies the first `CIS_BYTES` (64) bytes of the CIS, from attribute
   addresses 0, 2, 4 and so on, into `cf_attr_mem`. The host can read that
   copy once `attr_loaded` is high.

**Sector read** (`rd_req` while `rd_ready`; 28-bit `rd_lba`):

1. Poll status until BSY clears.
2. Write sector count 1, the three LBA bytes, and drive/head `E0h | LBA[27:24]`
   (LBA mode).
3. Write the READ SECTORS command, 20h.
4. Poll until DRQ is set. If ERR is set instead, end with `rd_err`.
5. Read the data register 256 times as 16-bit words, storing each word in
   `sector_buffer`.

`rd_done` pulses when the last word has been written.

A sector takes about 85 µs at 50 MHz, dominated by the 256 x 300 ns data
reads. That is roughly 6 MB/s, far more than a CD-quality song needs
(176 kB/s).

## 3. Finding and streaming a file: the FAT16 walk

`fat16_reader` is the part with the most arithmetic. Given a root-directory
entry index, it reads the sectors it needs one at a time through the
controller. It picks fields out of `sector_buffer` with a one-clock read
latency, 16 bits at a time.

1. **Master boot record**, sector 0. The first partition entry at 1BEh must
   be active (80h) and of type 06h, which is FAT16 on a volume larger than
   32 MB. Its start LBA (entry offset +8) and sector count (+0Ch) are kept;
   from then on any sector beyond the partition is refused with an error
   instead of being read.
2. **Boot record**, the first sector of the partition. It reads the fields
   below; bytes per sector must be 512. From them it derives:
   * `fat_start  = part_start + reserved`
   * `root_start = fat_start + nfats * sectors_per_fat`
   * `data_start = root_start + max_root_entries * 32 / 512`

   | field | offset |
   |---|---|
   | bytes per sector | 0Bh |
   | sectors per cluster | 0Dh |
   | reserved sectors | 0Eh |
   | number of FATs | 10h |
   | root entries | 11h |
   | sectors per FAT | 16h |
3. **Directory entry** `entry_idx`, 32 bytes, in root sector
   `root_start + idx/16`. It is rejected if it is empty (00h) or deleted
   (E5h), if it is a directory (attribute bit 4) or a volume label (bit 3),
   or if its extension is neither `WAV` nor `TXT`. `file_is_wav` and
   `file_is_txt` say which it was. The first cluster (offset 26) and size
   (offset 28) are kept.
4. **Cluster chain.** Cluster `n` covers `sectors_per_cluster` sectors from
   `data_start + (n-2) * sectors_per_cluster`. After the last sector of a
   cluster, the FAT entry of `n` gives the next cluster. That entry is word
   `n mod 256` of sector `fat_start + n/256`. FAT codes are read as:
   * `0002h..FFEFh`: next cluster.
   * `FFF8h..FFFFh`: end of chain.
   * `0000h` (free), `FFF0h..FFF6h` (reserved) and `FFF7h` (bad): an error.

**End of file.** The file size decides where the data ends. Reaching the end
of the chain before the size is used up is an error. Only the first FAT copy
is read.

**Output stream.** File data leaves as little-endian 16-bit words on
`out_valid`/`out_ready`/`out_data`. `out_last` marks the word holding the
final byte. For an odd size, the high byte of that word is padding.

**Errors.** `done` pulses at the end. `err_code` (`fat_err_e` in the
package) says which check failed:

* card read error;
* inactive partition;
* wrong partition type;
* bad sector size;
* bad entry;
* no such file;
* unsupported format;
* broken chain;
* sector beyond the partition.

The FAT walk follows the standard on-disk FAT16 layout, in two places where a
shorter rule is sometimes quoted:

* **Attribute bits.** The directory bit is bit 4 and the volume bit is bit 3,
  as every PC formats them.
* **Number of FATs.** It comes from the boot record rather than being fixed
  at two. On normal volumes the two agree.

## 4. Sharing memory: the traffic light

The processor writes audio into a circular buffer in external memory, and
the DAC path reads it back out. If the processor delays the audio reads,
playback skips. `mem_arbiter` therefore treats the DAC path as a highway and
the CPU as a farm road. It has four states:

| state | meaning | owner of `mem_*` |
|---|---|---|
| CO | CPU operating | CPU |
| AW | audio waiting: the DAC path asked while a CPU access was in flight | CPU (finishing) |
| AO | audio operating | DAC path |
| CW | CPU waiting: CPU request held off during AO | DAC path |

Transitions:

* CO -> AW when `aud_hold` rises during a CPU access;
* CO -> AO when `aud_hold` rises with memory idle;
* AW -> AO when the CPU access is acknowledged;
* AO -> CW when the CPU requests;
* AO or CW -> CO when `aud_hold` is low and no audio read is outstanding.

An access already started is never cut off.

Every port uses a req/ack handshake. The requester holds `req` with its
address, data and write enable until `ack` pulses for one clock, and read
data is valid with `ack`. The `mem_*` port therefore fits an SDRAM
controller with any latency. Assertions check that the CPU is never
acknowledged in AO or CW and that only one side is acknowledged at a time.

### Circular buffer and FIFO

`circ_buffer_reader` reads the buffer in order while `play` is high:

* It reads `buf_size` words from `buf_base` and wraps back to the start.
* It pushes each word into `audio_fifo` (1024 x 16).
* It claims memory (`aud_hold`) when the FIFO has drained to `LOW_MARK` = 512
  words or fewer.
* It keeps the claim until the FIFO is full, so each burst is about 512
  single-word reads.
* When `play` rises, the read pointer restarts at the base.
* `RDPTR` in the register bank shows the offset of the next word it will
  read.

**Player protocol.** The software using this must:

1. Fill the whole buffer once before setting play. Playback then starts at
   the buffer's beginning, after the writes have wrapped around to it.
2. While playing, write only words the reader has already passed (behind
   `RDPTR`).
3. Make the buffer comfortably larger than the FIFO. The reader reads
   blindly: it does not know which words the player has refilled. When play
   starts, its first burst takes `FIFO_DEPTH` words at once, so the player's
   lead over the reader drops to `SIZE - FIFO_DEPTH` words. From then on the
   player must refill faster than the DAC drains. `FIFO_DEPTH + LOW_MARK`
   (1536) words or more keeps at least one full burst of lead.

   The end-to-end test runs the DAC about nine times faster than real time
   (a 44.1 kHz file is played with CLKDIV 2). There, 1300 words works and
   1100 words does not.
4. Clear play at the end of a song. This also flushes the FIFO, so the next
   song does not begin with stale words.

## 5. Playing: WAV words to I2S

`dac_serializer` sends I2S:

* 32 bit clocks per frame: 16-bit left slot (`dac_lrclk` low), then right.
* MSB first, with data changing on the falling edge of `dac_bclk`, one bit
  clock after `dac_lrclk`.
* Bit clock = `clk / (2*CLKDIV)`, so sample rate = `clk / (64*CLKDIV)`.
* At 50 MHz, CLKDIV 18 gives 43.4 kHz and 17 gives 46.0 kHz. For exactly
  44.1 kHz use a 45.1584 MHz clock with CLKDIV 16.
* The bit clock runs only while `play` is high.

**Unpacking.** The FIFO holds the file's bytes as little-endian words, and
the unpacker builds the next frame while the current one shifts out:

| FORMAT (stereo, bits16) | words per frame | left | right |
|---|---|---|---|
| 1,1 | 2 | word 0 | word 1 |
| 0,1 | 1 | word | same word |
| 1,0 | 1 | low byte | high byte |
| 0,0 | 1/2 | low byte, then high byte in the next frame | same as left |

8-bit WAV samples are unsigned. Each becomes `(byte ^ 80h) << 8`.

**Underruns.** If no frame is ready when one must start, a silent frame is
sent and the underrun counter (STATUS[31:16]) counts up.

### Register bank (`reg_*`, word offsets)

| offset | name | contents |
|---|---|---|
| 0 | CTRL | bit 0 play |
| 1 | CLKDIV | clocks per half bit clock (0 is stored as 1); reset 18 |
| 2 | FORMAT | bit 0 stereo, bit 1 16-bit; reset 3 |
| 3 | BASE | circular buffer start (word address); reset 0 |
| 4 | SIZE | buffer length in words (0 is stored as 1); reset 4096 |
| 5 | STATUS | [31:16] underruns, [15:0] FIFO level (read only) |
| 6 | RDPTR | next offset the DAC path will read (read only) |

Writes take effect on the clock edge of `reg_we`; reads are combinational.

## Parameters (mash_top)

| parameter | default | meaning |
|---|---|---|
| `CLK_MHZ` | 50 | clock frequency; sets all card timing counts |
| `CIS_BYTES` | 64 | CIS bytes copied at start-up (attribute memory depth) |
| `RESET_CYCLES` | 500 | card RESET pulse length |
| `MEM_AW` | 22 | external memory word address width (8 MB of 16-bit words) |
| `FIFO_DEPTH` | 1024 | audio FIFO depth (power of two) |
| `LOW_MARK` | 512 | FIFO level at which the DAC path claims memory |

The card timing values are parameters of `cf_bus_cycle`.

## What follows the original design and what does not

**Taken from the M.A.S.H. design:**

* Memory Mode and the pins it uses, with the read timings.
* The CIS read into an attribute memory.
* A buffer shared by the card logic and the FAT16 layer.
* The FAT16 walk: MBR first partition, active flag, type 06h, boot record
  fields, root-directory files, WAV and lyrics text files, cluster codes.
* The four-state memory controller with audio priority.
* The circular buffer that must wrap before playback starts.
* A two-port block-RAM FIFO feeding a control module that sends data
  serially to the DAC.
* DAC settings taken from the WAV header.

**Chosen here, because the original leaves them open:**

* the 50 MHz clock;
* the write pulse width;
* ATA task-file sector reads in LBA mode;
* the reset length and CIS copy length;
* all widths and depths;
* the req/ack handshakes and the exact arbiter transitions;
* the low-water-mark burst rule;
* the FIFO flush and the `RDPTR` register;
* I2S as the serial format, and the 8-bit and mono unpacking;
* underrun handling;
* the register map.

**Left out:**

* The processor and its software.
* The SDRAM and its controller; `mem_*` is a port.
* The audio codec chip.
* The lyrics display.
* Clock generation.
* A separate CIS ROM. The CIS bytes are copied from the card itself into
  `cf_attr_mem`.

The FAT walk ends a file by its size rather than only by the end-of-chain
code.

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog that ends a
hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mash_pkg.sv tb/fat_image_pkg.sv tb/tb_mash_top.sv \
  --top-module tb_mash_top -o sim
./obj_dir/sim
```

For a block test, replace `tb_mash_top` with, for example, `tb_fat16_reader`.

### Models and test image

| file | what it models |
|---|---|
| `tb/fat_image_pkg.sv` | Builds a small FAT16 card image in memory: MBR, boot record, two FATs, root directory and data. It holds a 16-bit stereo song spread over non-adjacent clusters, an 8-bit mono song, a lyrics file, a directory, an unsupported extension, a chain that runs into a bad-cluster code, an empty entry, a file whose cluster lies beyond the card (the partition
table claims more sectors than the model card holds, so reading it gives a
card error) and a file whose cluster lies beyond the partition. |
| `tb/cf_card_model.sv` | A Memory Mode card. It serves the image and the CIS, raises `-WAIT` at random, holds READY low after reset and keeps BSY for a random time. It checks every timing rule in section 1 and counts violations. |
| `tb/i2s_dac_model.sv` | Receives the I2S stream and measures the frame period. |

### End-to-end test

`tb/tb_mash_top.sv` runs the top at its default parameters. A random-latency
memory stands in for the SDRAM, and a task plays the audio player software.
The test:

* plays the 16-bit stereo song through a 1300-word circular buffer, with the
  DAC sped up about nine times, while the CPU keeps issuing its own memory
  reads;
* switches format and plays the 8-bit mono song at its real rate. It sets
  CLKDIV from the header as the player would: 35 for 22050 Hz, giving
  22321 Hz at 50 MHz;
* reads the lyrics file;
* takes the error paths;
* compares every received sample with the file bytes.

It also counts each mechanism and fails if any never happened:

* `-WAIT` stretching;
* the CIS copy;
* FAT lookups;
* each arbiter state, CO, AW, AO and CW;
* the CPU held off;
* buffer wraps;
* burst claims and releases on a full FIFO;
* DAC underruns;
* the format switch.

A run simulates about 50 ms in a few seconds.

### Full-size card test

`tb/tb_fat16_card64.sv` runs the FAT walk on the geometry of a 64 MB card:
* 131072 sectors, with the partition at LBA 32;
* 4 sectors per cluster;
* two 128-sector FATs;
* 512 root entries.

The disk is sparse, with only the metadata sectors stored. The test file's
FAT entries are spread from FAT sector 0 to 127, and its chain includes the
volume's last cluster, 32688. The test checks the words streamed and the
exact number of sector reads.

### Block tests

Each block test compares its block with values computed in the testbench.
Examples:

* the cycle phase lengths in clocks, for both memory spaces and with
  `-WAIT`;
* the FAT arithmetic on the image;
* FIFO order and level against a queue;
* arbiter ownership under random traffic;
* the I2S bit pattern for all four formats.
