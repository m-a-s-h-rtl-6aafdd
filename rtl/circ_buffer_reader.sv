// DAC-side reader of the circular audio buffer.
//
// The audio player fills a circular buffer of `buf_size` words starting at
// word address `buf_base` in memory. While `play` is high this block reads
// that buffer in order, wrapping from its last word back to `buf_base`, and
// pushes each word into the audio FIFO. It claims memory from the memory
// controller in bursts: `aud_hold` rises when the FIFO has drained to
// LOW_MARK words or fewer and falls when the FIFO is full or playback stops.
// Within a burst it issues one read at a time (`aud_req` held until
// `aud_ack`), and only while the FIFO has room for the word. When `play`
// rises the read pointer restarts at `buf_base`. `rd_offset` is the offset
// of the next word to be read.
//
// The document has the DAC path read the circular buffer with priority over
// the CPU; the burst rule with a low-water mark and the restart on play are
// this design's choices.
module circ_buffer_reader #(
  parameter int unsigned AW         = 22,
  parameter int unsigned DW         = 16,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned LOW_MARK   = 512,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          play,
  input  logic [AW-1:0] buf_base,
  input  logic [AW-1:0] buf_size,
  // memory controller, audio port
  output logic          aud_hold,
  output logic          aud_req,
  output logic [AW-1:0] aud_addr,
  input  logic          aud_ack,
  input  logic [DW-1:0] aud_rdata,
  // audio FIFO write side
  input  logic [CW-1:0] fifo_count,
  output logic          fifo_push,
  output logic [DW-1:0] fifo_din,
  output logic [AW-1:0] rd_offset
);

  logic [AW-1:0] offset;
  logic          play_q;

  wire fifo_full = (32'(fifo_count) >= FIFO_DEPTH);

  assign aud_addr  = buf_base + offset;
  assign rd_offset = offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aud_hold  <= 1'b0;
      aud_req   <= 1'b0;
      offset    <= '0;
      play_q    <= 1'b0;
      fifo_push <= 1'b0;
      fifo_din  <= '0;
    end else begin
      play_q    <= play;
      fifo_push <= 1'b0;
      if (play && !play_q) offset <= '0;
      // burst claim with hysteresis: drained -> claim, full or stopped -> release
      if (!play || fifo_full)                         aud_hold <= 1'b0;
      else if (32'(fifo_count) <= LOW_MARK)           aud_hold <= 1'b1;
      if (aud_req) begin
        if (aud_ack) begin
          aud_req   <= 1'b0;
          fifo_push <= 1'b1;
          fifo_din  <= aud_rdata;
          offset    <= (offset + 1'b1 >= buf_size) ? '0 : offset + 1'b1;
        end
      end else if (aud_hold && play && !fifo_push &&
                   32'(fifo_count) < FIFO_DEPTH) begin
        aud_req <= 1'b1;
      end
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    aud_req && !aud_ack |=> aud_req && $stable(aud_addr));

endmodule
