// Audio FIFO: a block RAM used as a two-port first-in first-out buffer
// between the circular-buffer reader (write side) and the DAC control module
// (read side).
//
// One clock domain. `push` writes `din` when the FIFO is not full; `pop`
// reads when it is not empty, and the word appears on `dout` one clock later
// (block RAM read latency). `count` is the number of words held. A push to a
// full FIFO or a pop from an empty one is ignored. `flush` empties the FIFO
// (the player uses it while playback is off, so a new song does not start
// with words left over from the last one). The document makes this
// buffer a two-port block RAM FIFO; its depth, width and the single clock are
// this design's choices.
module audio_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  assign full  = (32'(count) == DEPTH);
  assign empty = (count == 0);

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
    if (do_pop)  dout <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (flush) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (32'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (32'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

endmodule
