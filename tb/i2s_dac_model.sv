// Behavioural model of the receiving side of the audio DAC: an I2S receiver
// with 16-bit slots. On each rising edge of the bit clock it shifts in one
// data bit; when the word clock changes, the bit just taken is the LSB of the
// channel that has ended (left while the word clock was low). Completed
// left/right pairs are appended to the queues `lq` and `rq`. It also keeps
// the time between falling edges of the word clock (one frame) in
// `frame_ns`.
module i2s_dac_model (
  input logic bclk,
  input logic lrclk,
  input logic sdata
);
  logic [15:0] sr = '0, left = '0;
  logic        lr_prev = 1'b0;
  logic [15:0] lq [$];
  logic [15:0] rq [$];
  realtime     t_frame = 0, frame_ns = 0;

  always @(posedge bclk) begin
    sr = {sr[14:0], sdata};
    if (lrclk != lr_prev) begin
      if (!lr_prev) left = sr;
      else begin
        lq.push_back(left);
        rq.push_back(sr);
      end
    end
    lr_prev = lrclk;
  end

  always @(negedge lrclk) begin
    frame_ns = $realtime - t_frame;
    t_frame  = $realtime;
  end
endmodule
