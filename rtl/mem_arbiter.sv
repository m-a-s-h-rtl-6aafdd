// Memory controller: shares the one memory port between the audio player
// (CPU) and the audio DAC path, with the DAC path first.
//
// Like a traffic light where a highway (the DAC path) crosses a farm road
// (the CPU), the state machine has four states:
//   CO  CPU operating: the CPU's requests go to memory;
//   AW  audio waiting: the DAC path asked for memory while a CPU access was
//       in flight; that access is allowed to finish (no access is cut off);
//   AO  audio operating: the DAC path owns memory and reads the circular
//       buffer; CPU requests are held off;
//   CW  CPU waiting: as AO, with a CPU request pending.
// The DAC path claims memory with `aud_hold` (it raises it when its buffer
// has drained and keeps it until the buffer is full or playback stops) and
// issues single-word reads with `aud_req`. Control returns to the CPU once
// `aud_hold` falls and no audio read is in flight.
//
// Every port uses the same handshake: the requester holds `req` (with
// address, write enable and data) until `ack` pulses for one clock; read
// data is valid with `ack`. The four states and the priority rule are the
// document's; the handshake and the exact transition conditions are this
// design's choices.
module mem_arbiter
  import mash_pkg::*;
#(
  parameter int unsigned AW = 22,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU (audio player) port
  input  logic          cpu_req,
  input  logic          cpu_we,
  input  logic [AW-1:0] cpu_addr,
  input  logic [DW-1:0] cpu_wdata,
  output logic          cpu_ack,
  output logic [DW-1:0] cpu_rdata,
  // audio DAC path port (reads only)
  input  logic          aud_hold,
  input  logic          aud_req,
  input  logic [AW-1:0] aud_addr,
  output logic          aud_ack,
  output logic [DW-1:0] aud_rdata,
  // memory port
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  input  logic          mem_ack,
  input  logic [DW-1:0] mem_rdata,
  output arb_state_e    state
);

  wire cpu_owns = (state == ARB_CO) || (state == ARB_AW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ARB_CO;
    else begin
      unique case (state)
        ARB_CO: if (aud_hold) state <= (cpu_req && !mem_ack) ? ARB_AW : ARB_AO;
        ARB_AW: if (mem_ack) state <= ARB_AO;
        ARB_AO: if (!aud_hold && !aud_req) state <= ARB_CO;
                else if (cpu_req) state <= ARB_CW;
        ARB_CW: if (!aud_hold && !aud_req) state <= ARB_CO;
        default: state <= ARB_CO;
      endcase
    end
  end

  always_comb begin
    if (cpu_owns) begin
      mem_req   = cpu_req;
      mem_we    = cpu_we;
      mem_addr  = cpu_addr;
      mem_wdata = cpu_wdata;
    end else begin
      mem_req   = aud_req;
      mem_we    = 1'b0;
      mem_addr  = aud_addr;
      mem_wdata = '0;
    end
    cpu_ack   = cpu_owns && mem_ack;
    aud_ack   = !cpu_owns && mem_ack;
    cpu_rdata = mem_rdata;
    aud_rdata = mem_rdata;
  end

  // The CPU is never acknowledged while the DAC path owns memory.
  a_cpu_blocked: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ARB_AO || state == ARB_CW) |-> !cpu_ack);
  a_ack_onehot: assert property (@(posedge clk) disable iff (!rst_n) !(cpu_ack && aud_ack));

endmodule
