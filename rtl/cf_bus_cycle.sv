// One CompactFlash Memory Mode bus cycle.
//
// On `start` the block latches a request (read or write, attribute or common
// memory, byte or word) and walks the card pins through one cycle:
//   SETUP  address, -REG and -CE driven, strobes high, for the address setup
//          time tsu(A) = 30 ns (CE setup before OE is 0 ns, so CE goes low
//          with the address);
//   STROBE -OE (read) or -WE (write) low for the access time: ta(OE) 150 ns
//          for attribute memory, 125 ns for common memory, and an assumed
//          150 ns write pulse. An attribute read also keeps -OE low until
//          ta(A) = ta(CE) = 300 ns have passed since the address and -CE
//          were driven (270 ns of strobe after the 30 ns setup). While the card holds -WAIT low at the end of
//          that time the strobe is stretched; read data is sampled when the
//          strobe ends;
//   HOLD   strobe high, address and -CE held for th(A) = th(CE) = 20 ns;
//   RECOV  -CE high (the card needs CE released between cycles) until the
//          whole cycle has lasted at least the 300 ns read cycle time and,
//          after a read, until tdis(OE) = 100 ns have passed since -OE rose,
//          so a following write cannot drive the bus while the card still
//          does.
// `done` pulses for one clock with `rdata` valid. Times are turned into clock
// counts from CLK_MHZ, rounding up. -WAIT is brought through a two-stage
// synchroniser; the strobe is long enough for the synchronised value to be
// current (WAIT is valid 35 ns after OE falls).
//
// Byte accesses use -CE1 low, -CE2 high, with A0 picking the even or odd
// byte, which the card returns on D7..D0; word accesses drive both enables
// low with A0 = 0. The timing values are the document's tables; the write
// pulse width, the clock frequency and the rounding are this design's.
module cf_bus_cycle
  import mash_pkg::*;
#(
  parameter int unsigned CLK_MHZ          = 50,
  parameter int unsigned T_SU_NS          = 30,
  parameter int unsigned T_ACC_ATTR_NS    = 150,
  parameter int unsigned T_ACC_COMMON_NS  = 125,
  parameter int unsigned T_ACC_ADDR_NS    = 300,
  parameter int unsigned T_WE_NS          = 150,
  parameter int unsigned T_H_NS           = 20,
  parameter int unsigned T_DIS_NS         = 100,
  parameter int unsigned T_CYCLE_NS       = 300
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  cf_req_t     req,
  output logic        busy,
  output logic        done,
  output logic [15:0] rdata,
  // card pins
  output logic [10:0] cf_a,
  output logic        cf_ce1_n,
  output logic        cf_ce2_n,
  output logic        cf_oe_n,
  output logic        cf_we_n,
  output logic        cf_reg_n,
  output logic [15:0] cf_d_o,
  output logic        cf_d_oe,
  input  logic [15:0] cf_d_i,
  input  logic        cf_wait_n
);

  function automatic int unsigned ns2cyc(int unsigned ns);
    int unsigned c;
    c = (ns * CLK_MHZ + 999) / 1000;
    return (c == 0) ? 1 : c;
  endfunction

  localparam int unsigned C_SU    = ns2cyc(T_SU_NS);
  localparam int unsigned C_ATTR  = ns2cyc(T_ACC_ATTR_NS);
  localparam int unsigned C_COMM  = ns2cyc(T_ACC_COMMON_NS);
  // attribute reads: the data must also be T_ACC_ADDR_NS old from the
  // address and -CE, which both change C_SU clocks before -OE falls
  localparam int unsigned C_AADDR = ns2cyc(T_ACC_ADDR_NS);
  localparam int unsigned C_ARD   = (C_AADDR > C_SU + C_ATTR) ? C_AADDR - C_SU : C_ATTR;
  localparam int unsigned C_WE    = ns2cyc(T_WE_NS);
  localparam int unsigned C_H     = ns2cyc(T_H_NS);
  localparam int unsigned C_DIS   = ns2cyc(T_DIS_NS);
  localparam int unsigned C_CYCLE = ns2cyc(T_CYCLE_NS);
  localparam int unsigned CW      = $clog2(C_CYCLE + C_ARD + C_WE + 4);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_STROBE, S_HOLD, S_RECOV} state_e;
  state_e       state;
  cf_req_t      r;
  logic [CW-1:0] cnt;     // cycles left in the current phase
  logic [CW-1:0] total;   // cycles since the cycle began
  logic [1:0]   wait_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wait_sync <= 2'b11;
    else        wait_sync <= {wait_sync[0], cf_wait_n};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r     <= '0;
      cnt   <= '0;
      total <= '0;
      done  <= 1'b0;
      rdata <= '0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE) total <= total + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          r     <= req;
          state <= S_SETUP;
          cnt   <= CW'(C_SU - 1);
          total <= '0;
        end
        S_SETUP: if (cnt == 0) begin
          state <= S_STROBE;
          cnt   <= r.write ? CW'(C_WE - 1) : (r.attr ? CW'(C_ARD - 1) : CW'(C_COMM - 1));
        end else cnt <= cnt - 1'b1;
        S_STROBE: if (cnt != 0) cnt <= cnt - 1'b1;
          else if (wait_sync[1]) begin
            rdata <= r.word ? cf_d_i : {8'h00, cf_d_i[7:0]};
            state <= S_HOLD;
            cnt   <= CW'(C_H - 1);
          end
        S_HOLD: if (cnt == 0) begin
            state <= S_RECOV;
            // after a read the card may drive the bus for tdis(OE)
            cnt   <= (r.write || C_DIS <= C_H + 1) ? '0 : CW'(C_DIS - C_H - 1);
          end else cnt <= cnt - 1'b1;
        S_RECOV: if (cnt != 0) cnt <= cnt - 1'b1;
          else if (32'(total) + 2 >= C_CYCLE) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  wire active = (state == S_SETUP) || (state == S_STROBE) || (state == S_HOLD);

  always_comb begin
    busy     = (state != S_IDLE);
    cf_a     = active ? {r.addr[10:1], r.word ? 1'b0 : r.addr[0]} : '0;
    cf_reg_n = active ? ~r.attr : 1'b1;
    cf_ce1_n = ~active;
    cf_ce2_n = ~(active && r.word);
    cf_oe_n  = ~((state == S_STROBE) && !r.write);
    cf_we_n  = ~((state == S_STROBE) && r.write);
    cf_d_oe  = active && r.write;
    cf_d_o   = cf_d_oe ? (r.word ? r.wdata : {8'h00, r.wdata[7:0]}) : '0;
  end

  // The strobes never overlap and are only issued with the card enabled.
  a_strobe_excl: assert property (@(posedge clk) disable iff (!rst_n) !(!cf_oe_n && !cf_we_n));
  a_strobe_ce:   assert property (@(posedge clk) disable iff (!rst_n) (!cf_oe_n || !cf_we_n) |-> !cf_ce1_n);

endmodule
