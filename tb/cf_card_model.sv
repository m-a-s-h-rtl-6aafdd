// Behavioural model of a CompactFlash card in Memory Mode, for simulation.
//
// Holds the disk image of fat_image_pkg (which the testbench builds) and a
// card information structure whose byte i is CIS_BYTE(i), readable at the
// even addresses of attribute memory. The ATA task-file registers sit at
// common memory offsets 0..7; READ SECTORS (20h) sets BSY for BUSY_NS, then
// DRQ, after which 256 word reads of the data register return the sector. An
// LBA beyond the image ends the command with ERR. After RESET falls, READY
// stays low for READY_NS.
//
// Timing is modelled and checked against the Memory Mode tables (times in
// ns): read data is only valid ta(OE) after -OE falls (125 ns common, 150 ns
// attribute), for attribute memory also no sooner than ta(A) = ta(CE) =
// 300 ns after the address and -CE, and is garbage before, so a host that
// samples early reads wrong data (an early attribute read is also counted
// as a violation). Every WAIT_EVERY-th data word the card pulls -WAIT low 35 ns
// after -OE falls for WAIT_NS and only then presents the data. Checked and
// counted in `violations`: address and -CE setup of 30 ns before a strobe,
// strobes not overlapping, address and -CE hold of 20 ns after a strobe,
// 300 ns between the starts of consecutive cycles, and no host drive of the
// data bus within tdis(OE) = 100 ns of -OE rising.
module cf_card_model #(
  parameter int unsigned BUSY_NS    = 1000,
  parameter int unsigned READY_NS   = 2000,
  parameter int unsigned WAIT_EVERY = 64,
  parameter int unsigned WAIT_NS    = 400
) (
  input  logic [10:0] a,
  input  logic        ce1_n,
  input  logic        ce2_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        reg_n,
  input  logic        reset,
  input  logic [15:0] d_host,
  input  logic        d_host_oe,
  output logic [15:0] d_card,
  output logic        wait_n,
  output logic        ready,
  output logic        cd1_n,
  output logic        cd2_n,
  output int          violations,
  output int          waits,
  output int          commands,
  output int          data_words,
  output int          attr_reads
);

  import fat_image_pkg::*;

  function automatic logic [7:0] CIS_BYTE(int unsigned i);
    return (i == 0) ? 8'h01 : 8'((i * 7 + 3) % 256);
  endfunction

  logic [7:0]  tf [8];        // task file (index 7 read = status)
  logic [7:0]  status;
  logic [27:0] cur_lba;
  int unsigned word_idx;
  logic        data_ok;       // output data has passed its access time
  realtime     t_addr = 0, t_ce_fall = 0, t_oe_fall = 0;
  realtime     t_strobe_rise = -1000, t_last_start = -1000, t_oe_rise = -1000;
  logic        wait_this;

  initial begin
    violations = 0; waits = 0; commands = 0; data_words = 0; attr_reads = 0;
    status = 8'h00; word_idx = 0; cur_lba = '0;
    foreach (tf[i]) tf[i] = 8'h00;
    ready = 1'b0; wait_n = 1'b1; cd1_n = 1'b0; cd2_n = 1'b0;
    data_ok = 1'b0; wait_this = 1'b0;
  end

  // power-up / reset
  always @(negedge reset) begin
    ready  = 1'b0;
    status = 8'h80;
    #(READY_NS);
    status = 8'h50;          // RDY | DSC
    ready  = 1'b1;
  end
  always @(posedge reset) begin
    ready = 1'b0;
  end

  // ---- timing checks
  always @(a) begin
    if (!ce1_n && ($realtime - t_strobe_rise) < 20 && oe_n && we_n) begin
      violations++;
      $display("CF model: address hold violated at %0t", $time);
    end
    if (!oe_n || !we_n) begin
      violations++;
      $display("CF model: address changed during strobe at %0t", $time);
    end
    t_addr = $realtime;
  end
  always @(negedge ce1_n) begin
    if ($realtime - t_last_start < 300) begin
      violations++;
      $display("CF model: cycle time %0t < 300 ns", $realtime - t_last_start);
    end
    t_last_start = $realtime;
    t_ce_fall    = $realtime;
  end
  always @(posedge ce1_n) begin
    if ($time > 0 && $realtime - t_strobe_rise < 20) begin
      violations++;
      $display("CF model: CE hold violated at %0t", $time);
    end
  end
  always @(negedge oe_n or negedge we_n) begin
    if (ce1_n || $realtime - t_addr < 30) begin
      violations++;
      $display("CF model: address/CE setup violated at %0t", $time);
    end
    if (!oe_n && !we_n) begin
      violations++;
      $display("CF model: OE and WE both low at %0t", $time);
    end
  end

  // ---- reads
  wire word_acc = !ce2_n;
  wire is_data  = reg_n && (a[2:0] == 3'd0);

  always @(negedge oe_n) begin
    t_oe_fall = $realtime;
    data_ok   = 1'b0;
    wait_this = reg_n && is_data && word_acc && status[3] &&
                (word_idx % WAIT_EVERY == WAIT_EVERY - 1);
    if (wait_this) begin
      #35;
      if (!oe_n) begin
        wait_n = 1'b0;
        waits++;
        #(WAIT_NS);
        data_ok = 1'b1;
        wait_n  = 1'b1;
      end
    end else begin
      #(reg_n ? 125 : 150);
      // attribute memory also needs ta(A) = ta(CE) = 300 ns from the address
      // and from -CE
      if (!reg_n && $realtime - t_addr < 300) #(300 - ($realtime - t_addr));
      if (!reg_n && $realtime - t_ce_fall < 300) #(300 - ($realtime - t_ce_fall));
      if (!oe_n) data_ok = 1'b1;
    end
  end

  always_comb begin
    d_card = 16'hBAD0;
    if (!oe_n && !ce1_n && data_ok) begin
      if (!reg_n) d_card = a[0] ? 16'h0000 : {8'h00, CIS_BYTE(32'(a[10:1]))};
      else if (is_data) begin
        d_card = {img[cur_lba * 512 + word_idx * 2 + 1], img[cur_lba * 512 + word_idx * 2]};
        if (!word_acc) d_card[15:8] = 8'h00;
      end else if (a[2:0] == 3'd7) d_card = {8'h00, status};
      else d_card = {8'h00, tf[a[2:0]]};
    end
  end

  always @(posedge oe_n) begin
    t_strobe_rise = $realtime;
    t_oe_rise     = $realtime;
    if (!ce1_n && !reg_n) begin
      attr_reads++;
      if (!data_ok) begin
        violations++;
        $display("CF model: attribute read ended before its data was valid at %0t", $time);
      end
    end
    if (!ce1_n && reg_n && is_data && status[3]) begin
      if (!data_ok) violations++;
      data_words++;
      word_idx++;
      if (word_idx == 256) status = 8'h50;   // DRQ clear
    end
    data_ok = 1'b0;
  end

  // the card may drive the bus for tdis(OE) = 100 ns after -OE rises
  always @(posedge d_host_oe) begin
    if ($realtime - t_oe_rise < 100) begin
      violations++;
      $display("CF model: host drove the bus %0t after -OE rose", $realtime - t_oe_rise);
    end
  end

  // ---- writes
  always @(posedge we_n) begin
    t_strobe_rise = $realtime;
    if (!ce1_n && reg_n) begin
      if (!d_host_oe) begin
        violations++;
        $display("CF model: write without data at %0t", $time);
      end
      tf[a[2:0]] = d_host[7:0];
      if (a[2:0] == 3'd7 && d_host[7:0] == 8'h20) begin
        commands++;
        cur_lba  = {tf[6][3:0], tf[5], tf[4], tf[3]};
        word_idx = 0;
        status   = 8'h80;
        #(BUSY_NS);
        if (32'(cur_lba) >= NSECT) status = 8'h51;   // RDY | DSC | ERR
        else                       status = 8'h58;   // RDY | DSC | DRQ
      end
    end
  end

endmodule
