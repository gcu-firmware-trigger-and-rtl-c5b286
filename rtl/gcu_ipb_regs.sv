// gcu_ipb_regs: IPbus slave of the GCU trigger and timing firmware.
//
// Slow control and data readout both go through IPbus. The slave answers one
// transaction per strobe: rdata and ack are registered and come one cycle
// after the strobe; the master drops the strobe after the ack. Word addresses
// (ipb.addr[5:0]):
//   0x00 R   identifier 0x6C0_7760
//   0x01 RW  control: [0] autotrigger mode, [1] downstream TDM swap,
//            [2] scheduled clock reset enable, [3] test pulse enable,
//            [4] ADC chip select (which of the two ADCs on the FMC is read)
//   0x02 RW  GCU link address [13:0]
//   0x03 RW  coarse delays: [5:0] downstream, [13:8] upstream (slots)
//   0x04 RW  readout windows: [7:0] normal (reset 90), [15:8] autotrigger (40)
//   0x05 RW  t_diff [31:0], sign extended to the time width
//   0x06/07 RW test pulse time, low 32 / high 16 bits
//   0x08/09 RW scheduled local clock reset time, low / high
//   0x0A RW  back-pressure thresholds: [10:0] on level, [26:16] off level
//   0x0B W   upstream host frame [7:0]; held until the encoder takes it
//   0x10 R   status: [0] synced, [1] DAQ running, [2] back pressure,
//            [3] host frame pending
//   0x11/12 R local time low / high (the high read returns the value latched
//            by the low read)
//   0x13 R   last clock offset correction, low 32 bits (0x19: high 16 bits)
//   0x14 R   L2 level in words      0x15 R event counter
//   0x16 R   drops: [15:0] late, [31:16] L2 full   0x17 R busy drops
//   0x18 R   complete events in L2 whose readout has not started, so that
//            software can pull events in bunches (e.g. 5 at a time)
//   0x20 R   L2 data: each read returns the next event word (pops the FIFO)
// Other addresses answer with err. The register set (test pulse time register
// in the configuration space, event readout by software pulls) follows the
// document; the map itself is this design's.
module gcu_ipb_regs
  import gcu_tt_pkg::*;
#(
  parameter int unsigned LVL_W = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  ipb_wbus_t         ipb_in,
  output ipb_rbus_t         ipb_out,
  // configuration
  output logic              auto_mode,
  output logic              adc_sel,
  output logic              dn_tdm_swap,
  output logic              sched_reset_en,
  output logic              tp_en,
  output logic [13:0]       my_addr,
  output logic [5:0]        dn_delay,
  output logic [5:0]        up_delay,
  output logic [7:0]        win_normal,
  output logic [7:0]        win_auto,
  output logic [TIME_W-1:0] t_diff,
  output logic [TIME_W-1:0] tp_time,
  output logic [TIME_W-1:0] t_reset,
  output logic [LVL_W-1:0]  bp_hi,
  output logic [LVL_W-1:0]  bp_lo,
  output logic              host_valid,
  output up_frame_t         host_frame,
  input  logic              host_ready,
  // status
  input  logic              synced,
  input  logic              daq_run,
  input  logic              back_pressure,
  input  logic [TIME_W-1:0] local_time,
  input  logic [TIME_W-1:0] last_offset,
  input  logic [LVL_W-1:0]  l2_level,
  input  logic [31:0]       event_cnt,
  input  logic [15:0]       late_drops,
  input  logic [15:0]       full_drops,
  input  logic [15:0]       busy_drops,
  // L2 readout
  input  logic              event_done,
  input  logic [31:0]       l2_data,
  output logic              l2_rd_en
);
  localparam logic [31:0] ID = 32'h6C07_760;

  logic              start;
  logic [15:0]       time_hi_q;
  logic [5:0]        a;
  logic [15:0]       ev_stored;
  logic [7:0]        words_left; // words still to pop of the event being read
  logic              ev_start;

  assign a        = ipb_in.addr[5:0];
  assign start    = ipb_in.strobe && !ipb_out.ack;
  assign l2_rd_en = start && !ipb_in.write && a == 6'h20 && ipb_in.addr[31:6] == '0;

  // Event bookkeeping: a pop with no words left of the current event takes
  // header word 0, whose window field gives the event length 4 + ceil(win/2).
  assign ev_start = l2_rd_en && l2_level != '0 && words_left == '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      ev_stored  <= '0;
      words_left <= '0;
    end else begin
      ev_stored <= ev_stored + 16'(event_done) - 16'(ev_start);
      if (ev_start)
        words_left <= 8'd3 + 8'((9'(l2_data[7:0]) + 9'd1) >> 1);
      else if (l2_rd_en && l2_level != '0)
        words_left <= words_left - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ipb_out        <= '0;
      auto_mode      <= 1'b0;
      adc_sel        <= 1'b0;
      dn_tdm_swap    <= 1'b0;
      sched_reset_en <= 1'b0;
      tp_en          <= 1'b0;
      my_addr        <= '0;
      dn_delay       <= '0;
      up_delay       <= '0;
      win_normal     <= 8'd90;
      win_auto       <= 8'd40;
      t_diff         <= '0;
      tp_time        <= '0;
      t_reset        <= '0;
      bp_hi          <= LVL_W'(900);
      bp_lo          <= LVL_W'(500);
      host_valid     <= 1'b0;
      host_frame     <= '{cmd: UP_IDLE, data: 4'h0};
      time_hi_q      <= '0;
    end else begin
      if (host_valid && host_ready) host_valid <= 1'b0;
      ipb_out.ack <= start;
      ipb_out.err <= 1'b0;
      if (start) begin
        ipb_out.rdata <= '0;
        if (ipb_in.addr[31:6] != '0) begin
          ipb_out.ack <= 1'b0;
          ipb_out.err <= 1'b1;
        end else if (ipb_in.write) begin
          unique case (a)
            6'h01: {adc_sel, tp_en, sched_reset_en, dn_tdm_swap, auto_mode} <= ipb_in.wdata[4:0];
            6'h02: my_addr <= ipb_in.wdata[13:0];
            6'h03: begin dn_delay <= ipb_in.wdata[5:0]; up_delay <= ipb_in.wdata[13:8]; end
            6'h04: begin win_normal <= ipb_in.wdata[7:0]; win_auto <= ipb_in.wdata[15:8]; end
            6'h05: t_diff <= TIME_W'($signed(ipb_in.wdata));
            6'h06: tp_time[31:0] <= ipb_in.wdata;
            6'h07: tp_time[TIME_W-1:32] <= ipb_in.wdata[TIME_W-33:0];
            6'h08: t_reset[31:0] <= ipb_in.wdata;
            6'h09: t_reset[TIME_W-1:32] <= ipb_in.wdata[TIME_W-33:0];
            6'h0A: begin bp_hi <= ipb_in.wdata[LVL_W-1:0]; bp_lo <= ipb_in.wdata[16 +: LVL_W]; end
            6'h0B: begin host_valid <= 1'b1; host_frame <= up_frame_t'(ipb_in.wdata[7:0]); end
            default: begin ipb_out.ack <= 1'b0; ipb_out.err <= 1'b1; end
          endcase
        end else begin
          unique case (a)
            6'h00: ipb_out.rdata <= ID;
            6'h01: ipb_out.rdata <= {27'b0, adc_sel, tp_en, sched_reset_en, dn_tdm_swap, auto_mode};
            6'h02: ipb_out.rdata <= 32'(my_addr);
            6'h03: ipb_out.rdata <= {18'b0, up_delay, 2'b0, dn_delay};
            6'h04: ipb_out.rdata <= {16'b0, win_auto, win_normal};
            6'h05: ipb_out.rdata <= t_diff[31:0];
            6'h06: ipb_out.rdata <= tp_time[31:0];
            6'h07: ipb_out.rdata <= 32'(tp_time[TIME_W-1:32]);
            6'h08: ipb_out.rdata <= t_reset[31:0];
            6'h09: ipb_out.rdata <= 32'(t_reset[TIME_W-1:32]);
            6'h0A: ipb_out.rdata <= {5'b0, bp_lo, 5'b0, bp_hi};
            6'h0B: ipb_out.rdata <= {24'b0, host_frame};
            6'h10: ipb_out.rdata <= {28'b0, host_valid, back_pressure, daq_run, synced};
            6'h11: begin
              ipb_out.rdata <= local_time[31:0];
              time_hi_q     <= local_time[TIME_W-1:32];
            end
            6'h12: ipb_out.rdata <= 32'(time_hi_q);
            6'h13: ipb_out.rdata <= last_offset[31:0];
            6'h14: ipb_out.rdata <= 32'(l2_level);
            6'h15: ipb_out.rdata <= event_cnt;
            6'h16: ipb_out.rdata <= {full_drops, late_drops};
            6'h17: ipb_out.rdata <= 32'(busy_drops);
            6'h18: ipb_out.rdata <= 32'(ev_stored);
            6'h19: ipb_out.rdata <= 32'(last_offset[TIME_W-1:32]);
            6'h20: ipb_out.rdata <= l2_data;
            default: begin ipb_out.ack <= 1'b0; ipb_out.err <= 1'b1; end
          endcase
        end
      end
    end
  end
endmodule
