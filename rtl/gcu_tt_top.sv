// gcu_tt_top: trigger, timing and readout firmware of one GCU.
//
// Downstream: line symbols from the BEC pass a programmable coarse delay and
// the TTC-like decoder; gcu_sync_ctrl executes the frames (commands, trigger
// validations, clock-alignment messages) and gcu_local_time keeps the GCU's
// copy of the global time, with the scheduled clock reset and test pulse.
// Upstream: the trigger request level (trig_req, gated by the DAQ run state)
// and command frames from gcu_sync_ctrl are encoded by up_link_tx and leave
// through a second coarse delay.
// Data: the FMC brings two ADC chips (2 x 16 Gbit/s); register 0x01 bit 4
// selects one, and its 256-bit word per 16 ns slot (16 samples of 16 bits)
// enters the L1 ring buffer; validated windows are
// copied with a header into the L2 event FIFO, read by software through the
// IPbus register slave, which also holds the configuration.
// All logic runs on one clock, the 62.5 MHz slot clock; line symbols are four
// per cycle for an external 250 Mbaud serializer/deserializer. The ADC
// interface, the IPbus transport (Ethernet/UDP) and DDR3 are outside.
module gcu_tt_top
  import gcu_tt_pkg::*;
#(
  parameter int unsigned WORD_W   = 256,
  parameter int unsigned L1_DEPTH = 1250,
  parameter int unsigned L2_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst,
  // ADC data and local trigger request
  input  logic [WORD_W-1:0] adc_data [2],
  input  logic              trig_req,
  // links
  input  logic [3:0]        dn_sym,
  output logic [3:0]        up_sym,
  // IPbus
  input  ipb_wbus_t         ipb_in,
  output ipb_rbus_t         ipb_out,
  // timing outputs
  output logic              test_pulse,
  output logic              clock_reset,
  output logic              event_done,
  output logic              l2_not_empty,
  output logic              ttc_a,
  output logic [TIME_W-1:0] local_time,
  output logic              dn_frame_err,
  output logic              dn_code_err
);
  localparam int unsigned LVL_W = $clog2(L2_DEPTH + 1);

  // configuration
  logic              auto_mode, adc_sel, dn_tdm_swap, sched_reset_en, tp_en;
  logic [13:0]       my_addr;
  logic [5:0]        dn_delay, up_delay;
  logic [7:0]        win_normal, win_auto;
  logic [TIME_W-1:0] t_diff, tp_time, t_reset;
  logic [LVL_W-1:0]  bp_hi, bp_lo;
  logic              host_valid, host_ready;
  up_frame_t         host_frame;
  // links
  logic [3:0]        dn_sym_d, up_sym_raw;
  logic              dn_valid;
  dn_frame_t         dn_frame;
  logic              up_valid, up_ready;
  up_frame_t         up_frame;
  // timing
  logic              adj_valid, synced, daq_run, evt_cnt_rst, tp_now;
  logic [TIME_W-1:0] adj_offset, last_offset;
  logic              val_valid, back_pressure;
  logic [TIME_W-1:0] val_tag;
  // buffers
  logic [$clog2(L1_DEPTH)-1:0] l1_wr_ptr, l1_rd_addr;
  logic [WORD_W-1:0] l1_rd_data;
  logic              l2_wr_en, l2_rd_en, l2_empty;
  logic [31:0]       l2_wr_data, l2_rd_data;
  logic [LVL_W-1:0]  l2_level;
  logic [31:0]       event_cnt;
  logic [15:0]       late_drops, full_drops, busy_drops;

  coarse_delay #(.W(4), .MAX_DELAY(64)) u_dn_dly (
    .clk, .rst, .delay(dn_delay), .din(dn_sym), .dout(dn_sym_d));

  ttc_rx u_ttc_rx (
    .clk, .rst, .tdm_swap(dn_tdm_swap), .line_sym(dn_sym_d),
    .a_bit(ttc_a), .frame_valid(dn_valid), .frame(dn_frame),
    .frame_err(dn_frame_err), .code_err(dn_code_err));

  gcu_sync_ctrl #(.LVL_W(LVL_W)) u_sync (
    .clk, .rst, .my_addr, .local_time, .t_diff,
    .dn_valid, .dn_frame, .l2_level, .bp_hi, .bp_lo,
    .host_valid, .host_frame, .host_ready,
    .up_valid, .up_frame, .up_ready,
    .adj_valid, .adj_offset, .synced, .daq_run, .evt_cnt_rst, .tp_now,
    .val_valid, .val_tag, .back_pressure);

  always_ff @(posedge clk) begin
    if (rst)            last_offset <= '0;
    else if (adj_valid) last_offset <= adj_offset;
  end

  gcu_local_time u_time (
    .clk, .rst, .adj_valid, .adj_offset, .sched_reset_en, .t_reset,
    .tp_en, .tp_time, .tp_now, .local_time, .clock_reset, .test_pulse);

  up_link_tx u_up_tx (
    .clk, .rst, .trig_level(trig_req && daq_run),
    .frame_valid(up_valid), .frame(up_frame), .frame_ready(up_ready),
    .line_sym(up_sym_raw));

  coarse_delay #(.W(4), .MAX_DELAY(64)) u_up_dly (
    .clk, .rst, .delay(up_delay), .din(up_sym_raw), .dout(up_sym));

  l1_ring_buffer #(.WORD_W(WORD_W), .DEPTH(L1_DEPTH)) u_l1 (
    .clk, .rst, .wr_data(adc_data[adc_sel]), .wr_ptr(l1_wr_ptr),
    .rd_addr(l1_rd_addr), .rd_data(l1_rd_data));

  event_builder #(.WORD_W(WORD_W), .L1_DEPTH(L1_DEPTH), .LVL_W(LVL_W), .L2_DEPTH(L2_DEPTH)) u_evb (
    .clk, .rst, .local_time, .run(daq_run), .auto_mode, .win_normal, .win_auto,
    .val_valid, .val_tag, .trig_req, .evt_cnt_rst,
    .l1_wr_ptr, .l1_rd_addr, .l1_rd_data,
    .l2_level, .l2_wr_en, .l2_wr_data,
    .event_done, .event_cnt, .late_drops, .full_drops, .busy_drops);

  assign l2_not_empty = !l2_empty;

  l2_event_fifo #(.DATA_W(32), .DEPTH(L2_DEPTH)) u_l2 (
    .clk, .rst, .wr_en(l2_wr_en), .wr_data(l2_wr_data),
    .rd_en(l2_rd_en), .rd_data(l2_rd_data), .empty(l2_empty), .level(l2_level));

  gcu_ipb_regs #(.LVL_W(LVL_W)) u_regs (
    .clk, .rst, .ipb_in, .ipb_out,
    .auto_mode, .adc_sel, .dn_tdm_swap, .sched_reset_en, .tp_en, .my_addr,
    .dn_delay, .up_delay, .win_normal, .win_auto, .t_diff, .tp_time, .t_reset,
    .bp_hi, .bp_lo, .host_valid, .host_frame, .host_ready,
    .synced, .daq_run, .back_pressure, .local_time, .last_offset,
    .l2_level, .event_cnt, .late_drops, .full_drops, .busy_drops,
    .event_done, .l2_data(l2_rd_data), .l2_rd_en);
endmodule
