// gcu_sync_ctrl: command and clock-alignment controller of the GCU.
//
// Executes the frames decoded from the downstream link and builds the stream
// of upstream command frames.
//
// Downstream: short frames are broadcast commands; long frames are accepted
// when their address is this GCU's (my_addr) or the broadcast address. Long
// frames either carry an individually addressed command (sub-address
// DN_SUB_CMD) or write one byte of a timestamp register (validation tag, t1_g,
// t4_g) followed by a commit sub-address. Commands: TIME_REQ, event counter
// reset, DAQ start/stop, immediate test pulse, SYNC.
//
// Clock alignment (IEEE 1588 style, two-step):
//   SYNC (broadcast)           -> record t2_l = local time at reception
//   t1_g bytes + FOLLOW commit -> queue a DELAY_REQ upstream
//   DELAY_REQ accepted by tx   -> record t3_l
//   t4_g bytes + DLY_RESP      -> offset = ((t1_g-t2_l) + (t4_g-t3_l) + t_diff)/2
// where t_diff = downstream delay - upstream delay is a known constant set by
// software. The offset (global minus local time) is handed to gcu_local_time
// on adj_valid, and synced is set. Data taking continues throughout.
//
// TIME_REQ: the local time at reception is sent upstream as TIME_NIBBLES
// frames UP_TIME with 4 bits each, most significant nibble first.
//
// Back pressure: BACK_PRS_ON is sent when the L2 cache level reaches bp_hi,
// BACK_PRS_OFF when it falls to bp_lo.
//
// Upstream priority: DELAY_REQ, back pressure, TIME nibbles, host frames.
// Trigger validations (val_valid, val_tag) are passed on only while the DAQ
// runs. All outputs are registered pulses or levels; every frame is handled
// in the cycle it arrives. The procedures follow the document; the message
// encoding, priorities, nibble order and the hysteresis are this design's.
module gcu_sync_ctrl
  import gcu_tt_pkg::*;
#(
  parameter int unsigned LVL_W = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [13:0]       my_addr,
  input  logic [TIME_W-1:0] local_time,
  input  logic [TIME_W-1:0] t_diff,
  // downstream frames
  input  logic              dn_valid,
  input  dn_frame_t         dn_frame,
  // L2 cache fill level and back-pressure thresholds
  input  logic [LVL_W-1:0]  l2_level,
  input  logic [LVL_W-1:0]  bp_hi,
  input  logic [LVL_W-1:0]  bp_lo,
  // host (slow control) upstream frames
  input  logic              host_valid,
  input  up_frame_t         host_frame,
  output logic              host_ready,
  // to the upstream encoder
  output logic              up_valid,
  output up_frame_t         up_frame,
  input  logic              up_ready,
  // results
  output logic              adj_valid,
  output logic [TIME_W-1:0] adj_offset,
  output logic              synced,
  output logic              daq_run,
  output logic              evt_cnt_rst,
  output logic              tp_now,
  output logic              val_valid,
  output logic [TIME_W-1:0] val_tag,
  output logic              back_pressure
);
  typedef enum logic [1:0] {PTP_IDLE, PTP_GOT_SYNC, PTP_REQ, PTP_WAIT_RESP} ptp_e;

  ptp_e              ptp_st;
  logic [TIME_W-1:0] t1, t2, t3, t4, tag;
  logic [TIME_W-1:0] rx_time;
  logic [4:0]        nib_left;
  logic              bp_want;
  logic              for_me;
  logic              cmd_valid;
  logic [7:0]        cmd;
  logic [1:0]        up_src;     // 0 delay req, 1 back pressure, 2 time, 3 host
  logic [TIME_W-1:0] sum;

  assign for_me    = dn_frame.is_long && (dn_frame.addr == my_addr || dn_frame.addr == DN_ADDR_ALL);
  assign cmd_valid = dn_valid && (!dn_frame.is_long || (for_me && dn_frame.sub == DN_SUB_CMD));
  assign cmd       = dn_frame.data;

  // Back-pressure hysteresis
  always_comb begin
    if (l2_level >= bp_hi)      bp_want = 1'b1;
    else if (l2_level <= bp_lo) bp_want = 1'b0;
    else                        bp_want = back_pressure;
  end

  // Upstream source selection
  always_comb begin
    up_valid = 1'b1;
    up_src   = 2'd3;
    up_frame = host_frame;
    if (ptp_st == PTP_REQ) begin
      up_src   = 2'd0;
      up_frame = '{cmd: UP_DELAY_REQ, data: 4'h0};
    end else if (bp_want != back_pressure) begin
      up_src   = 2'd1;
      up_frame = '{cmd: (bp_want ? UP_BACK_PRS_ON : UP_BACK_PRS_OFF), data: 4'h0};
    end else if (nib_left != '0) begin
      up_src   = 2'd2;
      up_frame = '{cmd: UP_TIME, data: rx_time[4*(nib_left-5'd1) +: 4]};
    end else begin
      up_valid = host_valid;
    end
  end
  assign host_ready = up_ready && up_src == 2'd3;

  assign sum = (t1 - t2) + (t4 - t3) + t_diff;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptp_st        <= PTP_IDLE;
      t1            <= '0;
      t2            <= '0;
      t3            <= '0;
      t4            <= '0;
      tag           <= '0;
      rx_time       <= '0;
      nib_left      <= '0;
      adj_valid     <= 1'b0;
      adj_offset    <= '0;
      synced        <= 1'b0;
      daq_run       <= 1'b0;
      evt_cnt_rst   <= 1'b0;
      tp_now        <= 1'b0;
      val_valid     <= 1'b0;
      val_tag       <= '0;
      back_pressure <= 1'b0;
    end else begin
      adj_valid   <= 1'b0;
      evt_cnt_rst <= 1'b0;
      tp_now      <= 1'b0;
      val_valid   <= 1'b0;

      // upstream handshakes
      if (up_valid && up_ready) begin
        unique case (up_src)
          2'd0: begin t3 <= local_time; ptp_st <= PTP_WAIT_RESP; end
          2'd1: back_pressure <= bp_want;
          2'd2: nib_left <= nib_left - 1'b1;
          default: ;
        endcase
      end

      // broadcast or addressed commands
      if (cmd_valid) begin
        unique case (cmd)
          DN_TIME_REQ: begin
            rx_time  <= local_time;
            nib_left <= 5'(TIME_NIBBLES);
          end
          DN_EVT_CNT_RST: evt_cnt_rst <= 1'b1;
          DN_DAQ_START:   daq_run     <= 1'b1;
          DN_DAQ_STOP:    daq_run     <= 1'b0;
          DN_TEST_PULSE:  tp_now      <= 1'b1;
          DN_SYNC: begin
            t2     <= local_time;
            ptp_st <= PTP_GOT_SYNC;
          end
          default: ;
        endcase
      end

      // register writes and commits
      if (dn_valid && for_me) begin
        for (int i = 0; i < TIME_BYTES; i++) begin
          if (dn_frame.sub == DN_SUB_TAG0 + 8'(i)) tag[8*i +: 8] <= dn_frame.data;
          if (dn_frame.sub == DN_SUB_T1_0 + 8'(i)) t1[8*i +: 8]  <= dn_frame.data;
          if (dn_frame.sub == DN_SUB_T4_0 + 8'(i)) t4[8*i +: 8]  <= dn_frame.data;
        end
        if (dn_frame.sub == DN_SUB_VALIDATE && daq_run) begin
          val_valid <= 1'b1;
          val_tag   <= tag;
        end
        if (dn_frame.sub == DN_SUB_FOLLOW && ptp_st == PTP_GOT_SYNC)
          ptp_st <= PTP_REQ;
        if (dn_frame.sub == DN_SUB_DLY_RESP && ptp_st == PTP_WAIT_RESP) begin
          adj_valid  <= 1'b1;
          adj_offset <= {sum[TIME_W-1], sum[TIME_W-1:1]};
          synced     <= 1'b1;
          ptp_st     <= PTP_IDLE;
        end
      end
    end
  end
endmodule
