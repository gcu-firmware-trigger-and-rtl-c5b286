// bec_sync_ctrl: BEC side of clock alignment and alignment monitoring.
//
// Drives the downstream frame stream of one BEC and reads the upstream
// command frames of its N_GCU links (GCU on link i has link address i).
//
// Clock alignment (two-step, IEEE 1588 style), started by start_sync:
//   broadcast SYNC; t1_g = global time when the frame is handed to the
//   encoder; then t1_g as 6 broadcast long frames and a FOLLOW commit.
// Each DELAY_REQ arriving on link i records t4_g[i] = global time and queues
// a delay response: t4_g[i] as 6 long frames addressed to GCU i, then a
// DLY_RESP commit. Responses are served lowest link first.
//
// Alignment check, started by start_time_req: broadcast TIME_REQ, then
// collect from every enabled link (port_en) the TIME_NIBBLES upstream TIME
// frames, most significant nibble first. When all have answered, or after
// TREQ_TIMEOUT cycles, check_done pulses and aligned[i] tells whether link i
// reported a time within one 16 ns tick of the lowest enabled link; a link
// that did not answer is not aligned. Software then stops the acquisition of
// a misaligned GCU with an addressed DAQ_STOP through the host frame port.
// A non-zero check_period also starts the check by itself every
// check_period cycles, so the BEC monitors its GCUs periodically.
// With auto_stop set, every enabled link found misaligned is then sent an
// addressed DAQ_STOP (long frame, command sub-address), lowest link first,
// so that it stops data taking and trigger requests until software has
// re-aligned and restarted it; stops_sent counts these frames.
// bcast_tp (a scheduled BEC test pulse) queues a broadcast TEST_PULSE.
// Back-pressure frames set and clear back_pressure[i].
//
// Downstream priority: TEST_PULSE, SYNC sequence, delay responses, TIME_REQ,
// automatic DAQ_STOPs, host frames.
// A multi-frame message is never interleaved with another. The procedures
// follow the document; the frame encoding, priorities and timeout are this
// design's choices.
module bec_sync_ctrl
  import gcu_tt_pkg::*;
#(
  parameter int unsigned N_GCU        = 48,
  parameter int unsigned TREQ_TIMEOUT = 4096
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [TIME_W-1:0] global_time,
  // upstream frames
  input  logic [N_GCU-1:0]  up_valid,
  input  up_frame_t         up_frame [N_GCU],
  // control
  input  logic              start_sync,
  input  logic              start_time_req,
  input  logic [N_GCU-1:0]  port_en,
  input  logic              auto_stop,
  input  logic [23:0]       check_period,
  input  logic              bcast_tp,
  input  logic              host_valid,
  input  dn_frame_t         host_frame,
  output logic              host_ready,
  // downstream encoder
  output logic              tx_valid,
  output dn_frame_t         tx_frame,
  input  logic              tx_ready,
  // status
  output logic [N_GCU-1:0]  back_pressure,
  output logic              check_done,
  output logic [N_GCU-1:0]  aligned,
  output logic [TIME_W-1:0] last_t1,
  output logic [15:0]       stops_sent
);
  localparam int unsigned PW = $clog2(N_GCU);

  typedef enum logic [3:0] {M_IDLE, M_SYNC, M_T1, M_FOLLOW, M_T4, M_RESP, M_TREQ, M_TP, M_STOP} msg_e;

  msg_e              st;
  logic [2:0]        k;
  logic              sync_pend, treq_pend, collecting;
  logic [N_GCU-1:0]  resp_pend;
  logic [N_GCU-1:0]  stop_pend;
  logic              tp_pend;
  logic [PW-1:0]     stop_port;
  logic              any_stop;
  logic [23:0]       per_cnt;
  logic [PW-1:0]     rport;
  logic [PW-1:0]     sel_port;
  logic              any_resp;
  logic [TIME_W-1:0] t4 [N_GCU];
  logic [TIME_W-1:0] ts [N_GCU];
  logic [4:0]        ncnt [N_GCU];
  logic [N_GCU-1:0]  done;
  logic [15:0]       tmo;
  logic [TIME_W-1:0] ref_ts;
  logic              ref_found;
  logic              hs;

  // lowest pending delay response
  always_comb begin
    any_resp = 1'b0;
    sel_port = '0;
    for (int i = N_GCU - 1; i >= 0; i--) begin
      if (resp_pend[i]) begin
        any_resp = 1'b1;
        sel_port = PW'(i);
      end
    end
  end

  // lowest pending automatic stop
  always_comb begin
    any_stop  = 1'b0;
    stop_port = '0;
    for (int i = N_GCU - 1; i >= 0; i--) begin
      if (stop_pend[i]) begin
        any_stop  = 1'b1;
        stop_port = PW'(i);
      end
    end
  end

  // reference time: lowest enabled link that answered
  always_comb begin
    ref_found = 1'b0;
    ref_ts    = '0;
    for (int i = N_GCU - 1; i >= 0; i--) begin
      if (port_en[i] && done[i]) begin
        ref_found = 1'b1;
        ref_ts    = ts[i];
      end
    end
  end

  // frame of the current message step
  always_comb begin
    tx_valid   = 1'b1;
    tx_frame   = '{is_long: 1'b1, addr: DN_ADDR_ALL, sub: 8'h00, data: 8'h00};
    host_ready = 1'b0;
    unique case (st)
      M_SYNC:   tx_frame = '{is_long: 1'b0, addr: 14'h0, sub: 8'h00, data: DN_SYNC};
      M_T1:     begin tx_frame.sub = DN_SUB_T1_0 + 8'(k); tx_frame.data = last_t1[8*k +: 8]; end
      M_FOLLOW: tx_frame.sub = DN_SUB_FOLLOW;
      M_T4:     begin
        tx_frame.addr = 14'(rport);
        tx_frame.sub  = DN_SUB_T4_0 + 8'(k);
        tx_frame.data = t4[rport][8*k +: 8];
      end
      M_RESP:   begin tx_frame.addr = 14'(rport); tx_frame.sub = DN_SUB_DLY_RESP; end
      M_TREQ:   tx_frame = '{is_long: 1'b0, addr: 14'h0, sub: 8'h00, data: DN_TIME_REQ};
      M_TP:     tx_frame = '{is_long: 1'b0, addr: 14'h0, sub: 8'h00, data: DN_TEST_PULSE};
      M_STOP:   begin tx_frame.addr = 14'(rport); tx_frame.sub = DN_SUB_CMD; tx_frame.data = DN_DAQ_STOP; end
      default: begin // M_IDLE: pass host frames when nothing is due
        tx_frame   = host_frame;
        tx_valid   = host_valid && !sync_pend && !any_resp && !treq_pend && !tp_pend && !any_stop;
        host_ready = tx_ready && tx_valid;
      end
    endcase
  end

  assign hs = tx_valid && tx_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      st            <= M_IDLE;
      k             <= '0;
      sync_pend     <= 1'b0;
      treq_pend     <= 1'b0;
      collecting    <= 1'b0;
      resp_pend     <= '0;
      stop_pend     <= '0;
      tp_pend       <= 1'b0;
      per_cnt       <= '0;
      stops_sent    <= '0;
      rport         <= '0;
      done          <= '0;
      tmo           <= '0;
      back_pressure <= '0;
      check_done    <= 1'b0;
      aligned       <= '0;
      last_t1       <= '0;
      for (int i = 0; i < N_GCU; i++) begin
        t4[i]   <= '0;
        ts[i]   <= '0;
        ncnt[i] <= '0;
      end
    end else begin
      check_done <= 1'b0;
      if (start_sync)     sync_pend <= 1'b1;
      if (start_time_req) treq_pend <= 1'b1;
      if (bcast_tp)       tp_pend   <= 1'b1;
      if (check_period == '0) per_cnt <= '0;
      else if (per_cnt >= check_period - 1'b1) begin
        per_cnt   <= '0;
        treq_pend <= 1'b1;
      end else per_cnt <= per_cnt + 1'b1;

      // upstream frames of every link
      for (int i = 0; i < N_GCU; i++) begin
        if (up_valid[i]) begin
          unique case (up_frame[i].cmd)
            UP_DELAY_REQ: begin
              t4[i]        <= global_time;
              resp_pend[i] <= 1'b1;
            end
            UP_BACK_PRS_ON:  back_pressure[i] <= 1'b1;
            UP_BACK_PRS_OFF: back_pressure[i] <= 1'b0;
            UP_TIME: if (collecting && !done[i]) begin
              ts[i]   <= {ts[i][TIME_W-5:0], up_frame[i].data};
              ncnt[i] <= ncnt[i] + 1'b1;
              if (ncnt[i] == 5'(TIME_NIBBLES - 1)) done[i] <= 1'b1;
            end
            default: ;
          endcase
        end
      end

      // alignment check
      if (collecting) begin
        tmo <= tmo + 1'b1;
        if (((port_en & ~done) == '0) || tmo == 16'(TREQ_TIMEOUT - 1)) begin
          collecting <= 1'b0;
          check_done <= 1'b1;
          for (int i = 0; i < N_GCU; i++) begin
            logic [TIME_W-1:0] d;
            logic              ok;
            d = ts[i] - ref_ts;
            ok = port_en[i] && done[i] && ref_found &&
                 (d == '0 || d == TIME_W'(1) || d == '1);
            aligned[i] <= ok;
            if (auto_stop && port_en[i] && !ok) stop_pend[i] <= 1'b1;
          end
        end
      end

      // message sequencer
      unique case (st)
        M_IDLE: begin
          k <= '0;
          if (tp_pend)        st <= M_TP;
          else if (sync_pend) st <= M_SYNC;
          else if (any_resp) begin
            st                  <= M_T4;
            rport               <= sel_port;
          end
          else if (treq_pend) st <= M_TREQ;
          else if (any_stop) begin
            st    <= M_STOP;
            rport <= stop_port;
          end
        end
        M_TP: if (hs) begin
          tp_pend <= 1'b0;
          st      <= M_IDLE;
        end
        M_STOP: if (hs) begin
          stop_pend[rport] <= 1'b0;
          stops_sent       <= stops_sent + 1'b1;
          st               <= M_IDLE;
        end
        M_SYNC: if (hs) begin
          last_t1   <= global_time;
          sync_pend <= 1'b0;
          st        <= M_T1;
        end
        M_T1: if (hs) begin
          k <= k + 1'b1;
          if (k == 3'(TIME_BYTES - 1)) st <= M_FOLLOW;
        end
        M_FOLLOW: if (hs) st <= M_IDLE;
        M_T4: if (hs) begin
          k <= k + 1'b1;
          if (k == 3'(TIME_BYTES - 1)) st <= M_RESP;
        end
        M_RESP: if (hs) begin
          resp_pend[rport] <= 1'b0;
          st               <= M_IDLE;
        end
        default: if (hs) begin // M_TREQ
          treq_pend  <= 1'b0;
          collecting <= 1'b1;
          tmo        <= '0;
          done       <= '0;
          for (int i = 0; i < N_GCU; i++) ncnt[i] <= '0;
          st <= M_IDLE;
        end
      endcase
    end
  end
endmodule
