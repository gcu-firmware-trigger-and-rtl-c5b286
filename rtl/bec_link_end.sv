// bec_link_end: the BEC end of the synchronous links to its GCUs.
//
// One BEC serves N_GCU = 48 GCUs. It holds one small upstream decoder per
// link (trigger request levels and command frames), a single TTC-like
// downstream encoder whose line is broadcast to all GCUs (every downstream
// channel has the same latency, so a broadcast reaches all GCUs in the same
// slot), the global time counter of this BEC (one tick per 16 ns slot) and
// the synchronisation controller (bec_sync_ctrl).
// Inputs up_sym[i] are the half-bit aligned Manchester symbols of link i,
// four per slot; dn_sym is the biphase-mark symbol word of the broadcast
// downstream line. trig_level[i] is the trigger request of GCU i, one cycle
// after its symbols. The global time is kept by a gcu_local_time instance
// (no offset correction): like the GCUs, the BEC can be programmed to reset
// it at a pre-programmed t_reset (bec_clock_reset pulses), and to broadcast
// a TEST_PULSE command when the global time reaches tp_time; software sets
// tp_time early by the downstream latency. In a full system the global time
// would also follow the upper-level timing system, which is not modelled.
// check_period (0 = off) repeats the alignment check periodically, and
// auto_stop lets the alignment check send DAQ_STOP to misaligned GCUs.
module bec_link_end
  import gcu_tt_pkg::*;
#(
  parameter int unsigned N_GCU = 48
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [3:0]        up_sym [N_GCU],
  input  logic [N_GCU-1:0]  up_tdm_swap,
  output logic [3:0]        dn_sym,
  input  logic              a_bit,
  // control
  input  logic              start_sync,
  input  logic              start_time_req,
  input  logic [N_GCU-1:0]  port_en,
  input  logic              auto_stop,
  input  logic [23:0]       check_period,
  input  logic              sched_reset_en,
  input  logic [TIME_W-1:0] t_reset,
  input  logic              tp_en,
  input  logic [TIME_W-1:0] tp_time,
  input  logic              host_valid,
  input  dn_frame_t         host_frame,
  output logic              host_ready,
  // status
  output logic [TIME_W-1:0] global_time,
  output logic [N_GCU-1:0]  trig_level,
  output logic [N_GCU-1:0]  up_frame_err,
  output logic [N_GCU-1:0]  up_sym_err,
  output logic [N_GCU-1:0]  back_pressure,
  output logic              check_done,
  output logic [N_GCU-1:0]  aligned,
  output logic [TIME_W-1:0] last_t1,
  output logic [15:0]       stops_sent,
  output logic              clock_reset
);
  logic [N_GCU-1:0] up_valid;
  up_frame_t        up_frame [N_GCU];
  logic             tx_valid, tx_ready;
  dn_frame_t        tx_frame;
  logic             tp_due;

  gcu_local_time u_time (
    .clk, .rst,
    .adj_valid (1'b0),
    .adj_offset('0),
    .sched_reset_en, .t_reset, .tp_en, .tp_time,
    .tp_now    (1'b0),
    .local_time(global_time),
    .clock_reset,
    .test_pulse(tp_due)
  );

  for (genvar i = 0; i < N_GCU; i++) begin : g_rx
    up_link_rx u_rx (
      .clk, .rst,
      .tdm_swap    (up_tdm_swap[i]),
      .line_sym    (up_sym[i]),
      .trig_level  (trig_level[i]),
      .frame_valid (up_valid[i]),
      .frame       (up_frame[i]),
      .frame_err   (up_frame_err[i]),
      .sym_err     (up_sym_err[i])
    );
  end

  bec_sync_ctrl #(.N_GCU(N_GCU)) u_sync (
    .clk, .rst, .global_time,
    .up_valid, .up_frame,
    .start_sync, .start_time_req, .port_en, .auto_stop, .check_period,
    .bcast_tp (tp_due),
    .host_valid, .host_frame, .host_ready,
    .tx_valid, .tx_frame, .tx_ready,
    .back_pressure, .check_done, .aligned, .last_t1, .stops_sent
  );

  ttc_tx u_tx (
    .clk, .rst, .a_bit,
    .frame_valid (tx_valid),
    .frame       (tx_frame),
    .frame_ready (tx_ready),
    .line_sym    (dn_sym)
  );
endmodule
