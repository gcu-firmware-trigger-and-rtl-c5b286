// gcu_tt_system: one GCU wired to its BEC link end, plus the remote JTAG cable.
//
// gcu_tt_top (the GCU firmware) has its upstream line connected to link 0 of
// bec_link_end and receives the BEC's broadcast downstream line. The other
// N_GCU-1 upstream links of the BEC, and the downstream line itself, are
// brought out as ports for the remaining GCUs. Link and cable delays are
// zero here; the coarse delays inside the GCU add whatever is programmed.
// ipb_jtag_tap is the IPbus JTAG cable of the board-control FPGA; it shares
// nothing with the rest except clock and reset and has its own ports. The
// whole system runs on one 62.5 MHz slot clock. The BEC-side scheduling
// inputs (auto_stop, check_period, bec_t_reset, bec_tp_time and their
// enables) are brought out as ports.
module gcu_tt_system
  import gcu_tt_pkg::*;
#(
  parameter int unsigned N_GCU    = 48,
  parameter int unsigned WORD_W   = 256,
  parameter int unsigned L1_DEPTH = 1250,
  parameter int unsigned L2_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst,
  // GCU side
  input  logic [WORD_W-1:0] adc_data [2],
  input  logic              trig_req,
  input  ipb_wbus_t         gcu_ipb_in,
  output ipb_rbus_t         gcu_ipb_out,
  output logic              test_pulse,
  output logic              clock_reset,
  output logic              event_done,
  output logic              l2_not_empty,
  output logic [TIME_W-1:0] local_time,
  output logic              dn_frame_err,
  output logic              dn_code_err,
  output logic              ttc_a,
  // BEC side
  input  logic [3:0]        other_up_sym [1:N_GCU-1],
  input  logic [N_GCU-1:0]  up_tdm_swap,
  output logic [3:0]        dn_sym,
  input  logic              a_bit,
  input  logic              start_sync,
  input  logic              start_time_req,
  input  logic [N_GCU-1:0]  port_en,
  input  logic              auto_stop,
  input  logic [23:0]       check_period,
  input  logic              bec_sched_reset_en,
  input  logic [TIME_W-1:0] bec_t_reset,
  input  logic              bec_tp_en,
  input  logic [TIME_W-1:0] bec_tp_time,
  input  logic              bec_host_valid,
  input  dn_frame_t         bec_host_frame,
  output logic              bec_host_ready,
  output logic [TIME_W-1:0] global_time,
  output logic [N_GCU-1:0]  bec_trig_level,
  output logic [N_GCU-1:0]  up_frame_err,
  output logic [N_GCU-1:0]  up_sym_err,
  output logic [N_GCU-1:0]  back_pressure,
  output logic              check_done,
  output logic [N_GCU-1:0]  aligned,
  output logic [TIME_W-1:0] last_t1,
  output logic [15:0]       stops_sent,
  output logic              bec_clock_reset,
  // JTAG cable
  input  ipb_wbus_t         jtag_ipb_in,
  output ipb_rbus_t         jtag_ipb_out,
  output logic              tck,
  output logic              tms,
  output logic              tdi,
  input  logic              tdo
);
  logic [3:0] up_sym [N_GCU];

  gcu_tt_top #(.WORD_W(WORD_W), .L1_DEPTH(L1_DEPTH), .L2_DEPTH(L2_DEPTH)) u_gcu (
    .clk, .rst, .adc_data, .trig_req,
    .dn_sym, .up_sym(up_sym[0]),
    .ipb_in(gcu_ipb_in), .ipb_out(gcu_ipb_out),
    .test_pulse, .clock_reset, .event_done, .l2_not_empty,
    .ttc_a, .local_time, .dn_frame_err, .dn_code_err);

  for (genvar i = 1; i < N_GCU; i++) begin : g_up
    assign up_sym[i] = other_up_sym[i];
  end

  bec_link_end #(.N_GCU(N_GCU)) u_bec (
    .clk, .rst, .up_sym, .up_tdm_swap, .dn_sym, .a_bit,
    .start_sync, .start_time_req, .port_en, .auto_stop, .check_period,
    .sched_reset_en(bec_sched_reset_en), .t_reset(bec_t_reset),
    .tp_en(bec_tp_en), .tp_time(bec_tp_time),
    .host_valid(bec_host_valid), .host_frame(bec_host_frame), .host_ready(bec_host_ready),
    .global_time, .trig_level(bec_trig_level), .up_frame_err, .up_sym_err,
    .back_pressure, .check_done, .aligned, .last_t1, .stops_sent,
    .clock_reset(bec_clock_reset));

  ipb_jtag_tap u_jtag (
    .clk, .rst, .ipb_in(jtag_ipb_in), .ipb_out(jtag_ipb_out),
    .tck, .tms, .tdi, .tdo);
endmodule
