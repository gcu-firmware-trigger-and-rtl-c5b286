// tb_gcu_sync_ctrl: self-checking test of the GCU command and alignment
// controller. The testbench plays both the downstream decoder (it presents
// frames) and the upstream encoder (it accepts frames with a random ready).
// Checked: broadcast and addressed commands (frames for another GCU are
// ignored), the event counter reset and test pulse outputs, the TIME_REQ
// answer (12 TIME frames, most significant nibble first, carrying the local
// time at reception), the full two-step alignment exchange with the offset
// computed independently, validations passed only while the DAQ runs, the
// back-pressure ON/OFF frames with hysteresis, and host frames.
module tb_gcu_sync_ctrl;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  logic [13:0] my_addr = 14'd7;
  logic [TIME_W-1:0] local_time, t_diff, adj_offset, val_tag;
  logic dn_valid; dn_frame_t dn_frame;
  logic [10:0] l2_level, bp_hi = 11'd900, bp_lo = 11'd500;
  logic host_valid, host_ready; up_frame_t host_frame;
  logic up_valid, up_ready; up_frame_t up_frame;
  logic adj_valid, synced, daq_run, evt_cnt_rst, tp_now, val_valid, back_pressure;
  int checks = 0, failures = 0;

  gcu_sync_ctrl dut (.*);

  always #8 clk = ~clk;
  always_ff @(posedge clk) local_time <= rst ? TIME_W'(123456) : local_time + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(16 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // upstream sink
  up_frame_t got [$];
  logic [TIME_W-1:0] got_time [$];
  int n_evr = 0, n_tp = 0, n_val = 0;
  logic [TIME_W-1:0] last_tag, last_adj;
  always @(posedge clk) if (!rst) begin
    if (up_valid && up_ready) begin
      got.push_back(up_frame);
      got_time.push_back(local_time);
    end
    if (evt_cnt_rst) n_evr++;
    if (tp_now) n_tp++;
    if (val_valid) begin n_val++; last_tag = val_tag; end
    if (adj_valid) last_adj = adj_offset;
  end
  always @(negedge clk) up_ready <= ($urandom_range(0, 3) != 0);

  task automatic send_short(input logic [7:0] c);
    @(negedge clk);
    dn_valid = 1; dn_frame = '{is_long: 0, addr: 0, sub: 0, data: c};
    @(negedge clk);
    dn_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic send_long(input logic [13:0] a, input logic [7:0] sub, input logic [7:0] d);
    @(negedge clk);
    dn_valid = 1; dn_frame = '{is_long: 1, addr: a, sub: sub, data: d};
    @(negedge clk);
    dn_valid = 0;
  endtask

  task automatic send_time(input logic [13:0] a, input logic [7:0] sub0, input logic [TIME_W-1:0] t);
    for (int i = 0; i < TIME_BYTES; i++) send_long(a, sub0 + 8'(i), t[8*i +: 8]);
  endtask

  initial begin
    logic [TIME_W-1:0] t_rx, t1, t2, t3, t4, exp_off;
    longint sum;
    dn_valid = 0; dn_frame = '0; l2_level = 0; host_valid = 0; host_frame = '0;
    t_diff = TIME_W'(6);          // downstream 9 minus upstream 3
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(negedge clk);
    // commands
    check(!daq_run, "stopped after reset");
    send_short(DN_DAQ_START);
    check(daq_run, "broadcast DAQ start");
    send_long(14'd5, DN_SUB_CMD, DN_DAQ_STOP); repeat (2) @(negedge clk);
    check(daq_run, "command for another GCU ignored");
    send_long(14'd7, DN_SUB_CMD, DN_DAQ_STOP); repeat (2) @(negedge clk);
    check(!daq_run, "addressed DAQ stop");
    send_long(DN_ADDR_ALL, DN_SUB_CMD, DN_DAQ_START); repeat (2) @(negedge clk);
    check(daq_run, "broadcast-address DAQ start");
    send_short(DN_EVT_CNT_RST);
    send_short(DN_TEST_PULSE);
    check(n_evr == 1 && n_tp == 1, "event counter reset and test pulse");
    // validation
    send_time(14'd7, DN_SUB_TAG0, TIME_W'(48'h0123_4567_89AB));
    send_long(14'd7, DN_SUB_VALIDATE, 8'h00); repeat (2) @(negedge clk);
    check(n_val == 1 && last_tag == TIME_W'(48'h0123_4567_89AB), "validation with tag");
    // TIME_REQ
    @(negedge clk);
    dn_valid = 1; dn_frame = '{is_long: 0, addr: 0, sub: 0, data: DN_TIME_REQ};
    t_rx = local_time;
    @(negedge clk); dn_valid = 0;
    repeat (60) @(negedge clk);
    check(got.size() == TIME_NIBBLES, "12 TIME frames");
    for (int i = TIME_NIBBLES - 1; i >= 0; i--) begin
      up_frame_t f;
      f = (got.size() > 0) ? got.pop_front() : '0;
      void'(got_time.pop_front());
      check(f.cmd == UP_TIME && f.data == t_rx[4*i +: 4], "TIME nibble");
    end
    // alignment exchange: global time is 2000 ahead
    @(negedge clk);
    dn_valid = 1; dn_frame = '{is_long: 0, addr: 0, sub: 0, data: DN_SYNC};
    t2 = local_time;
    t1 = t2 + 2000 - 9;                 // sent 9 slots before reception
    @(negedge clk); dn_valid = 0;
    send_time(DN_ADDR_ALL, DN_SUB_T1_0, t1);
    send_long(DN_ADDR_ALL, DN_SUB_FOLLOW, 8'h00);
    repeat (10) @(negedge clk);
    check(got.size() == 1 && got[0].cmd == UP_DELAY_REQ, "DELAY_REQ sent");
    void'(got.pop_front());
    t3 = got_time.pop_front();
    t4 = t3 + 2000 + 3;                 // arrives 3 slots later
    send_time(14'd7, DN_SUB_T4_0, t4);
    check(!synced, "not synced before the delay response");
    send_long(14'd7, DN_SUB_DLY_RESP, 8'h00);
    repeat (2) @(negedge clk);
    sum = longint'($signed(t1 - t2)) + longint'($signed(t4 - t3)) + longint'($signed(t_diff));
    exp_off = TIME_W'(sum / 2);
    check(synced && last_adj == exp_off, "clock offset");
    check($signed(last_adj) == 2000, "offset equals the true 2000 ticks");
    // back pressure
    l2_level = 11'd950;
    repeat (20) @(negedge clk);
    check(back_pressure && got.size() == 1 && got[0].cmd == UP_BACK_PRS_ON, "BACK_PRS_ON");
    void'(got.pop_front()); void'(got_time.pop_front());
    l2_level = 11'd700;
    repeat (20) @(negedge clk);
    check(back_pressure && got.size() == 0, "hysteresis holds");
    l2_level = 11'd400;
    repeat (20) @(negedge clk);
    check(!back_pressure && got.size() == 1 && got[0].cmd == UP_BACK_PRS_OFF, "BACK_PRS_OFF");
    void'(got.pop_front()); void'(got_time.pop_front());
    // host frame
    @(negedge clk);
    host_valid = 1; host_frame = '{cmd: UP_TDB, data: 4'h9};
    do @(posedge clk); while (!host_ready);
    @(negedge clk); host_valid = 0;
    repeat (5) @(negedge clk);
    check(got.size() == 1 && got[0] == '{cmd: UP_TDB, data: 4'h9}, "host frame");
    // validations ignored while stopped
    send_short(DN_DAQ_STOP);
    send_long(14'd7, DN_SUB_VALIDATE, 8'h00); repeat (2) @(negedge clk);
    check(n_val == 1, "no validation while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
