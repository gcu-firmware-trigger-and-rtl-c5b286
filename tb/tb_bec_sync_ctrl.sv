// tb_bec_sync_ctrl: self-checking test of the BEC synchronisation controller
// with 4 links. The testbench accepts downstream frames with a random ready
// and plays the GCUs by presenting upstream frames. Checked: the SYNC frame,
// then t1_g (global time at the SYNC handshake) in 6 broadcast bytes and the
// FOLLOW commit; delay responses to two simultaneous DELAY_REQs, lowest link
// first, each carrying the global time at which its request arrived; the
// TIME_REQ broadcast and the alignment verdict for links within and beyond
// one tick; the verdict after a timeout when a link does not answer;
// per-link back pressure; host frames; a broadcast TEST_PULSE on bcast_tp;
// with auto_stop, an addressed DAQ_STOP to the one misaligned link only;
// periodic TIME_REQs with check_period.
module tb_bec_sync_ctrl;
  import gcu_tt_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [TIME_W-1:0] global_time, last_t1;
  logic [N-1:0] up_valid, port_en, back_pressure, aligned;
  up_frame_t up_frame [N];
  logic start_sync, start_time_req, host_valid, host_ready, tx_valid, tx_ready, check_done;
  dn_frame_t host_frame, tx_frame;
  logic auto_stop, bcast_tp;
  logic [23:0] check_period;
  logic [15:0] stops_sent;
  int checks = 0, failures = 0;

  bec_sync_ctrl #(.N_GCU(N), .TREQ_TIMEOUT(300)) dut (.*);

  always #8 clk = ~clk;
  always_ff @(posedge clk) global_time <= rst ? TIME_W'(777) : global_time + 1'b1;

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

  dn_frame_t got [$];
  logic [TIME_W-1:0] got_t [$];
  int n_done = 0;
  always @(posedge clk) if (!rst) begin
    if (tx_valid && tx_ready) begin got.push_back(tx_frame); got_t.push_back(global_time); end
    if (check_done) n_done++;
  end
  always @(negedge clk) tx_ready <= ($urandom_range(0, 2) != 0);

  task automatic up(input int p, input up_cmd_e c, input logic [3:0] d);
    @(negedge clk);
    up_valid[p] = 1; up_frame[p] = '{cmd: c, data: d};
    @(negedge clk);
    up_valid[p] = 0;
  endtask

  task automatic expect_time(input logic [13:0] a, input logic [7:0] sub0, input logic [TIME_W-1:0] t, input string what);
    for (int i = 0; i < TIME_BYTES; i++) begin
      dn_frame_t f;
      f = (got.size() > 0) ? got.pop_front() : '0;
      void'(got_t.pop_front());
      check(f.is_long && f.addr == a && f.sub == sub0 + 8'(i) && f.data == t[8*i +: 8], what);
    end
  endtask

  task automatic send_ts(input int p, input logic [TIME_W-1:0] t);
    for (int i = TIME_NIBBLES - 1; i >= 0; i--) up(p, UP_TIME, t[4*i +: 4]);
  endtask

  initial begin
    dn_frame_t f;
    logic [TIME_W-1:0] t1, t4a, t4b, x;
    up_valid = '0; foreach (up_frame[i]) up_frame[i] = '0;
    start_sync = 0; start_time_req = 0; port_en = 4'b0111; host_valid = 0; host_frame = '0;
    auto_stop = 0; bcast_tp = 0; check_period = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // synchronisation broadcast
    @(negedge clk); start_sync = 1; @(negedge clk); start_sync = 0;
    repeat (40) @(negedge clk);
    check(got.size() == 8, "SYNC + 6 bytes + FOLLOW");
    f = got.pop_front(); t1 = got_t.pop_front();
    check(!f.is_long && f.data == DN_SYNC, "SYNC frame");
    check(last_t1 == t1, "t1 is the time of the SYNC handshake");
    expect_time(DN_ADDR_ALL, DN_SUB_T1_0, t1, "t1 bytes");
    f = got.pop_front(); void'(got_t.pop_front());
    check(f.is_long && f.addr == DN_ADDR_ALL && f.sub == DN_SUB_FOLLOW, "FOLLOW commit");
    // two delay requests in the same cycle
    @(negedge clk);
    up_valid = 4'b0110;
    up_frame[1] = '{cmd: UP_DELAY_REQ, data: 0};
    up_frame[2] = '{cmd: UP_DELAY_REQ, data: 0};
    t4a = global_time;
    @(negedge clk); up_valid = 0;
    repeat (40) @(negedge clk);
    check(got.size() == 14, "two delay responses");
    expect_time(14'd1, DN_SUB_T4_0, t4a, "t4 bytes link 1");
    f = got.pop_front(); void'(got_t.pop_front());
    check(f.addr == 14'd1 && f.sub == DN_SUB_DLY_RESP, "DLY_RESP link 1");
    expect_time(14'd2, DN_SUB_T4_0, t4a, "t4 bytes link 2");
    f = got.pop_front(); void'(got_t.pop_front());
    check(f.addr == 14'd2 && f.sub == DN_SUB_DLY_RESP, "DLY_RESP link 2");
    // alignment check
    @(negedge clk); start_time_req = 1; @(negedge clk); start_time_req = 0;
    repeat (5) @(negedge clk);
    f = got.pop_front(); void'(got_t.pop_front());
    check(!f.is_long && f.data == DN_TIME_REQ, "TIME_REQ broadcast");
    x = 48'h0000_1234_5678;
    send_ts(2, x + 5);
    send_ts(0, x);
    check(n_done == 0, "verdict waits for all links");
    send_ts(1, x + 1);
    repeat (3) @(negedge clk);
    check(n_done == 1 && aligned == 4'b0011, "link 2 misaligned, 3 disabled");
    // timeout: link 1 does not answer
    @(negedge clk); start_time_req = 1; @(negedge clk); start_time_req = 0;
    repeat (5) @(negedge clk);
    send_ts(0, x); send_ts(2, x - 1);
    repeat (400) @(negedge clk);
    check(n_done == 2 && aligned == 4'b0101, "timeout verdict");
    got.delete(); got_t.delete();
    // back pressure
    up(3, UP_BACK_PRS_ON, 0); up(1, UP_BACK_PRS_ON, 0);
    check(back_pressure == 4'b1010, "back pressure on");
    up(3, UP_BACK_PRS_OFF, 0);
    check(back_pressure == 4'b0010, "back pressure off");
    // host frame
    @(negedge clk);
    host_valid = 1; host_frame = '{is_long: 1, addr: 14'd3, sub: DN_SUB_CMD, data: DN_DAQ_STOP};
    do @(posedge clk); while (!host_ready);
    @(negedge clk); host_valid = 0;
    check(got.size() == 1 && got[0] == '{is_long: 1, addr: 14'd3, sub: DN_SUB_CMD, data: DN_DAQ_STOP}, "host frame");
    check(stops_sent == 0, "no automatic stop while auto_stop is off");
    // scheduled test pulse broadcast
    got.delete(); got_t.delete();
    @(negedge clk); bcast_tp = 1; @(negedge clk); bcast_tp = 0;
    repeat (10) @(negedge clk);
    check(got.size() == 1 && !got[0].is_long && got[0].data == DN_TEST_PULSE, "TEST_PULSE broadcast");
    // alignment check with automatic stop of the misaligned link
    got.delete(); got_t.delete();
    auto_stop = 1;
    @(negedge clk); start_time_req = 1; @(negedge clk); start_time_req = 0;
    repeat (5) @(negedge clk);
    send_ts(0, x + 100); send_ts(1, x + 99); send_ts(2, x + 109);
    repeat (20) @(negedge clk);
    check(n_done == 3 && aligned == 4'b0011, "verdict with auto stop");
    check(got.size() == 2, "TIME_REQ and one DAQ_STOP");
    if (got.size() == 2)
      check(got[1] == '{is_long: 1, addr: 14'd2, sub: DN_SUB_CMD, data: DN_DAQ_STOP}, "DAQ_STOP addressed to link 2");
    check(stops_sent == 1, "stop counter");
    // periodic alignment check: TIME_REQ every 150 cycles
    auto_stop = 0; got.delete(); got_t.delete();
    @(negedge clk); check_period = 24'd150;
    repeat (460) @(negedge clk);
    check_period = '0;
    check(got.size() == 3, "three periodic TIME_REQs in 460 cycles");
    if (got.size() == 3) begin
      check(got[0].data == DN_TIME_REQ && got[2].data == DN_TIME_REQ, "periodic frames are TIME_REQ");
      // the encoder's ready is random here: allow a few cycles of jitter
      check(got_t[1] - got_t[0] >= 146 && got_t[1] - got_t[0] <= 154 &&
            got_t[2] - got_t[1] >= 146 && got_t[2] - got_t[1] <= 154, "period 150 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
