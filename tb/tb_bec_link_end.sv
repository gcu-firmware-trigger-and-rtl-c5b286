// tb_bec_link_end: self-checking test of the BEC link end with all 48 links.
// The testbench Manchester codes the upstream lines of its own (random
// trigger levels on every link, command frames on some) and decodes the
// broadcast biphase-mark downstream line with its own parser. Checked: the
// 48 trigger levels one cycle after their symbols, back pressure from link 17,
// the SYNC broadcast and its 8-frame sequence, the delay response addressed
// to link 5 carrying the global time at which its DELAY_REQ arrived, and
// an alignment check over links 0, 1 and 2 where link 2 is 3 ticks off,
// followed (auto_stop) by a DAQ_STOP addressed to link 2; a TEST_PULSE
// broadcast at a programmed global time; a scheduled global time reset.
module tb_bec_link_end;
  import gcu_tt_pkg::*;
  localparam int N = 48;
  logic clk = 0, rst = 1;
  logic [3:0] up_sym [N];
  logic [N-1:0] up_tdm_swap, port_en, trig_level, up_frame_err, up_sym_err, back_pressure, aligned;
  logic [3:0] dn_sym;
  logic a_bit, start_sync, start_time_req, host_valid, host_ready, check_done;
  dn_frame_t host_frame;
  logic [TIME_W-1:0] global_time, last_t1, t_reset, tp_time;
  logic auto_stop, sched_reset_en, tp_en, clock_reset;
  logic [15:0] stops_sent;
  logic [23:0] check_period = '0;
  int checks = 0, failures = 0;

  bec_link_end dut (.*);

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(16 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] m(input logic b);
    return b ? 2'b01 : 2'b10;
  endfunction

  // upstream line generation: per link a queue of D bits
  logic dq [N][$];
  logic [N-1:0] t_now, t_q;
  logic [TIME_W-1:0] dreq_time;
  bit trig_check = 0;

  task automatic queue_frame(input int p, input up_cmd_e c, input logic [3:0] d);
    logic [10:0] b;
    b = {1'b0, c, d, ^{c, d}, 1'b1};
    for (int i = 10; i >= 0; i--) dq[p].push_back(b[i]);
  endtask

  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      logic d;
      t_now[p] = $urandom_range(0, 1);
      d = (dq[p].size() > 0) ? dq[p].pop_front() : 1'b1;
      up_sym[p] <= {m(t_now[p]), m(d)};
    end
  end
  always @(posedge clk) t_q <= t_now;
  always @(negedge clk) if (trig_check) check(trig_level == t_q, "trigger levels");

  // downstream parser
  dn_frame_t got [$];
  logic [TIME_W-1:0] got_t [$];
  int st = 0, need = 0; logic is_long; logic [33:0] sh;
  always @(posedge clk) if (!rst) begin
    logic b;
    #1;
    b = dn_sym[1] ^ dn_sym[0];
    case (st)
      0: if (!b) st = 1;
      1: begin is_long = b; need = b ? 34 : 10; st = 2; end
      default: begin
        sh = {sh[32:0], b};
        need--;
        if (need == 0) begin
          st = 0;
          if (is_long) got.push_back('{is_long: 1, addr: sh[33:20], sub: sh[17:10], data: sh[9:2]});
          else         got.push_back('{is_long: 0, addr: 0, sub: 0, data: sh[9:2]});
        end
      end
    endcase
  end

  // time at which the last bit of link 5's frame is on the line
  int n_done = 0;
  always @(posedge clk) begin
    if (dq[5].size() == 1) dreq_time = global_time;
    if (check_done) n_done++;
  end

  initial begin
    dn_frame_t f;
    logic [TIME_W-1:0] x;
    up_tdm_swap = '0; port_en = 48'h7; a_bit = 0; start_sync = 0; start_time_req = 0;
    host_valid = 0; host_frame = '0;
    auto_stop = 1; sched_reset_en = 0; tp_en = 0; t_reset = '0; tp_time = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(negedge clk);
    trig_check = 1;
    repeat (30) @(negedge clk);
    check(up_frame_err == 0, "no frame errors");
    queue_frame(17, UP_BACK_PRS_ON, 0);
    repeat (20) @(negedge clk);
    check(back_pressure == (48'd1 << 17), "back pressure of link 17");
    @(negedge clk); start_sync = 1; @(negedge clk); start_sync = 0;
    repeat (12 + 7 * 36 + 10) @(negedge clk);
    check(got.size() == 8, "sync sequence on the line");
    f = got.pop_front();
    check(!f.is_long && f.data == DN_SYNC, "SYNC");
    for (int i = 0; i < TIME_BYTES; i++) begin
      f = got.pop_front();
      check(f.sub == DN_SUB_T1_0 + 8'(i) && f.data == last_t1[8*i +: 8], "t1 byte");
    end
    f = got.pop_front();
    check(f.sub == DN_SUB_FOLLOW, "FOLLOW");
    queue_frame(5, UP_DELAY_REQ, 0);
    repeat (20 + 7 * 36 + 10) @(negedge clk);
    check(got.size() == 7, "delay response on the line");
    for (int i = 0; i < TIME_BYTES; i++) begin
      f = got.pop_front();
      check(f.addr == 14'd5 && f.sub == DN_SUB_T4_0 + 8'(i), "t4 byte");
      x[8*i +: 8] = f.data;
    end
    check(x - dreq_time <= 3, "t4 is the arrival time of DELAY_REQ");
    f = got.pop_front();
    check(f.addr == 14'd5 && f.sub == DN_SUB_DLY_RESP, "DLY_RESP");
    // alignment check over links 0..2
    @(negedge clk); start_time_req = 1; @(negedge clk); start_time_req = 0;
    repeat (20) @(negedge clk);
    f = got.pop_front();
    check(!f.is_long && f.data == DN_TIME_REQ, "TIME_REQ");
    x = 48'h0000_00AB_CDEF;
    for (int i = TIME_NIBBLES - 1; i >= 0; i--) begin
      queue_frame(0, UP_TIME, x[4*i +: 4]);
      queue_frame(1, UP_TIME, x[4*i +: 4]);
      queue_frame(2, UP_TIME, 4'((x + 3) >> (4 * i)));
    end
    repeat (12 * 11 + 10) @(negedge clk);
    check(n_done == 1, "check finished");
    check(aligned == 48'b011, "alignment verdict");
    repeat (50) @(negedge clk);
    check(got.size() == 1 && got[0] == '{is_long: 1, addr: 14'd2, sub: DN_SUB_CMD, data: DN_DAQ_STOP},
          "DAQ_STOP to the misaligned link");
    check(stops_sent == 1, "one automatic stop");
    got.delete();
    // test pulse broadcast at a programmed time
    @(negedge clk); tp_time = global_time + 20; tp_en = 1;
    while (global_time != tp_time) @(negedge clk);
    check(got.size() == 0, "no test pulse before its time");
    repeat (30) @(negedge clk);
    check(got.size() == 1 && !got[0].is_long && got[0].data == DN_TEST_PULSE, "scheduled TEST_PULSE broadcast");
    tp_en = 0;
    // scheduled global time reset
    @(negedge clk); t_reset = global_time + 25; sched_reset_en = 1;
    x = 0;
    while (!clock_reset && x < 100) begin @(negedge clk); x++; end
    check(x == 26 && global_time == 0, "global time reset at t_reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
