// tb_gcu_tt_system: end-to-end test of one GCU on its BEC, at full size
// (48 links, 1250-word L1, 1024-word L2; no parameter is overridden).
// The testbench configures the GCU over IPbus, sends commands and trigger
// validations as BEC host frames over the real downstream link, feeds the ADC
// with samples whose values encode their own local time, and reads events
// back over IPbus. Each mechanism is counted and must happen at least once:
//   DAQ start/stop, trigger request upstream (fixed latency), scheduled local
//   clock reset, clock alignment (offset removed), alignment check (aligned
//   and misaligned verdicts), trigger validation -> event readout, back
//   pressure on/off, L2 overflow drop, autotrigger mode, scheduled and
//   broadcast test pulse, event counter reset, coarse delays, JTAG shift,
//   automatic DAQ_STOP of the misaligned link, synchronous clock reset of
//   BEC and GCU at one programmed time, BEC-scheduled TEST_PULSE broadcast,
//   periodic alignment checks.
module tb_gcu_tt_system;
  import gcu_tt_pkg::*;
  localparam int N = 48;
  logic clk = 0, rst = 1;
  logic [255:0] adc_data [2];
  bit adc1 = 0; // events come from the second ADC chip: samples inverted
  logic trig_req;
  ipb_wbus_t gcu_ipb_in, jtag_ipb_in;
  ipb_rbus_t gcu_ipb_out, jtag_ipb_out;
  logic test_pulse, clock_reset, event_done, l2_not_empty, dn_frame_err, dn_code_err, ttc_a;
  logic [TIME_W-1:0] local_time, global_time, last_t1;
  logic [3:0] other_up_sym [1:N-1];
  logic [N-1:0] up_tdm_swap, port_en, bec_trig_level, up_frame_err, up_sym_err, back_pressure, aligned;
  logic [3:0] dn_sym;
  logic a_bit, start_sync, start_time_req, bec_host_valid, bec_host_ready, check_done;
  dn_frame_t bec_host_frame;
  logic auto_stop, bec_sched_reset_en, bec_tp_en, bec_clock_reset;
  logic [TIME_W-1:0] bec_t_reset, bec_tp_time;
  logic [15:0] stops_sent;
  logic [23:0] check_period = '0;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;

  gcu_tt_system dut (.*);

  always #8 clk = ~clk;

  // ADC: sample i of the word taken at local time t is 16*t + i
  always_comb for (int i = 0; i < 16; i++) begin
    adc_data[0][16*i +: 16] = 16'(local_time * 16 + i);
    adc_data[1][16*i +: 16] = ~16'(local_time * 16 + i);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(16 * 2000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters
  int n_tp = 0, n_clkrst = 0, n_bp_on = 0, n_bp_off = 0, n_chk = 0;
  logic bp_q = 0;
  bit mon_en = 0;
  int link_errs = 0;
  always @(posedge clk) if (!rst) begin
    if (test_pulse) n_tp++;
    if (clock_reset) n_clkrst++;
    if (check_done) n_chk++;
    if (back_pressure[0] && !bp_q) n_bp_on++;
    if (!back_pressure[0] && bp_q) n_bp_off++;
    bp_q <= back_pressure[0];
    if (mon_en && (dn_frame_err || dn_code_err || up_frame_err != 0 || up_sym_err != 0)) link_errs++;
  end

  // ---------------- link 1: a model GCU that answers TIME_REQ with a wrong time
  logic l1q [$];
  function automatic logic [1:0] m(input logic b);
    return b ? 2'b01 : 2'b10;
  endfunction
  always @(negedge clk) begin
    logic d;
    d = (l1q.size() > 0) ? l1q.pop_front() : 1'b1;
    other_up_sym[1] <= {m(1'b0), m(d)};
    for (int p = 2; p < N; p++) other_up_sym[p] <= {m(1'b0), m(1'b1)};
  end
  task automatic model_time(input logic [TIME_W-1:0] t);
    for (int i = TIME_NIBBLES - 1; i >= 0; i--) begin
      logic [10:0] b;
      b = {1'b0, UP_TIME, t[4*i +: 4], ^{UP_TIME, t[4*i +: 4]}, 1'b1};
      for (int k = 10; k >= 0; k--) l1q.push_back(b[k]);
    end
  endtask

  // ---------------- JTAG chain model
  logic [7:0] chain = 8'h3C;
  assign tdo = chain[0];
  always @(posedge tck) chain <= {tdi, chain[7:1]};

  // ---------------- bus tasks
  task automatic ipb(input bit jtag, input bit wr, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    ipb_wbus_t w;
    w = '{addr: a, wdata: d, strobe: 1'b1, write: wr};
    @(negedge clk);
    if (jtag) jtag_ipb_in = w; else gcu_ipb_in = w;
    forever begin
      @(negedge clk);
      if (!jtag && (gcu_ipb_out.ack || gcu_ipb_out.err)) begin q = gcu_ipb_out.rdata; break; end
      if (jtag && (jtag_ipb_out.ack || jtag_ipb_out.err)) begin q = jtag_ipb_out.rdata; break; end
    end
    gcu_ipb_in.strobe = 0; jtag_ipb_in.strobe = 0;
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q; ipb(0, 1, a, d, q);
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] q);
    ipb(0, 0, a, 0, q);
  endtask

  task automatic host(input dn_frame_t f);
    @(negedge clk);
    bec_host_valid = 1; bec_host_frame = f;
    do @(posedge clk); while (!bec_host_ready);
    @(negedge clk);
    bec_host_valid = 0;
  endtask
  task automatic bcast(input logic [7:0] c);
    host('{is_long: 0, addr: 0, sub: 0, data: c});
    repeat (30) @(negedge clk);
  endtask
  task automatic validate(input logic [TIME_W-1:0] tag);
    for (int i = 0; i < TIME_BYTES; i++)
      host('{is_long: 1, addr: 14'd0, sub: DN_SUB_TAG0 + 8'(i), data: tag[8*i +: 8]});
    host('{is_long: 1, addr: 14'd0, sub: DN_SUB_VALIDATE, data: 8'h00});
    repeat (150) @(negedge clk);
  endtask

  task automatic read_event(input logic [TIME_W-1:0] tag, input int win, input bit auto_f,
                            input int evn, input bit check_tag);
    logic [31:0] w, tlo, thi;
    logic [TIME_W-1:0] t;
    rd(32'h20, w); check(w == {8'hEB, 7'b0, auto_f, 8'b0, 8'(win)}, "event header word 0");
    rd(32'h20, w); check(evn < 0 || w == 32'(evn), "event number");
    rd(32'h20, thi); rd(32'h20, tlo);
    t = {thi[15:0], tlo};
    if (check_tag) check(t == tag, "event time tag");
    for (int j = 0; j < (win + 1) / 2; j++) begin
      rd(32'h20, w);
      check(w == ({16'(t * 16 + 2 * j + 1), 16'(t * 16 + 2 * j)} ^ {32{adc1}}), "event samples");
    end
  endtask

  function automatic longint terr();
    return longint'($signed(local_time - global_time));
  endfunction

  initial begin
    logic [31:0] q;
    logic [TIME_W-1:0] tag, t_tp;
    int lat0, lat;
    longint e_before, e_after;
    int n_trig_lat = 0, n_evt = 0, n_auto = 0, n_full = 0, n_stop = 0, n_mis = 0, n_jtag = 0, n_sync = 0;
    int n_autostop = 0, n_becrst = 0, n_bectp = 0, n_periodic = 0, n_adc1 = 0, tp0, chk0;

    trig_req = 0; gcu_ipb_in = '0; jtag_ipb_in = '0; up_tdm_swap = '0; port_en = 48'b1;
    a_bit = 0; start_sync = 0; start_time_req = 0; bec_host_valid = 0; bec_host_frame = '0;
    auto_stop = 1; bec_sched_reset_en = 0; bec_tp_en = 0; bec_t_reset = '0; bec_tp_time = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(negedge clk);

    // configuration: link address 0, coarse delays 3 down / 2 up
    wr(32'h2, 32'h0);
    wr(32'h3, 32'h0203);
    rd(32'h0, q); check(q == 32'h6C07_760, "GCU identifier");
    // the delay lines refill after a change of setting
    repeat (100) @(negedge clk);
    mon_en = 1;

    // DAQ start
    rd(32'h10, q); check(q[1] == 0, "DAQ stopped after reset");
    bcast(DN_DAQ_START);
    rd(32'h10, q); check(q[1] == 1, "DAQ started by broadcast");

    // trigger request: fixed latency to the BEC
    for (int k = 0; k < 4; k++) begin
      int t0;
      @(negedge clk); trig_req = !trig_req; t0 = $time / 16;
      while (bec_trig_level[0] != trig_req) @(negedge clk);
      lat = $time / 16 - t0;
      if (k == 0) lat0 = lat;
      check(lat == lat0, "trigger request latency is fixed");
      n_trig_lat++;
      repeat ($urandom_range(3, 20)) @(negedge clk);
    end
    check(lat0 == 5, "trigger request latency: encoder 1 + coarse delay 2+1 + decoder 1");
    trig_req = 0;

    // scheduled local clock reset at local time 900: GCU falls 900 ticks behind
    wr(32'h8, 32'd900); wr(32'h9, 32'd0);
    wr(32'h1, 32'b0100);
    while (local_time < 1000) @(negedge clk);
    wr(32'h1, 32'b0000);
    check(n_clkrst == 1, "scheduled clock reset happened");
    e_before = terr();
    check(e_before < -850 && e_before > -950, "GCU clock behind before alignment");

    // clock alignment
    @(negedge clk); start_sync = 1; @(negedge clk); start_sync = 0;
    repeat (1200) @(negedge clk);
    rd(32'h10, q); check(q[0] == 1, "GCU reports synced");
    e_after = terr();
    check(e_after >= -4 && e_after <= 4, "clock offset removed");
    if (e_after >= -4 && e_after <= 4) n_sync++;
    rd(32'h13, q); check($signed(q) > 850 && $signed(q) < 950, "offset register");

    // alignment check: GCU on link 0 and a model on link 1 that is 100 ticks off
    port_en = 48'b11;
    @(negedge clk); start_time_req = 1; @(negedge clk); start_time_req = 0;
    repeat (20) @(negedge clk);
    model_time(global_time + 100);
    repeat (12 * 11 + 60) @(negedge clk);
    check(n_chk == 1, "alignment check completed");
    check(aligned[0] == 1 && aligned[1] == 0, "aligned GCU, misaligned model");
    if (aligned[1] == 0) n_mis++;
    port_en = 48'b1;
    repeat (60) @(negedge clk);
    check(stops_sent == 1, "automatic DAQ_STOP sent to the misaligned link only");
    rd(32'h10, q); check(q[1] == 1, "aligned GCU keeps running");
    if (stops_sent == 1 && q[1]) n_autostop++;

    // synchronous clock reset: BEC and GCU programmed with the same t_reset
    t_tp = global_time + 500;
    bec_t_reset = t_tp; bec_sched_reset_en = 1;
    wr(32'h8, t_tp[31:0]); wr(32'h9, 32'(t_tp[47:32])); wr(32'h1, 32'b0100);
    while (!bec_clock_reset) @(negedge clk);
    repeat (3) @(negedge clk);
    e_after = terr();
    check(global_time < 10 && e_after >= -4 && e_after <= 4, "BEC and GCU clocks reset together");
    if (global_time < 10 && e_after >= -4 && e_after <= 4) n_becrst++;
    bec_sched_reset_en = 0; wr(32'h1, 32'b0000);

    // validations after the L1 holds post-alignment data
    repeat (1300) @(negedge clk);
    bcast(DN_EVT_CNT_RST);
    tag = local_time - 300;
    validate(tag);
    rd(32'h14, q); check(q == 49, "one event of 49 words in L2");
    rd(32'h18, q); check(q == 1, "one complete event waiting");
    read_event(tag, 90, 0, 0, 1);
    n_evt++;

    // back pressure: ON at 100 words, OFF at 60
    wr(32'hA, {5'b0, 11'd60, 5'b0, 11'd100});
    for (int k = 0; k < 3; k++) validate(local_time - 400);
    repeat (40) @(negedge clk);
    check(back_pressure[0], "BEC sees back pressure");
    for (int k = 0; k < 3; k++) begin read_event(0, 90, 0, k + 1, 0); n_evt++; end
    repeat (40) @(negedge clk);
    check(!back_pressure[0], "back pressure released");

    // L2 overflow: 21 validations, 20 fit
    wr(32'hA, {5'b0, 11'd1000, 5'b0, 11'd1020});
    for (int k = 0; k < 21; k++) validate(local_time - 300);
    rd(32'h16, q); check(q[31:16] == 1, "one event dropped for a full L2");
    if (q[31:16] == 1) n_full++;
    rd(32'h14, q); check(q == 20 * 49, "L2 holds 20 events");
    rd(32'h18, q); check(q == 20, "20 complete events waiting");
    // software pulls the events in bunches of 5
    for (int k = 0; k < 20; k++) begin
      read_event(0, 90, 0, -1, 0);
      if (k % 5 == 4) begin rd(32'h18, q); check(q == 32'(19 - k), "events left after a bunch of 5"); end
    end

    // second ADC chip selected
    wr(32'h1, 32'b1_0000);
    repeat (300) @(negedge clk);
    tag = local_time - 200;
    validate(tag);
    adc1 = 1;
    read_event(tag, 90, 0, -1, 1);
    adc1 = 0;
    n_adc1++;
    wr(32'h1, 32'b0000);
    repeat (300) @(negedge clk);

    // autotrigger mode
    wr(32'h1, 32'b0001);
    @(negedge clk); trig_req = 1; tag = local_time - 2;
    repeat (4) @(negedge clk); trig_req = 0;
    repeat (100) @(negedge clk);
    read_event(tag, 40, 1, -1, 1);
    n_auto++;
    wr(32'h1, 32'b0000);

    // scheduled test pulse and broadcast test pulse
    t_tp = local_time + 200;
    wr(32'h6, t_tp[31:0]); wr(32'h7, 32'(t_tp[47:32]));
    wr(32'h1, 32'b1000);
    while (!test_pulse) @(negedge clk);
    check(local_time == t_tp + 1, "test pulse at the programmed time");
    wr(32'h1, 32'b0000);
    bcast(DN_TEST_PULSE);
    check(n_tp == 2, "scheduled and broadcast test pulses");
    // test pulse broadcast by the BEC at a programmed global time
    tp0 = n_tp;
    bec_tp_time = global_time + 300; bec_tp_en = 1;
    while (global_time != bec_tp_time) @(negedge clk);
    check(n_tp == tp0, "no test pulse before the BEC's programmed time");
    repeat (100) @(negedge clk);
    check(n_tp == tp0 + 1, "BEC-scheduled TEST_PULSE reaches the GCU");
    if (n_tp == tp0 + 1) n_bectp++;
    bec_tp_en = 0;

    // DAQ stop: no trigger request, no events
    bcast(DN_DAQ_STOP);
    @(negedge clk); trig_req = 1;
    repeat (20) @(negedge clk);
    check(bec_trig_level[0] == 0, "trigger request blocked while stopped");
    trig_req = 0;
    validate(local_time - 300);
    rd(32'h14, q); check(q == 0, "no event while stopped");
    if (q == 0) n_stop++;

    // periodic alignment monitoring by the BEC
    bcast(DN_DAQ_START);
    chk0 = n_chk;
    check_period = 24'd400;
    repeat (1000) @(negedge clk);
    check_period = '0;
    repeat (300) @(negedge clk);
    check(n_chk - chk0 == 2 && aligned[0] == 1, "two periodic checks, GCU aligned");
    if (n_chk - chk0 == 2) n_periodic++;

    // JTAG cable: shift 8 bits through the chain model
    begin
      logic [7:0] chain0;
      chain0 = chain;
      ipb(1, 1, 1, 32'h0, q);
      ipb(1, 1, 2, 32'hA7, q);
      ipb(1, 1, 0, 32'h108, q);
      do ipb(1, 0, 0, 0, q); while (q[31]);
      ipb(1, 0, 3, 0, q);
      check(q[7:0] == chain0 && chain == 8'hA7, "JTAG shift through the chain");
      if (chain == 8'hA7) n_jtag++;
    end

    check(link_errs == 0, "no link errors");
    // every mechanism happened
    check(n_trig_lat > 0, "mechanism: trigger request");
    check(n_clkrst > 0, "mechanism: clock reset");
    check(n_sync > 0, "mechanism: clock alignment");
    check(n_chk > 0 && n_mis > 0, "mechanism: alignment check");
    check(n_evt > 0, "mechanism: validation and readout");
    check(n_bp_on > 0 && n_bp_off > 0, "mechanism: back pressure");
    check(n_full > 0, "mechanism: L2 overflow");
    check(n_auto > 0, "mechanism: autotrigger");
    check(n_tp >= 2, "mechanism: test pulses");
    check(n_stop > 0, "mechanism: DAQ stop");
    check(n_jtag > 0, "mechanism: JTAG");
    check(n_autostop > 0, "mechanism: automatic stop");
    check(n_becrst > 0, "mechanism: synchronous BEC/GCU clock reset");
    check(n_bectp > 0, "mechanism: BEC-scheduled test pulse");
    check(n_periodic > 0, "mechanism: periodic alignment check");
    check(n_adc1 > 0, "mechanism: ADC chip selection");
    $display("mechanisms: trig=%0d clkrst=%0d sync=%0d check=%0d misaligned=%0d events=%0d bp_on=%0d bp_off=%0d full=%0d auto=%0d tp=%0d stop=%0d jtag=%0d",
             n_trig_lat, n_clkrst, n_sync, n_chk, n_mis, n_evt, n_bp_on, n_bp_off, n_full, n_auto, n_tp, n_stop, n_jtag);
    $display("mechanisms: autostop=%0d bec_clock_reset=%0d bec_test_pulse=%0d periodic=%0d adc1=%0d", n_autostop, n_becrst, n_bectp, n_periodic, n_adc1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
