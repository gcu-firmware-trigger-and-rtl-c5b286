// tb_gcu_workloads: the readout workloads of the GCU, run on the full-size
// system (one GCU on its BEC, default parameters).
//
// Software is modelled as a reader that pulls events from the L2 cache in
// bunches of five, using the complete-event count (0x18), and whose reads are
// paced to the ~90 Mbit/s that an IPbus link over Ethernet sustains: one
// 32-bit word every 22 slots (352 ns). The ADC samples encode their own
// local time, so every event's tag and samples are checked.
//   1. L1 depth: validations whose window is 1150 slots (18.4 us) old are
//      read out (the event builder accepts windows up to ~18.9 us old, so
//      that the copy ends before the 20 us L1 overwrites them); one 1300
//      slots (20.8 us) old has left the L1 and is dropped as late.
//   2. Normal mode: 15 validations of 90-sample windows at 1 kHz (one every
//      62500 slots), read out while the next ones arrive.
//   3. Autotrigger mode: 60 rising edges of the local trigger request at
//      50 kHz (one every 1250 slots), 40-sample windows.
// At the end no event may have been dropped for lack of L2 space or for a
// busy event builder, and every event must have been read.
module tb_gcu_workloads;
  import gcu_tt_pkg::*;
  localparam int N = 48;
  localparam int READ_GAP = 22; // slots per IPbus word at ~90 Mbit/s
  logic clk = 0, rst = 1;
  logic [255:0] adc_data [2];
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
  logic [23:0] check_period;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;

  gcu_tt_system dut (.*);

  always #8 clk = ~clk;

  always_comb for (int i = 0; i < 16; i++) begin
    adc_data[0][16*i +: 16] = 16'(local_time * 16 + i);
    adc_data[1][16*i +: 16] = ~16'(local_time * 16 + i);
  end
  always_comb for (int p = 1; p < N; p++) other_up_sym[p] = 4'b1001; // T=0, D idle
  assign tdo = tdi;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(16 * 3000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus tasks
  task automatic ipb(input bit wr, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    gcu_ipb_in = '{addr: a, wdata: d, strobe: 1'b1, write: wr};
    do @(negedge clk); while (!(gcu_ipb_out.ack || gcu_ipb_out.err));
    q = gcu_ipb_out.rdata;
    gcu_ipb_in.strobe = 0;
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q; ipb(1, a, d, q);
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] q);
    ipb(0, a, 0, q);
  endtask
  // one L2 word at the paced IPbus rate
  task automatic rd_paced(output logic [31:0] q);
    ipb(0, 32'h20, 0, q);
    repeat (READ_GAP - 2) @(negedge clk);
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
  endtask

  // ---------------- software reader
  logic [TIME_W-1:0] exp_tags [$];
  int exp_win = 90, n_read = 0, max_wait = 0;
  bit reader_on = 0, gen_done = 0;
  logic [TIME_W-1:0] done_time [$];

  always @(posedge clk) if (event_done) done_time.push_back(local_time);

  task automatic read_event();
    logic [31:0] w, thi, tlo;
    logic [TIME_W-1:0] t, e, td;
    rd_paced(w);
    check(w[31:24] == 8'hEB && w[7:0] == 8'(exp_win), "header word 0");
    rd_paced(w);
    check(w == 32'(n_read), "event number");
    rd_paced(thi); rd_paced(tlo);
    t = {thi[15:0], tlo};
    e = (exp_tags.size() > 0) ? exp_tags.pop_front() : '0;
    check(t == e, "event tag");
    for (int j = 0; j < (exp_win + 1) / 2; j++) begin
      rd_paced(w);
      check(w == {16'(t * 16 + 2 * j + 1), 16'(t * 16 + 2 * j)}, "event samples");
    end
    // time from the end of the build to the end of the readout
    td = (done_time.size() > 0) ? done_time.pop_front() : local_time;
    if (int'(local_time - td) > max_wait) max_wait = int'(local_time - td);
    n_read++;
  endtask

  initial begin : reader
    logic [31:0] q;
    forever begin
      @(negedge clk);
      if (reader_on) begin
        rd(32'h18, q);
        // a bunch of five, or whatever is left once the triggers have stopped
        if (q >= 5 || (q > 0 && gen_done)) begin
          for (int k = 0; k < int'(q); k++) read_event();
        end else repeat (200) @(negedge clk);
      end
    end
  end

  initial begin
    logic [31:0] q;
    logic [TIME_W-1:0] tag;
    int n0, dur;
    trig_req = 0; gcu_ipb_in = '0; jtag_ipb_in = '0; up_tdm_swap = '0; port_en = '0;
    a_bit = 0; start_sync = 0; start_time_req = 0; bec_host_valid = 0; bec_host_frame = '0;
    auto_stop = 0; bec_sched_reset_en = 0; bec_tp_en = 0; bec_t_reset = '0; bec_tp_time = '0;
    check_period = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (100) @(negedge clk);
    bcast(DN_DAQ_START);
    repeat (1300) @(negedge clk); // let the L1 fill
    // duration of a validation message (7 long frames), measured
    dur = int'(local_time);
    validate(local_time - 100);
    dur = int'(local_time) - dur;
    exp_tags.push_back(local_time - 100 - dur);
    repeat (100) @(negedge clk);

    // 1. L1 depth: 18.4 us old windows are still there, a 20.8 us old one is not
    for (int k = 0; k < 5; k++) begin
      tag = local_time + dur - 1100;  // ~1150 slots old when the last frame is decoded
      exp_tags.push_back(tag);
      validate(tag);
      repeat (20) @(negedge clk);
    end
    validate(local_time + dur - 1300);
    repeat (50) @(negedge clk);
    rd(32'h16, q); check(q[15:0] == 1, "window older than 20 us dropped as late");
    gen_done = 1;
    reader_on = 1;
    while (n_read < 6) @(negedge clk);
    check(n_read == 6, "18.4 us old windows read out");

    // 2. normal mode at 1 kHz
    gen_done = 0;
    n0 = n_read;
    for (int k = 0; k < 15; k++) begin
      tag = local_time - 300;
      exp_tags.push_back(tag);
      validate(tag);
      repeat (62500 - dur) @(negedge clk);
    end
    gen_done = 1;
    while (n_read < n0 + 15) @(negedge clk);
    check(n_read == n0 + 15, "normal mode: 15 events at 1 kHz read");
    $display("normal mode: longest wait from build to end of readout %0d slots", max_wait);
    // a bunch of five is collected in 5 ms and read in ~5 x 49 x 22 slots
    check(max_wait < 5 * 62500 + 5 * 49 * READ_GAP + 2000, "normal mode readout keeps up");

    // 3. autotrigger mode at 50 kHz
    while (exp_tags.size() != 0) @(negedge clk);
    reader_on = 0;
    repeat (300) @(negedge clk);
    exp_win = 40;
    wr(32'h1, 32'b0001);
    gen_done = 0;
    reader_on = 1;
    max_wait = 0;
    n0 = n_read;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk); trig_req = 1; exp_tags.push_back(local_time - 2);
      repeat (3) @(negedge clk); trig_req = 0;
      repeat (1250 - 4) @(negedge clk);
    end
    gen_done = 1;
    while (n_read < n0 + 60) @(negedge clk);
    check(n_read == n0 + 60, "autotrigger: 60 events at 50 kHz read");
    $display("autotrigger mode: longest wait from build to end of readout %0d slots", max_wait);
    check(max_wait < 10 * 1250, "autotrigger readout keeps up with 32 Mbit/s");

    rd(32'h16, q); check(q[31:16] == 0, "no event dropped for a full L2");
    rd(32'h17, q); check(q == 0, "no event dropped for a busy event builder");
    rd(32'h14, q); check(q == 0, "L2 empty at the end");
    check(!back_pressure[0], "no back pressure at these rates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
