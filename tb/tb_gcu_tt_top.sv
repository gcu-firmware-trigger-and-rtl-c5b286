// tb_gcu_tt_top: test of the GCU firmware alone, the testbench acting as BEC.
// The testbench biphase-mark codes its own downstream line and decodes the
// upstream Manchester line itself. It keeps a model global time that runs
// 777 ticks ahead of the GCU and plays the BEC's half of the alignment
// exchange. Checked: DAQ start; the trigger request on the upstream T bit;
// the TIME_REQ answer (12 TIME frames whose time lies within the decode
// window of the request); the DELAY_REQ and the removal of the 777-tick
// offset; a validated 90-sample event read back over IPbus; and the
// coarse delays (the T-bit latency grows by the programmed upstream delay).
module tb_gcu_tt_top;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  logic [255:0] adc_data [2];
  logic trig_req;
  logic [3:0] dn_sym, up_sym;
  ipb_wbus_t ipb_in; ipb_rbus_t ipb_out;
  logic test_pulse, clock_reset, event_done, l2_not_empty, ttc_a, dn_frame_err, dn_code_err;
  logic [TIME_W-1:0] local_time;
  int checks = 0, failures = 0;

  gcu_tt_top dut (.*);

  always #8 clk = ~clk;
  always_comb for (int i = 0; i < 16; i++) begin
    adc_data[0][16*i +: 16] = 16'(local_time * 16 + i);
    adc_data[1][16*i +: 16] = ~16'(local_time * 16 + i);
  end

  logic [TIME_W-1:0] gtime;   // model global time
  always_ff @(posedge clk) gtime <= rst ? TIME_W'(777) : gtime + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(16 * 500000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- downstream line (BMC), bits queued per slot
  logic level = 1;
  logic bq [$];
  logic [TIME_W-1:0] last_bit_time;
  function automatic logic [1:0] bmc(input logic b);
    logic [1:0] r;
    level = !level; r[1] = level;
    if (b) level = !level;
    r[0] = level;
    return r;
  endfunction
  always @(negedge clk) begin
    logic b;
    logic [1:0] pa;
    b = (bq.size() > 0) ? bq.pop_front() : 1'b1;
    pa = bmc(1'b0);
    dn_sym <= {pa, bmc(b)};
    if (bq.size() == 0) last_bit_time = gtime;
  end
  task automatic send(input dn_frame_t f);
    logic [35:0] b; int n;
    if (f.is_long) begin
      b = {2'b01, f.addr, 2'b11, f.sub, f.data, ^{f.addr, f.sub, f.data}, 1'b1}; n = 36;
    end else begin
      b = {2'b00, f.data, ^f.data, 1'b1, 24'hFFFFFF}; n = 12;
    end
    for (int i = 0; i < n; i++) bq.push_back(b[35 - i]);
    while (bq.size() > 0) @(negedge clk);
  endtask

  // ---------------- upstream parser
  up_frame_t got [$];
  logic [TIME_W-1:0] got_t [$];
  logic t_bit;
  int st = 0;
  logic [9:0] sh;
  always @(posedge clk) if (!rst) begin
    logic d;
    #1;
    t_bit = (up_sym[3:2] == 2'b01);
    d = up_sym[0];
    if (st == 0) begin
      if (up_sym[1:0] == 2'b10) st = 1;
    end else begin
      sh = {sh[8:0], d};
      st++;
      if (st == 11) begin
        st = 0;
        check(sh[0] && ^sh[9:1] == 0, "upstream frame stop and parity");
        got.push_back(up_frame_t'(sh[9:2]));
        got_t.push_back(gtime);
      end
    end
  end

  // ---------------- IPbus
  task automatic ipb(input bit w, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: d, strobe: 1'b1, write: w};
    do @(negedge clk); while (!(ipb_out.ack || ipb_out.err));
    q = ipb_out.rdata;
    ipb_in.strobe = 0;
  endtask

  task automatic send_time(input logic [13:0] a, input logic [7:0] sub0, input logic [TIME_W-1:0] t);
    for (int i = 0; i < TIME_BYTES; i++) send('{is_long: 1, addr: a, sub: sub0 + 8'(i), data: t[8*i +: 8]});
  endtask

  initial begin
    logic [31:0] q;
    logic [TIME_W-1:0] t1, t4, tr, tlo, thi, tag, t_req_lo;
    longint e;
    int t0, lat [2];
    trig_req = 0; ipb_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    ipb(1, 32'h2, 32'd9, q);           // link address 9
    repeat (80) @(negedge clk);
    send('{is_long: 0, addr: 0, sub: 0, data: DN_DAQ_START});
    repeat (20) @(negedge clk);
    ipb(0, 32'h10, 0, q); check(q[1], "DAQ started");
    // T bit latency for upstream delays 0 and 7
    for (int k = 0; k < 2; k++) begin
      ipb(1, 32'h3, k ? 32'h0700 : 32'h0, q);
      repeat (80) @(negedge clk);
      @(negedge clk); trig_req = 1; t0 = $time / 16;
      while (!t_bit) @(negedge clk);
      lat[k] = $time / 16 - t0;
      trig_req = 0;
      repeat (20) @(negedge clk);
    end
    check(lat[1] - lat[0] == 7, "upstream coarse delay adds 7 slots");
    ipb(1, 32'h3, 32'h0, q);
    repeat (80) @(negedge clk);
    got.delete(); got_t.delete();
    // TIME_REQ
    send('{is_long: 0, addr: 0, sub: 0, data: DN_TIME_REQ});
    t_req_lo = local_time;
    repeat (12 * 11 + 30) @(negedge clk);
    check(got.size() == 12, "12 TIME frames");
    tr = '0;
    for (int i = 0; i < 12 && got.size() > 0; i++) begin
      up_frame_t f;
      f = got.pop_front();
      void'(got_t.pop_front());
      check(f.cmd == UP_TIME, "TIME command");
      if (f.cmd != UP_TIME) $display("  got %p", f);
      tr = {tr[TIME_W-5:0], f.data};
    end
    check(tr - t_req_lo <= 4, "reported time is the reception time");
    // alignment: BEC model is 777 ahead
    e = longint'($signed(local_time - gtime));
    check(e == -777, "initial offset");
    send('{is_long: 0, addr: 0, sub: 0, data: DN_SYNC});
    t1 = gtime - 13;                    // start of the SYNC frame on the line
    send_time(DN_ADDR_ALL, DN_SUB_T1_0, t1);
    send('{is_long: 1, addr: DN_ADDR_ALL, sub: DN_SUB_FOLLOW, data: 0});
    repeat (30) @(negedge clk);
    check(got.size() == 1 && got[0].cmd == UP_DELAY_REQ, "DELAY_REQ");
    t4 = got_t[0];
    void'(got.pop_front()); void'(got_t.pop_front());
    send_time(14'd9, DN_SUB_T4_0, t4);
    send('{is_long: 1, addr: 14'd9, sub: DN_SUB_DLY_RESP, data: 0});
    repeat (20) @(negedge clk);
    e = longint'($signed(local_time - gtime));
    check(e >= -3 && e <= 3, "offset removed");
    ipb(0, 32'h10, 0, q); check(q[0], "synced");
    // validation and readout
    repeat (1300) @(negedge clk);
    tag = local_time - 500;
    send_time(14'd9, DN_SUB_TAG0, tag);
    send('{is_long: 1, addr: 14'd9, sub: DN_SUB_VALIDATE, data: 0});
    repeat (100) @(negedge clk);
    ipb(0, 32'h14, 0, q); check(q == 49, "event in L2");
    ipb(0, 32'h20, 0, q); check(q == {8'hEB, 16'h0, 8'd90}, "header");
    ipb(0, 32'h20, 0, q);
    ipb(0, 32'h20, 0, thi); ipb(0, 32'h20, 0, tlo);
    check({thi[15:0], tlo[31:0]} == tag, "tag");
    for (int j = 0; j < 45; j++) begin
      ipb(0, 32'h20, 0, q);
      check(q == {16'(tag * 16 + 2 * j + 1), 16'(tag * 16 + 2 * j)}, "samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
