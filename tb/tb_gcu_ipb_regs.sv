// tb_gcu_ipb_regs: self-checking test of the GCU IPbus register slave.
// Also checks the count of complete events waiting in L2 (0x18) while an
// event is read word by word.
// An IPbus master task (strobe until ack) writes and reads back every
// configuration register, checks the reset values of the readout windows,
// that the configuration outputs follow the writes, the status and counter
// reads, the latched high half of the local time, one FIFO pop per read of
// the L2 data register, the host frame handshake and the error answer for an
// unmapped address.
module tb_gcu_ipb_regs;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  ipb_wbus_t ipb_in; ipb_rbus_t ipb_out;
  logic auto_mode, adc_sel, dn_tdm_swap, sched_reset_en, tp_en;
  logic [13:0] my_addr; logic [5:0] dn_delay, up_delay; logic [7:0] win_normal, win_auto;
  logic [TIME_W-1:0] t_diff, tp_time, t_reset, local_time, last_offset;
  logic [10:0] bp_hi, bp_lo, l2_level;
  logic host_valid, host_ready; up_frame_t host_frame;
  logic synced, daq_run, back_pressure;
  logic [31:0] event_cnt, l2_data;
  logic [15:0] late_drops, full_drops, busy_drops;
  logic l2_rd_en;
  logic event_done = 0;
  int checks = 0, failures = 0, pops = 0;

  gcu_ipb_regs dut (.*);

  always #8 clk = ~clk;
  always @(posedge clk) if (l2_rd_en) begin pops++; l2_data <= l2_data + 1; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #(16 * 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ipb(input bit wr, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] q, output bit err);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: d, strobe: 1'b1, write: wr};
    do @(negedge clk); while (!(ipb_out.ack || ipb_out.err));
    q = ipb_out.rdata; err = ipb_out.err;
    ipb_in.strobe = 0;
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q; bit e;
    ipb(1, a, d, q, e);
    check(!e, "write acked");
  endtask

  task automatic rd_check(input logic [31:0] a, input logic [31:0] exp, input string what);
    logic [31:0] q; bit e;
    ipb(0, a, 0, q, e);
    check(!e && q == exp, what);
    if (q != exp) $display("  read %h expected %h", q, exp);
  endtask

  initial begin
    logic [31:0] q; bit e;
    ipb_in = '0; host_ready = 0;
    synced = 1; daq_run = 0; back_pressure = 1;
    local_time = 48'hABCD_1234_5678; last_offset = TIME_W'(-5);
    l2_level = 11'd49; event_cnt = 32'd77; late_drops = 3; full_drops = 4; busy_drops = 5;
    l2_data = 32'h1000;
    repeat (3) @(posedge clk);
    rst <= 0;
    rd_check(32'h0, 32'h6C07_760, "identifier");
    rd_check(32'h4, {16'b0, 8'd40, 8'd90}, "window reset values");
    check(win_normal == 90 && win_auto == 40, "window outputs after reset");
    wr(32'h1, 32'h1F);      rd_check(32'h1, 32'h1F, "control");
    check(auto_mode && adc_sel && dn_tdm_swap && sched_reset_en && tp_en, "control outputs");
    wr(32'h1, 32'h0F);      check(!adc_sel && auto_mode, "ADC select cleared alone");
    wr(32'h2, 32'h1ABC);    rd_check(32'h2, 32'h1ABC, "address");
    check(my_addr == 14'h1ABC, "address output");
    wr(32'h3, 32'h2A15);    check(dn_delay == 6'h15 && up_delay == 6'h2A, "delays");
    rd_check(32'h3, 32'h2A15, "delay read back");
    wr(32'h4, 32'h0000_2A5A); check(win_normal == 8'h5A && win_auto == 8'h2A, "windows");
    wr(32'h5, 32'hFFFF_FFF0); check(t_diff == TIME_W'(-16), "t_diff sign extended");
    wr(32'h6, 32'h8765_4321); wr(32'h7, 32'h0000_00FE);
    check(tp_time == 48'h00FE_8765_4321, "test pulse time");
    rd_check(32'h7, 32'hFE, "test pulse time high");
    wr(32'h8, 32'h1111_2222); wr(32'h9, 32'h3333);
    check(t_reset == 48'h3333_1111_2222, "reset time");
    wr(32'hA, {5'b0, 11'd300, 5'b0, 11'd800});
    check(bp_hi == 800 && bp_lo == 300, "thresholds");
    rd_check(32'h10, 32'b0101, "status");
    rd_check(32'h11, 32'h1234_5678, "time low");
    local_time = 48'h0;
    rd_check(32'h12, 32'hABCD, "time high latched by the low read");
    rd_check(32'h13, 32'hFFFF_FFFB, "last offset");
    rd_check(32'h19, 32'h0000_FFFF, "last offset high bits");
    rd_check(32'h14, 32'd49, "L2 level");
    rd_check(32'h15, 32'd77, "event counter");
    rd_check(32'h16, {16'd4, 16'd3}, "drop counters");
    rd_check(32'h17, 32'd5, "busy drops");
    rd_check(32'h20, 32'h1000, "L2 word 0");
    rd_check(32'h20, 32'h1001, "L2 word 1");
    check(pops == 2, "one pop per read");
    ipb(0, 32'h3F, 0, q, e);  check(e, "unmapped address answers err");
    ipb(0, 32'h100, 0, q, e); check(e, "out of range address answers err");
    check(pops == 2, "no pop on error");
    wr(32'hB, 32'h63);
    check(host_valid && host_frame == '{cmd: UP_TDB, data: 4'h3}, "host frame held");
    @(negedge clk); host_ready = 1; @(negedge clk); host_ready = 0;
    check(!host_valid, "host frame taken");
    // complete-event count: 3 events built, then one 90-sample event
    // (49 words) and the header of the next are read
    @(negedge clk); rst <= 1; @(negedge clk); rst <= 0;
    l2_level = 11'd200;
    rd_check(32'h18, 32'd0, "no events after reset");
    for (int k = 0; k < 3; k++) begin @(negedge clk); event_done = 1; @(negedge clk); event_done = 0; end
    rd_check(32'h18, 32'd3, "three complete events");
    for (int w = 0; w < 50; w++) begin
      @(negedge clk);
      l2_data = (w == 0 || w == 49) ? {8'hEB, 7'b0, 1'b0, 8'b0, 8'd90} : 32'h5A00_0000 + 32'(w);
      ipb(0, 32'h20, 0, q, e);
      if (w == 0)  rd_check(32'h18, 32'd2, "event readout started");
      if (w == 48) rd_check(32'h18, 32'd2, "data words do not count as headers");
    end
    rd_check(32'h18, 32'd1, "second event started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
