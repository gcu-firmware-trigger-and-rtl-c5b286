// tb_event_builder: self-checking test of the event builder with the real
// L1 ring buffer (1250 words) and L2 FIFO (1024 words) around it.
// The ADC word of local time t holds the samples 16*t + i (i = 0..15), so the
// testbench knows every expected sample. It checks, word by word, events
// built from validations (90 samples) and autotrigger edges (40 samples), a
// validation whose window is still being written (it must wait), a too old
// one (late drop), a burst that overflows the L2 cache (20 events fit, the
// 21st is dropped), a busy drop, the event counter reset, and the build time
// of one event (at most 70 cycles for 90 samples).
module tb_event_builder;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  logic [TIME_W-1:0] local_time, val_tag;
  logic run, auto_mode, val_valid, trig_req, evt_cnt_rst;
  logic [7:0] win_normal, win_auto;
  logic [10:0] l1_wr_ptr, l1_rd_addr, l2_level;
  logic [255:0] l1_rd_data, adc;
  logic l2_wr_en, l2_rd_en, l2_empty, event_done;
  logic [31:0] l2_wr_data, l2_rd_data, event_cnt;
  logic [15:0] late_drops, full_drops, busy_drops;
  int checks = 0, failures = 0;

  l1_ring_buffer #(.WORD_W(256), .DEPTH(1250)) u_l1 (
    .clk, .rst, .wr_data(adc), .wr_ptr(l1_wr_ptr), .rd_addr(l1_rd_addr), .rd_data(l1_rd_data));
  event_builder dut (.*);
  l2_event_fifo #(.DATA_W(32), .DEPTH(1024)) u_l2 (
    .clk, .rst, .wr_en(l2_wr_en), .wr_data(l2_wr_data), .rd_en(l2_rd_en),
    .rd_data(l2_rd_data), .empty(l2_empty), .level(l2_level));

  always #8 clk = ~clk;

  always_comb for (int i = 0; i < 16; i++) adc[16*i +: 16] = 16'(local_time * 16 + i);
  always_ff @(posedge clk) local_time <= rst ? TIME_W'(5000) : local_time + 1'b1;

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

  task automatic pop(output logic [31:0] w);
    @(negedge clk);
    w = l2_rd_data;
    l2_rd_en = 1;
    @(negedge clk);
    l2_rd_en = 0;
  endtask

  task automatic read_event(input logic [TIME_W-1:0] tag, input int win, input bit auto_f, input int evn);
    logic [31:0] w;
    pop(w); check(w == {8'hEB, 7'b0, auto_f, 8'b0, 8'(win)}, "header word 0");
    pop(w); check(w == 32'(evn), "header event number");
    pop(w); check(w == 32'(tag[TIME_W-1:32]), "header tag high");
    pop(w); check(w == tag[31:0], "header tag low");
    for (int j = 0; j < (win + 1) / 2; j++) begin
      pop(w);
      check(w == {16'(tag * 16 + 2 * j + 1), 16'(tag * 16 + 2 * j)}, "sample pair");
    end
  endtask

  task automatic validate(input logic [TIME_W-1:0] tag);
    @(negedge clk);
    val_valid = 1; val_tag = tag;
    @(negedge clk);
    val_valid = 0;
  endtask

  initial begin
    logic [TIME_W-1:0] tag;
    int t0, nev;
    run = 1; auto_mode = 0; val_valid = 0; trig_req = 0; evt_cnt_rst = 0;
    win_normal = 90; win_auto = 40; val_tag = 0; l2_rd_en = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (1300) @(posedge clk);
    // one normal event, build time
    @(negedge clk);
    tag = local_time - 100;
    t0 = $time / 16;
    validate(tag);
    wait (event_done);
    check($time / 16 - t0 <= 70, "build time of a 90-sample event");
    repeat (2) @(negedge clk);
    check(l2_level == 11'(4 + 45), "event size 49 words");
    read_event(tag, 90, 0, 0);
    // a window still being written must wait
    @(negedge clk);
    tag = local_time - 1;
    validate(tag);
    wait (event_done);
    check(local_time - tag >= 6, "waited for the window to be written");
    read_event(tag, 90, 0, 1);
    // too old
    @(negedge clk);
    validate(local_time - 1240);
    repeat (5) @(negedge clk);
    check(late_drops == 1 && l2_level == 0, "late validation dropped");
    // busy: three validations in a row, the third is dropped
    @(negedge clk);
    tag = local_time - 200;
    validate(tag); validate(tag + 7); validate(tag + 9);
    repeat (200) @(negedge clk);
    check(busy_drops == 1, "busy drop");
    read_event(tag, 90, 0, 2);
    read_event(tag + 7, 90, 0, 3);
    // event counter reset
    @(negedge clk); evt_cnt_rst = 1; @(negedge clk); evt_cnt_rst = 0;
    // L2 overflow: 21 events, 20 fit
    for (int n = 0; n < 21; n++) begin
      @(negedge clk);
      validate(local_time - 300);
      repeat (80) @(negedge clk);
    end
    check(full_drops == 1, "L2 full drop");
    check(l2_level == 11'(20 * 49), "20 events held");
    nev = 0;
    while (l2_level != 0) begin
      logic [31:0] w;
      pop(w); check(w[31:24] == 8'hEB, "header in overflow run");
      pop(w); check(w == 32'(nev), "event numbers after counter reset");
      repeat (47) pop(w);
      nev++;
    end
    check(nev == 20, "20 events read back");
    // autotrigger
    auto_mode = 1;
    @(negedge clk); trig_req = 1;
    tag = local_time - 2;
    repeat (3) @(negedge clk); trig_req = 0;
    wait (event_done);
    read_event(tag, 40, 1, 20);
    // not running: nothing happens
    run = 0;
    @(negedge clk); trig_req = 1; repeat (3) @(negedge clk); trig_req = 0;
    repeat (100) @(negedge clk);
    check(l2_level == 0, "no event while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
