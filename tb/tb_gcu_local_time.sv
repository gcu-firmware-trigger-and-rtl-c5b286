// tb_gcu_local_time: self-checking test of the local time counter.
// Checks the one-tick-per-cycle count, a positive and a negative offset
// correction, the scheduled one-shot clock reset at t_reset (and that it does
// not fire again without re-arming), the scheduled test pulse at tp_time and
// the immediate test pulse. The expected time is kept by the testbench.
module tb_gcu_local_time;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  logic adj_valid, sched_reset_en, tp_en, tp_now;
  logic [TIME_W-1:0] adj_offset, t_reset, tp_time, local_time;
  logic clock_reset, test_pulse;
  int checks = 0, failures = 0;
  longint expt;
  int npulse = 0, nreset = 0;

  gcu_local_time dut (.*);

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: time %0d expected %0d", what, $time, local_time, expt);
    end
  endtask

  initial begin
    #(16 * 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    if (test_pulse) npulse++;
    if (clock_reset) nreset++;
  end

  task automatic step(input int n);
    repeat (n) begin
      @(posedge clk);
      #1 expt++;
      check(local_time == TIME_W'(expt), "count");
    end
  endtask

  initial begin
    adj_valid = 0; sched_reset_en = 0; tp_en = 0; tp_now = 0;
    adj_offset = 0; t_reset = 0; tp_time = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1 expt = 1;          // first increment
    check(local_time == 1, "start");
    step(20);
    // positive correction
    adj_offset = TIME_W'(1000); adj_valid = 1;
    @(posedge clk); #1 adj_valid = 0; expt += 1001;
    check(local_time == TIME_W'(expt), "positive correction");
    step(5);
    // negative correction
    adj_offset = -TIME_W'(300); adj_valid = 1;
    @(posedge clk); #1 adj_valid = 0; expt += -300 + 1;
    check(local_time == TIME_W'(expt), "negative correction");
    step(5);
    // scheduled test pulse
    tp_time = TIME_W'(expt + 10); tp_en = 1;
    step(15);
    check(npulse == 1, "scheduled test pulse");
    tp_en = 0;
    tp_now = 1; step(1); tp_now = 0; step(2);
    check(npulse == 2, "immediate test pulse");
    // scheduled clock reset
    t_reset = TIME_W'(expt + 20); sched_reset_en = 1;
    step(20);
    @(posedge clk); #1 expt = 0;
    check(local_time == 0, "scheduled reset to zero");
    step(30);
    check(nreset == 1, "one reset pulse");
    t_reset = TIME_W'(expt + 5);
    step(10);
    check(nreset == 1, "schedule does not fire twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
