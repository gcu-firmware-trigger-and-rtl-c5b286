// tb_up_link_rx: self-checking test of the upstream decoder.
// The testbench builds the line itself: random trigger levels and a queue of
// frames (start, 8 bits, even parity, stop), Manchester coded, in normal and
// in one-bit-shifted TDM phase. It checks the decoded trigger level (one
// cycle of latency), every decoded frame against the queue, the frame error
// for frames with a wrong parity or stop bit, and the symbol error flag for
// an invalid Manchester pair.
module tb_up_link_rx;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  logic tdm_swap;
  logic [3:0] line_sym;
  logic trig_level, frame_valid, frame_err, sym_err;
  up_frame_t frame;
  int checks = 0, failures = 0;

  up_link_rx dut (.*);

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [1:0] m(input logic b);
    return b ? 2'b01 : 2'b10;
  endfunction

  initial begin
    #(16 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line generation state
  logic       t_cur, t_exp, d_prev;
  logic [10:0] dq [$];        // D bits still to send
  up_frame_t  exp_frames [$];
  int         exp_errs = 0, got_errs = 0, got_frames = 0, sym_errs = 0;
  bit         bad_sym = 0;
  bit         trig_check_en = 0;

  task automatic queue_frame(input up_frame_t f, input bit bad_par, input bit bad_stop);
    logic [10:0] b;
    b = {1'b0, f, (^f) ^ bad_par, !bad_stop};
    for (int i = 10; i >= 0; i--) dq.push_back(b[i]);
    if (bad_par || bad_stop) exp_errs++;
    else exp_frames.push_back(f);
  endtask

  task automatic run_slots(input int n);
    logic d;
    for (int i = 0; i < n; i++) begin
      t_cur = $urandom_range(0, 1);
      d = (dq.size() > 0) ? dq.pop_front() : 1'b1;
      if (!tdm_swap) line_sym <= {m(t_cur), m(d)};
      else           line_sym <= {m(d_prev), m(t_cur)};
      if (bad_sym) begin line_sym[3:2] <= 2'b11; t_cur = t_exp; bad_sym = 0; end
      d_prev = d;
      @(posedge clk);
      t_exp = t_cur;
    end
  endtask

  // checker, runs on the falling edge
  logic t_check;
  always @(negedge clk) if (!rst) begin
    if (frame_valid) begin
      got_frames++;
      check(exp_frames.size() > 0 && frame == exp_frames.pop_front(), "frame contents");
    end
    if (frame_err) got_errs++;
    if (sym_err) sym_errs++;
  end
  always @(posedge clk) t_check <= t_exp;
  always @(negedge clk) if (!rst && trig_check_en) check(trig_level == t_check, "trigger level");

  initial begin
    tdm_swap = 0; line_sym = {m(0), m(1)}; d_prev = 1; t_exp = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run_slots(4);
    trig_check_en = 1;
    for (int phase = 0; phase < 2; phase++) begin
      for (int n = 0; n < 30; n++) begin
        queue_frame(up_frame_t'($urandom_range(0, 255)), 0, 0);
        run_slots($urandom_range(0, 1) ? 11 : 11 + $urandom_range(1, 5));
      end
      queue_frame(up_frame_t'(8'h35), 1, 0);
      run_slots(13);
      queue_frame(up_frame_t'(8'h47), 0, 1);
      run_slots(13);
      queue_frame(up_frame_t'(8'h62), 0, 0);
      run_slots(20);
      trig_check_en = 0;
      tdm_swap = 1;
      run_slots(3);
      trig_check_en = 1;
    end
    // invalid symbol
    trig_check_en = 0;
    bad_sym = 1;
    run_slots(5);
    check(sym_errs >= 1, "symbol error flagged");
    check(got_frames == 62, "all good frames decoded");
    check(got_errs == 4, "bad frames flagged");
    check(exp_frames.size() == 0, "no frame missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
