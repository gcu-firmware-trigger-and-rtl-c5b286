// tb_ttc_rx: self-checking test of the downstream (TTC-like) decoder.
// The testbench biphase-mark codes its own line: random A bits and a queue of
// short and long B frames, in normal and one-bit-shifted TDM phase. It checks
// the decoded A bit (one cycle of latency), every decoded frame, the frame
// error of frames with a wrong parity bit, and the code error flag when a bit
// boundary transition is left out.
module tb_ttc_rx;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  logic tdm_swap;
  logic [3:0] line_sym;
  logic a_bit, frame_valid, frame_err, code_err;
  dn_frame_t frame;
  int checks = 0, failures = 0;

  ttc_rx dut (.*);

  always #8 clk = ~clk;

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

  logic       level = 0;
  logic [1:0] b_prev_pair;
  logic       bq [$];
  dn_frame_t  exp_frames [$];
  int         exp_errs = 0, got_errs = 0, got = 0, code_errs = 0;
  bit         a_check_en = 0, drop_transition = 0;
  logic       a_exp, a_q;

  function automatic logic [1:0] bmc(input logic b);
    logic [1:0] r;
    level = !level; r[1] = level;
    if (b) level = !level;
    r[0] = level;
    return r;
  endfunction

  task automatic queue_frame(input dn_frame_t f, input bit bad_par);
    logic [35:0] b;
    int n;
    if (f.is_long) begin
      b = {2'b01, f.addr, 2'b11, f.sub, f.data, (^{f.addr, f.sub, f.data}) ^ bad_par, 1'b1};
      n = 36;
    end else begin
      b = {2'b00, f.data, (^f.data) ^ bad_par, 1'b1, 24'hFFFFFF};
      n = 12;
    end
    for (int i = 0; i < n; i++) bq.push_back(b[35 - i]);
    if (bad_par) exp_errs++;
    else exp_frames.push_back(f);
  endtask

  task automatic run_slots(input int n);
    logic a, b;
    logic [1:0] pa, pb;
    for (int i = 0; i < n; i++) begin
      a  = $urandom_range(0, 1);
      b  = (bq.size() > 0) ? bq.pop_front() : 1'b1;
      if (!tdm_swap) begin
        pa = bmc(a);
        if (drop_transition) begin level = !level; pa = ~pa; drop_transition = 0; end
        pb = bmc(b);
        line_sym <= {pa, pb};
      end else begin
        pa = bmc(a);
        line_sym <= {b_prev_pair, pa};
        b_prev_pair = bmc(b);
      end
      @(posedge clk);
      a_exp = a;
    end
  endtask

  always @(posedge clk) a_q <= a_exp;
  always @(negedge clk) if (!rst) begin
    if (a_check_en) check(a_bit == a_q, "A bit");
    if (frame_valid) begin
      got++;
      check(exp_frames.size() > 0 && frame == exp_frames.pop_front(), "frame contents");
    end
    if (frame_err) got_errs++;
    if (code_err) code_errs++;
  end

  function automatic dn_frame_t rnd_frame();
    dn_frame_t f;
    f.is_long = $urandom_range(0, 1);
    f.addr    = f.is_long ? 14'($urandom) : 14'h0;
    f.sub     = f.is_long ? 8'($urandom) : 8'h0;
    f.data    = 8'($urandom);
    return f;
  endfunction

  initial begin
    tdm_swap = 0; line_sym = 4'b1101; level = 1; a_exp = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run_slots(4);
    check(code_errs == 0, "no code error on a clean line");
    a_check_en = 1;
    for (int phase = 0; phase < 2; phase++) begin
      for (int n = 0; n < 25; n++) begin
        queue_frame(rnd_frame(), 0);
        run_slots(36 + $urandom_range(0, 3));
      end
      queue_frame(rnd_frame(), 1);
      run_slots(40);
      if (phase == 0) begin
        a_check_en = 0;
        b_prev_pair = bmc(1'b1);
        tdm_swap = 1;
        run_slots(3);
        a_check_en = 1;
      end
    end
    run_slots(10);
    a_check_en = 0;
    tdm_swap = 0;
    run_slots(4);
    begin
      int n_before;
      n_before = code_errs;
      drop_transition = 1;
      run_slots(4);
      check(code_errs > n_before, "missing transition flagged");
    end
    check(got == 50, "all good frames decoded");
    check(got_errs == 2, "parity errors flagged");
    check(exp_frames.size() == 0, "no frame missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
