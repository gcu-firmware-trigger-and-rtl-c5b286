// tb_ttc_tx: self-checking test of the downstream (TTC-like) encoder.
// Random A bits and random short and long frames are fed in. The testbench
// decodes the biphase-mark symbols itself (a transition at every bit start,
// a second one inside a 1), checks the A bit against the value given one cycle
// before, parses B channel frames of both formats, checks parity and stop
// bits and compares the contents with the frames handed over. Back-to-back
// frames must take 12 (short) and 36 (long) slots.
module tb_ttc_tx;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  logic a_bit, frame_valid, frame_ready;
  dn_frame_t frame;
  logic [3:0] line_sym;
  int checks = 0, failures = 0;

  ttc_tx dut (.*);

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

  dn_frame_t sent [$];
  logic      a_prev, last;
  int        st = 0, need = 0, nrx = 0, cyc = 0, last_hs = -1, last_len = 0;
  logic      is_long;
  logic [33:0] sh;
  bit        started = 0;

  always @(posedge clk) begin
    logic a, b;
    cyc++;
    if (!rst) begin
      if (started) begin
        check(line_sym[3] != last, "A bit boundary transition");
        check(line_sym[1] != line_sym[2], "B bit boundary transition");
      end
      started = 1;
      a = line_sym[3] ^ line_sym[2];
      b = line_sym[1] ^ line_sym[0];
      last = line_sym[0];
      check(a == a_prev, "A channel");
      case (st)
        0: if (!b) st = 1;
        1: begin is_long = b; need = b ? 34 : 10; st = 2; end
        default: begin
          sh = {sh[32:0], b};
          need--;
          if (need == 0) begin
            dn_frame_t exp;
            st = 0;
            nrx++;
            check(sh[0] == 1'b1, "stop bit");
            check(sent.size() > 0, "frame expected");
            exp = sent.pop_front();
            check(exp.is_long == is_long, "format bit");
            if (is_long) begin
              check(sh[33:20] == exp.addr && sh[17:10] == exp.sub && sh[9:2] == exp.data, "long frame fields");
              check(sh[19:18] == 2'b11, "E and fixed bit");
              check(^{sh[33:20], sh[17:1]} == 1'b0, "long parity");
            end else begin
              check(sh[9:2] == exp.data, "short frame data");
              check(^sh[9:1] == 1'b0, "short parity");
            end
          end
        end
      endcase
      if (frame_valid && frame_ready) begin
        if (last_hs >= 0) check(cyc - last_hs == last_len, "back-to-back frame period");
        last_hs  = cyc;
        last_len = frame.is_long ? 36 : 12;
        sent.push_back(frame);
      end
    end
    a_prev <= a_bit;
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
    a_bit = 0; frame_valid = 0; frame = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 40; n++) begin
      frame_valid <= 1;
      frame       <= rnd_frame();
      a_bit       <= $urandom_range(0, 1);
      @(posedge clk);
      while (!frame_ready) begin
        a_bit <= $urandom_range(0, 1);
        @(posedge clk);
      end
    end
    frame_valid <= 0;
    for (int n = 0; n < 20; n++) begin
      last_hs = -1;
      repeat ($urandom_range(1, 20)) begin
        a_bit <= $urandom_range(0, 1);
        @(posedge clk);
      end
      frame_valid <= 1;
      frame       <= rnd_frame();
      @(posedge clk);
      while (!frame_ready) @(posedge clk);
      frame_valid <= 0;
    end
    repeat (50) @(posedge clk);
    check(nrx == 60 && sent.size() == 0, "all frames received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
