// tb_up_link_tx: self-checking test of the upstream encoder.
// Random trigger levels and random command frames are fed in. The testbench
// decodes the Manchester symbols itself, checks the T bit against the level
// given one cycle before, parses the D channel as start/8 bits/parity/stop
// frames and compares them, in order, with the frames handed over. It also
// checks that back-to-back frames take exactly 11 slots each.
module tb_up_link_tx;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  logic trig_level, frame_valid, frame_ready;
  up_frame_t frame;
  logic [3:0] line_sym;
  int checks = 0, failures = 0;

  up_link_tx dut (.*);

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  up_frame_t sent [$];
  logic      t_prev;
  int        rx_state = 0;  // 0 idle, >0 bits collected
  logic [9:0] rx_bits;
  int        nframes = 0;
  int        last_hs = -1, cyc = 0;

  initial begin
    #(16 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      // T bit: registered value of last cycle's level
      check(line_sym[3:2] == (t_prev ? 2'b01 : 2'b10), "T bit");
      check(line_sym[1] != line_sym[0], "D manchester");
      if (rx_state == 0) begin
        if (line_sym[1:0] == 2'b10) rx_state = 1;
      end else begin
        rx_bits = {rx_bits[8:0], line_sym[0]};
        rx_state++;
        if (rx_state == 11) begin
          rx_state = 0;
          check(rx_bits[0] == 1'b1, "stop bit");
          check(^rx_bits[9:1] == 1'b0, "even parity");
          check(sent.size() > 0, "frame expected");
          if (sent.size() > 0) check(rx_bits[9:2] == sent.pop_front(), "frame contents");
          nframes++;
        end
      end
      if (frame_valid && frame_ready) begin
        if (last_hs >= 0 && frame_valid) check(cyc - last_hs == 11, "frame period 11 slots");
        last_hs = cyc;
        sent.push_back(frame);
      end
    end
    t_prev <= trig_level;
  end

  initial begin
    trig_level = 0; frame_valid = 0; frame = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // back-to-back frames
    for (int n = 0; n < 40; n++) begin
      frame_valid <= 1;
      frame       <= up_frame_t'($urandom_range(0, 255));
      trig_level  <= $urandom_range(0, 1);
      @(posedge clk);
      while (!frame_ready) begin
        trig_level <= $urandom_range(0, 1);
        @(posedge clk);
      end
    end
    frame_valid <= 0;
    last_hs = -1;
    // sparse frames
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom_range(1, 30)) begin
        trig_level <= $urandom_range(0, 1);
        @(posedge clk);
      end
      frame_valid <= 1;
      frame       <= up_frame_t'($urandom_range(0, 255));
      @(posedge clk);
      while (!frame_ready) @(posedge clk);
      frame_valid <= 0;
      last_hs = -1;
    end
    repeat (30) @(posedge clk);
    check(nframes == 60 && sent.size() == 0, "all frames received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
