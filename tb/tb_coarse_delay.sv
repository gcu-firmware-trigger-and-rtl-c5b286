// tb_coarse_delay: self-checking test of the programmable coarse delay.
// A random word stream is fed in; for several delay settings (0, 1, a middle
// value and the largest, 63) every output word must equal the input word of
// delay + 1 cycles earlier, taken from the testbench's own history.
module tb_coarse_delay;
  logic clk = 0, rst = 1;
  logic [5:0] delay;
  logic [3:0] din, dout;
  int checks = 0, failures = 0;
  logic [3:0] hist [$];

  coarse_delay #(.W(4), .MAX_DELAY(64)) dut (.*);

  always #8 clk = ~clk;

  initial begin
    #(16 * 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int settings [4] = '{0, 1, 17, 63};
    delay = 0; din = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (settings[s]) begin
      delay <= 6'(settings[s]);
      // let the line fill with data taken at the new setting
      for (int i = 0; i < 200; i++) begin
        din <= 4'($urandom);
        @(posedge clk);
        hist.push_front(din);          // hist[0] = word taken at this edge
        #1;
        if (i > 70) begin
          checks++;
          if (dout !== hist[settings[s]]) begin
            failures++;
            if (failures < 10) $display("FAIL delay %0d: got %h expected %h", settings[s], dout, hist[settings[s]]);
          end
        end
        if (hist.size() > 100) void'(hist.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
