// tb_l2_event_fifo: self-checking test of the L2 event FIFO at full size.
// Random writes and reads are compared against a queue model; the level must
// follow the model. The FIFO is filled to 1024 words, a further write must be
// ignored, then it is emptied and a read of the empty FIFO must be ignored.
module tb_l2_event_fifo;
  logic clk = 0, rst = 1;
  logic wr_en, rd_en, empty;
  logic [31:0] wr_data, rd_data;
  logic [10:0] level;
  int checks = 0, failures = 0;
  logic [31:0] model [$];

  l2_event_fifo #(.DATA_W(32), .DEPTH(1024)) dut (.*);

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

  task automatic cycle(input bit w, input bit r);
    @(negedge clk);
    wr_en = w; rd_en = r; wr_data = $urandom;
    if (r) begin
      if (model.size() > 0) check(rd_data == model[0], "read data");
      else check(empty, "empty flag");
    end
    @(posedge clk);
    #1;
    if (r && model.size() > 0) void'(model.pop_front());
    if (w && model.size() < 1024) model.push_back(wr_data);
    check(int'(level) == model.size(), "level");
    check(empty == (model.size() == 0), "empty");
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3000) cycle($urandom_range(0, 1), $urandom_range(0, 2) == 0);
    while (model.size() < 1024) cycle(1, 0);
    cycle(1, 0);
    check(level == 11'd1024, "full level, extra write ignored");
    while (model.size() > 0) cycle(0, 1);
    cycle(0, 1);
    check(level == 0, "empty after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
