// tb_l1_ring_buffer: self-checking test of the L1 ring buffer.
// Writes a word derived from the cycle number every cycle, at full size
// (1250 x 256 bits), for more than two turns of the ring. Then reads back
// random ages between 1 and DEPTH: the word at wr_ptr - age must be the word
// written age cycles ago, one cycle after the address is given. Also checks
// that wr_ptr wraps from DEPTH-1 to 0.
module tb_l1_ring_buffer;
  localparam int DEPTH = 1250;
  logic clk = 0, rst = 1;
  logic [255:0] wr_data, rd_data;
  logic [10:0] wr_ptr, rd_addr;
  int checks = 0, failures = 0;
  int cyc = 0, wraps = 0;

  l1_ring_buffer #(.WORD_W(256), .DEPTH(DEPTH)) dut (.*);

  always #8 clk = ~clk;

  function automatic logic [255:0] pattern(input int n);
    return {8{n * 32'h9E3779B9 + 32'd7}};
  endfunction

  initial begin
    #(16 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word written in cycle n (counted after reset) is pattern(n)
  always @(negedge clk) wr_data = pattern(cyc);
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (wr_ptr == 11'(DEPTH - 1)) wraps++;
  end

  initial begin
    rd_addr = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2 * DEPTH + 100) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int age, n_exp, a;
      @(negedge clk);
      age = $urandom_range(1, DEPTH);
      a = int'(wr_ptr) - age;
      if (a < 0) a += DEPTH;
      rd_addr = 11'(a);
      n_exp = cyc - age;
      @(negedge clk);
      checks++;
      if (rd_data !== pattern(n_exp)) begin
        failures++;
        if (failures < 10) $display("FAIL age %0d", age);
      end
    end
    checks++;
    if (wraps < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
