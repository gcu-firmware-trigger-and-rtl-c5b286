// l1_ring_buffer: L1 cache holding the most recent ADC data.
//
// The ADC stream (16 Gbit/s: 16 samples of 16 bits per 16 ns slot) is written
// every cycle into a circular memory of DEPTH words. DEPTH = 1250 words of
// 256 bits covers 20 us, the largest trigger latency, i.e. 320 kbit. wr_ptr is
// the address that the next word will take, so the word written k cycles ago
// sits at wr_ptr - k (modulo DEPTH). One read port with one cycle of latency
// serves the event builder. The size follows the document; the word width is
// the document's data rate divided by this design's 62.5 MHz slot clock.
module l1_ring_buffer #(
  parameter int unsigned WORD_W = 256,
  parameter int unsigned DEPTH  = 1250
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [WORD_W-1:0]        wr_data,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WORD_W-1:0]        rd_data
);
  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    mem[wr_ptr] <= wr_data;
    rd_data     <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst)                                         wr_ptr <= '0;
    else if (wr_ptr == ($clog2(DEPTH))'(DEPTH - 1))  wr_ptr <= '0;
    else                                             wr_ptr <= wr_ptr + 1'b1;
  end
endmodule
