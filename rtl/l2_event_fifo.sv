// l2_event_fifo: L2 cache of accepted events in internal RAM.
//
// A first-word-fall-through FIFO of DEPTH 32-bit words (1024 x 32 = 32 kbit,
// room for 20 events of 128 header bits and 90 samples). The event builder
// writes whole events; software pulls them out over IPbus, one word per read
// of the data register (rd_en pops the word shown on rd_data). level counts
// the stored words. Writes to a full FIFO and reads of an empty one are
// ignored. The 32 kbit size is the document's; 32-bit words match the IPbus
// data width.
module l2_event_fifo #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 1024
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [DATA_W-1:0]        wr_data,
  input  logic                     rd_en,
  output logic [DATA_W-1:0]        rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wp, rp;
  logic              do_wr, do_rd;

  assign empty   = (level == '0);
  assign do_wr   = wr_en && (level != ($clog2(DEPTH+1))'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
    end
  end
endmodule
