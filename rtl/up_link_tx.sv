// up_link_tx: upstream trigger-request encoder of the GCU.
//
// Every 16 ns slot (one clk cycle) carries two bits, time-division
// multiplexed: the trigger request level T, sampled each cycle, and one bit D
// of the command channel. Command frames are 11 bits on D: a start bit (0),
// the 4-bit command code HHHH, 4 data bits DDDD, an even parity bit and a
// stop bit (1); the channel idles at 1 between frames. With PARITY_EN = 0 the
// parity bit is left out. Both bits are Manchester coded (0 -> "10",
// 1 -> "01"), so the line runs at four symbols per slot (250 Mbaud for a
// 62.5 MHz slot clock) and can be AC coupled.
//
// Interface: frame_valid/frame_ready hand over one frame; ready is high when
// the channel is idle or sending the stop bit, so frames can follow each
// other every 11 slots; the start bit is chosen in the cycle after the
// handshake. line_sym[3:2] is the T bit (first half-bit in [3]), [1:0]
// the D bit; a serializer sends [3] first. Latency from trig_level to
// line_sym is one cycle, fixed. The framing, TDM and Manchester coding follow
// the document; bit order inside fields (MSB first), even parity and the
// Manchester polarity are this design's choices.
module up_link_tx
  import gcu_tt_pkg::*;
#(
  parameter bit PARITY_EN = 1'b1
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      trig_level,
  input  logic      frame_valid,
  input  up_frame_t frame,
  output logic      frame_ready,
  output logic [3:0] line_sym
);
  localparam int unsigned NBITS = PARITY_EN ? UP_FRAME_BITS : UP_FRAME_BITS - 1;

  logic [NBITS-1:0]       shreg;    // bits still to send, next bit in MSB
  logic [$clog2(NBITS+1)-1:0] left;
  logic                   d_bit;
  logic [NBITS-1:0]       frame_bits;

  function automatic logic [1:0] manchester(input logic b);
    return b ? 2'b01 : 2'b10;
  endfunction

  always_comb begin
    if (PARITY_EN)
      frame_bits = NBITS'({1'b0, frame, ^frame, 1'b1});
    else
      frame_bits = NBITS'({1'b0, frame, 1'b1});
  end

  assign frame_ready = (left <= 1);
  assign d_bit       = (left == '0) ? 1'b1 : shreg[NBITS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg    <= '1;
      left     <= '0;
      line_sym <= {manchester(1'b0), manchester(1'b1)};
    end else begin
      line_sym <= {manchester(trig_level), manchester(d_bit)};
      if (frame_valid && frame_ready) begin
        shreg <= frame_bits;
        left  <= ($clog2(NBITS+1))'(NBITS);
      end else if (left != '0) begin
        shreg <= {shreg[NBITS-2:0], 1'b1};
        left  <= left - 1'b1;
      end
    end
  end
endmodule
