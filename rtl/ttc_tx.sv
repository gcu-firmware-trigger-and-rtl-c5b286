// ttc_tx: downstream encoder of the BEC, after the CERN TTC transmitter.
//
// Each 16 ns slot carries an A channel bit and a B channel bit, time-division
// multiplexed, both biphase-mark coded: the line level toggles at every bit
// boundary and toggles again mid-bit for a 1, so the code is DC free and
// insensitive to polarity. line_sym[3:2] is the A bit, [1:0] the B bit, [3]
// sent first.
//
// The B channel idles at 1 and carries frames in the TTC layout:
//   short broadcast : 0 0 D[7:0] P 1                         (12 bits)
//   long addressed  : 0 1 A[13:0] E 1 S[7:0] D[7:0] P 1        (36 bits)
// P is even parity over the payload (D, or A S D); E is always 1. The TTC
// system protects frames with Hamming check bits; here a single parity bit
// is used instead. frame_valid/frame_ready hand over one frame; ready is high
// when the channel is idle or sending a stop bit (frames may follow back to
// back) and the start bit goes out on the line one
// cycle after the handshake plus the output register. The A bit is sent with
// one cycle of latency. TDM + BMC and the TTC-like frame formats follow the
// document's choice of a TTC based downstream; the details are this design's.
module ttc_tx
  import gcu_tt_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       a_bit,
  input  logic       frame_valid,
  input  dn_frame_t  frame,
  output logic       frame_ready,
  output logic [3:0] line_sym
);
  localparam int unsigned LW = DN_LONG_BITS;

  logic [LW-1:0] shreg;
  logic [5:0]    left;
  logic          b_bit;
  logic          level;     // line level at the end of the last half-bit
  logic [LW-1:0] bits;
  logic [3:0]    sym;

  always_comb begin
    if (frame.is_long)
      bits = {2'b01, frame.addr, 2'b11, frame.sub, frame.data,
              ^{frame.addr, frame.sub, frame.data}, 1'b1};
    else
      bits = {2'b00, frame.data, ^frame.data, 1'b1, {(LW-DN_SHORT_BITS){1'b1}}};
  end

  assign frame_ready = (left <= 1);
  assign b_bit       = (left == '0) ? 1'b1 : shreg[LW-1];

  // Biphase mark: first half inverts the running level, second half inverts
  // again for a 1.
  always_comb begin
    logic l;
    l      = level;
    l      = !l;          sym[3] = l;
    if (a_bit) l = !l;    sym[2] = l;
    l      = !l;          sym[1] = l;
    if (b_bit) l = !l;    sym[0] = l;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg    <= '1;
      left     <= '0;
      level    <= 1'b1;       // idle word: A = 0, B = 1
      line_sym <= 4'b1101;
    end else begin
      line_sym <= sym;
      level    <= sym[0];
      if (frame_valid && frame_ready) begin
        shreg <= bits;
        left  <= frame.is_long ? 6'(DN_LONG_BITS) : 6'(DN_SHORT_BITS);
      end else if (left != '0) begin
        shreg <= {shreg[LW-2:0], 1'b1};
        left  <= left - 1'b1;
      end
    end
  end
endmodule
