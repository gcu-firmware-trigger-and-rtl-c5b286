// up_link_rx: upstream decoder, one per GCU link on the BEC side.
//
// Takes the four line symbols of each 16 ns slot from the deserializer
// (half-bit aligned), undoes the Manchester code of the T and D bits and
// separates them. T is the trigger request level and is output every cycle.
// D is a UART-like command channel: the decoder waits for a start bit (0),
// collects HHHH DDDD and the parity bit, and checks parity and the stop bit.
// A good frame is output for one cycle on frame_valid; a bad one pulses
// frame_err. An invalid Manchester pair ("00"/"11") pulses sym_err and the
// previous value of that bit is kept.
//
// tdm_swap selects which half of the received word holds T: when the
// deserializer is one bit out of TDM phase, each word holds the D bit of the
// previous slot followed by the T bit of the current one. The setting is static link configuration.
// Latency: trig_level is registered one cycle after the symbols arrive; frame_valid comes in the cycle after the stop-bit
// symbols. The decoder is kept small because a BEC holds 48 of them, as the
// document requires; its structure is this design's own.
module up_link_rx
  import gcu_tt_pkg::*;
#(
  parameter bit PARITY_EN = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tdm_swap,
  input  logic [3:0] line_sym,
  output logic       trig_level,
  output logic       frame_valid,
  output up_frame_t  frame,
  output logic       frame_err,
  output logic       sym_err
);
  localparam int unsigned NPAY = PARITY_EN ? 10 : 9; // payload bits after start, stop included

  logic [1:0] t_pair, d_pair;
  logic       t_ok, d_ok, d_bit;
  logic       d_last;
  logic       busy;
  logic [3:0] cnt;
  logic [8:0] shreg;

  always_comb begin
    if (tdm_swap) begin
      t_pair = line_sym[1:0];
      d_pair = line_sym[3:2];
    end else begin
      t_pair = line_sym[3:2];
      d_pair = line_sym[1:0];
    end
    t_ok  = t_pair[1] ^ t_pair[0];
    d_ok  = d_pair[1] ^ d_pair[0];
    d_bit = d_ok ? d_pair[0] : d_last;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_level  <= 1'b0;
      d_last      <= 1'b1;
      busy        <= 1'b0;
      cnt         <= '0;
      shreg       <= '0;
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      sym_err     <= 1'b0;
      frame       <= '0;
    end else begin
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      sym_err     <= !t_ok || !d_ok;
      if (t_ok) trig_level <= t_pair[0];
      d_last <= d_bit;
      if (!busy) begin
        if (d_ok && !d_bit) begin
          busy <= 1'b1;
          cnt  <= 4'(NPAY);
        end
      end else begin
        shreg <= {shreg[7:0], d_bit};
        cnt   <= cnt - 1'b1;
        if (cnt == 4'd1) begin
          busy <= 1'b0;
          // shreg holds HHHH DDDD [P]; d_bit is the stop bit.
          if (PARITY_EN) begin
            frame       <= up_frame_t'(shreg[8:1]);
            frame_valid <= d_bit && !(^shreg[8:0]);
            frame_err   <= !d_bit || (^shreg[8:0]);
          end else begin
            frame       <= up_frame_t'(shreg[7:0]);
            frame_valid <= d_bit;
            frame_err   <= !d_bit;
          end
        end
      end
    end
  end
endmodule
