// ttc_rx: downstream decoder of the GCU, after the CERN TTC receiver.
//
// Inverse of ttc_tx. Each cycle it receives the four half-bit symbols of one
// 16 ns slot, undoes the biphase-mark code (a bit is 1 when its two halves
// differ) and splits the A and B channel bits. A missing transition at a bit
// boundary pulses code_err. The B channel decoder waits for a start bit,
// reads the format bit and then collects a short broadcast frame
// (D[7:0] P 1) or a long addressed frame (A[13:0] E 1 S[7:0] D[7:0] P 1).
// Good frames come out for one cycle on frame_valid; parity or stop-bit
// errors pulse frame_err instead. tdm_swap, as in up_link_rx, takes A from
// the second symbol pair and B from the first when the deserializer is one
// bit out of TDM phase.
//
// Latency: a_bit one cycle after the symbols; frame_valid one cycle after the
// symbols of the stop bit, a fixed delay after the start bit, as the
// timestamping of synchronisation messages requires. Frame formats are the
// TTC-like ones chosen for this design (see gcu_tt_pkg).
module ttc_rx
  import gcu_tt_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tdm_swap,
  input  logic [3:0] line_sym,
  output logic       a_bit,
  output logic       frame_valid,
  output dn_frame_t  frame,
  output logic       frame_err,
  output logic       code_err
);
  logic [1:0]  a_pair, b_pair;
  logic        a_prev_half;   // symbol before a_pair
  logic        b_prev_half;   // symbol before b_pair
  logic        last_sym;
  logic        primed;        // last_sym holds a received symbol
  logic        b_val;
  logic [1:0]  st;            // 0 idle, 1 format bit, 2 payload
  logic        is_long;
  logic [5:0]  cnt;
  logic [32:0] shreg;

  always_comb begin
    if (tdm_swap) begin
      // Word = {B of previous slot, A of this slot}
      b_pair      = line_sym[3:2];
      b_prev_half = last_sym;
      a_pair      = line_sym[1:0];
      a_prev_half = line_sym[2];
    end else begin
      a_pair      = line_sym[3:2];
      a_prev_half = last_sym;
      b_pair      = line_sym[1:0];
      b_prev_half = line_sym[2];
    end
    b_val = b_pair[1] ^ b_pair[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_sym    <= 1'b0;
      primed      <= 1'b0;
      a_bit       <= 1'b0;
      st          <= 2'd0;
      is_long     <= 1'b0;
      cnt         <= '0;
      shreg       <= '0;
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      code_err    <= 1'b0;
      frame       <= '0;
    end else begin
      last_sym    <= line_sym[0];
      primed      <= 1'b1;
      a_bit       <= a_pair[1] ^ a_pair[0];
      code_err    <= (primed && a_pair[1] == a_prev_half) || (b_pair[1] == b_prev_half);
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      unique case (st)
        2'd0: if (!b_val) st <= 2'd1;
        2'd1: begin
          is_long <= b_val;
          cnt     <= b_val ? 6'd34 : 6'd10;
          st      <= 2'd2;
        end
        default: begin
          shreg <= {shreg[31:0], b_val};
          cnt   <= cnt - 1'b1;
          if (cnt == 6'd1) begin
            st <= 2'd0;
            // shreg[k:0] holds the payload and parity, b_val is the stop bit.
            if (is_long) begin
              frame.is_long <= 1'b1;
              frame.addr    <= shreg[32:19];
              frame.sub     <= shreg[16:9];
              frame.data    <= shreg[8:1];
              frame_valid   <= b_val && !(^{shreg[32:19], shreg[16:0]});
              frame_err     <= !b_val || (^{shreg[32:19], shreg[16:0]});
            end else begin
              frame.is_long <= 1'b0;
              frame.addr    <= '0;
              frame.sub     <= '0;
              frame.data    <= shreg[8:1];
              frame_valid   <= b_val && !(^shreg[8:0]);
              frame_err     <= !b_val || (^shreg[8:0]);
            end
          end
        end
      endcase
    end
  end
endmodule
