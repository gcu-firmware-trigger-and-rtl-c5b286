// gcu_local_time: the GCU's copy of the global time and its scheduled actions.
//
// A TIME_W-bit counter advances by one every 16 ns slot. It is corrected by
// the clock-alignment procedure: when adj_valid is high the signed adj_offset
// is added on top of the normal increment. Two operations are scheduled
// against the counter, since no synchronous message can reach all GCUs at the
// same instant:
//   - local clock reset: when sched_reset_en is set and the counter equals
//     t_reset, the counter restarts from 0 in the next cycle and the schedule
//     disarms itself (clock_reset pulses). Re-writing the enable re-arms it.
//   - test pulse: when tp_en is set and the counter equals tp_time,
//     test_pulse is high for one cycle; tp_now (a broadcast test-pulse
//     command) also produces one.
// The scheduled reset and test pulse register follow the document; the
// counter width (48 bits), one-shot arming and pulse width are this design's.
module gcu_local_time
  import gcu_tt_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              adj_valid,
  input  logic [TIME_W-1:0] adj_offset,     // two's complement
  input  logic              sched_reset_en, // level; rising edge arms
  input  logic [TIME_W-1:0] t_reset,
  input  logic              tp_en,
  input  logic [TIME_W-1:0] tp_time,
  input  logic              tp_now,
  output logic [TIME_W-1:0] local_time,
  output logic              clock_reset,
  output logic              test_pulse
);
  logic armed, en_q;
  logic reset_hit;

  assign reset_hit = armed && (local_time == t_reset);

  always_ff @(posedge clk) begin
    if (rst) begin
      local_time  <= '0;
      armed       <= 1'b0;
      en_q        <= 1'b0;
      clock_reset <= 1'b0;
      test_pulse  <= 1'b0;
    end else begin
      en_q        <= sched_reset_en;
      clock_reset <= reset_hit;
      test_pulse  <= tp_now || (tp_en && local_time == tp_time);
      if (sched_reset_en && !en_q) armed <= 1'b1;
      else if (!sched_reset_en || reset_hit) armed <= 1'b0;
      if (reset_hit)
        local_time <= '0;
      else if (adj_valid)
        local_time <= local_time + adj_offset + 1'b1;
      else
        local_time <= local_time + 1'b1;
    end
  end
endmodule
