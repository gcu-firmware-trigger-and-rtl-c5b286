// coarse_delay: programmable delay line for link symbols.
//
// Both the downstream (TTC) receiver and the upstream encoder of the GCU pass
// their line symbols through one of these, so that cable and electronics
// delays of all links can be padded up to the largest latency in the system.
// The delay is set in whole slots (16 ns clock cycles). The line is a
// circular buffer of MAX_DELAY words written every cycle; the output is read
// `delay` words behind the write pointer and registered, so the total latency
// from din to dout is delay + 1 cycles. The coarse-delay idea is the
// document's; the buffer structure and the 64-slot range are this design's
// choices.
module coarse_delay #(
  parameter int unsigned W         = 4,   // bits per cycle (line symbols)
  parameter int unsigned MAX_DELAY = 64   // delay range 0 .. MAX_DELAY-1 cycles
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [$clog2(MAX_DELAY)-1:0] delay,
  input  logic [W-1:0]                 din,
  output logic [W-1:0]                 dout
);
  localparam int unsigned AW = $clog2(MAX_DELAY);

  logic [W-1:0]  mem [MAX_DELAY];
  logic [AW-1:0] wp;
  logic [AW-1:0] rp;

  // With delay 0 the word written this cycle is forwarded directly.
  assign rp = wp - delay;

  always_ff @(posedge clk) begin
    mem[wp] <= din;
    if (rst) begin
      wp   <= '0;
      dout <= '0;
    end else begin
      wp   <= wp + 1'b1;
      dout <= (delay == '0) ? din : mem[rp];
    end
  end
endmodule
