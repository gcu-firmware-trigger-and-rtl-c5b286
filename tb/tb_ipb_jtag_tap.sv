// tb_ipb_jtag_tap: self-checking test of the IPbus JTAG cable.
// A behavioural 8-bit shift register stands in for the device's scan chain:
// on each rising TCK it shifts TDI in and its output bit is TDO. The test
// shifts vectors of several lengths (1, 8, 13, 32 bits) and checks the TMS and
// TDI bits seen at each rising TCK edge, the number of TCK pulses, the TCK
// period (2 x divider) at several dividers, and the TDO vector against the
// chain model; also register read-back, busy, and that a start while busy
// is ignored.
module tb_ipb_jtag_tap;
  import gcu_tt_pkg::*;
  logic clk = 0, rst = 1;
  ipb_wbus_t ipb_in; ipb_rbus_t ipb_out;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;
  logic [7:0] chain;
  logic [31:0] seen_tms, seen_tdi, exp_tdo;
  int nclk = 0, last_rise = -1, cyc = 0, bad_period = 0;
  int div = 3;

  ipb_jtag_tap dut (.*);

  always #8 clk = ~clk;
  always @(posedge clk) cyc++;

  assign tdo = chain[0];
  always @(posedge tck) begin
    exp_tdo[nclk] = chain[0];
    seen_tms[nclk] = tms;
    seen_tdi[nclk] = tdi;
    chain <= {tdi, chain[7:1]};
    if (last_rise >= 0 && cyc - last_rise != 2 * div) bad_period++;
    last_rise = cyc;
    nclk++;
  end

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

  task automatic ipb(input bit wr, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: d, strobe: 1'b1, write: wr};
    do @(negedge clk); while (!(ipb_out.ack || ipb_out.err));
    q = ipb_out.rdata;
    ipb_in.strobe = 0;
  endtask

  task automatic shift(input int n);
    logic [31:0] q, v_tms, v_tdi, mask;
    mask = (n == 32) ? 32'hFFFF_FFFF : (32'd1 << n) - 1;
    v_tms = $urandom; v_tdi = $urandom;
    ipb(1, 1, v_tms, q);
    ipb(1, 2, v_tdi, q);
    ipb(0, 1, 0, q); check(q == v_tms, "TMS vector read back");
    ipb(0, 2, 0, q); check(q == v_tdi, "TDI vector read back");
    nclk = 0; last_rise = -1;
    ipb(1, 0, 32'h100 | (n & 31), q);
    ipb(0, 0, 0, q);
    check(q[31], "busy after start");
    // a second start while busy is ignored
    ipb(1, 0, 32'h101, q);
    do ipb(0, 0, 0, q); while (q[31]);
    check(q[5:0] == 6'(n & 31), "bit count read back");
    check(nclk == n, "TCK pulse count");
    check(((seen_tms ^ v_tms) & mask) == 0, "TMS bits");
    check(((seen_tdi ^ v_tdi) & mask) == 0, "TDI bits");
    check(tck == 0, "TCK low when idle");
    ipb(0, 3, 0, q);
    check(((q ^ exp_tdo) & mask) == 0, "TDO vector");
  endtask

  initial begin
    int lens [4] = '{1, 8, 13, 32};
    logic [31:0] q;
    ipb_in = '0; chain = 8'hA5;
    repeat (3) @(posedge clk);
    rst <= 0;
    ipb(0, 4, 0, q); check(q == 32'd4, "divider reset value");
    ipb(1, 4, div, q);
    ipb(0, 4, 0, q); check(q == 32'(div), "divider read back");
    foreach (lens[i]) shift(lens[i]);
    check(bad_period == 0, "TCK period");
    // random lengths at other TCK speeds
    for (int k = 0; k < 6; k++) begin
      div = 1 + k % 3;
      ipb(1, 4, div, q);
      shift($urandom_range(1, 32));
    end
    check(bad_period == 0, "TCK period at other dividers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
