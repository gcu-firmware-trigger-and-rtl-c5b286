// ipb_jtag_tap: IPbus slave acting as a remote JTAG cable (virtual cable).
//
// It lives on the small board-control FPGA and drives TCK, TMS and TDI of the
// main FPGA, sampling TDO. Instead of bit-banging one pin write per IPbus
// transaction, it takes a whole shift command of the Xilinx Virtual Cable
// protocol ("shift: n bits, TMS vector, TDI vector -> TDO vector") up to 32
// bits at a time: software writes the TMS and TDI vectors, then the length
// with the start bit, polls busy and reads the TDO vector. Bits go out LSB
// first. For each bit TMS/TDI are set up with TCK low for CLK_DIV cycles,
// then TCK is high for CLK_DIV cycles; TDO is sampled on the rising TCK edge.
// Word addresses (ipb.addr[2:0]):
//   0 W  [5:0] bit count (1..32, 0 means 32), [8] start
//     R  [31] busy, [5:0] last bit count
//   1 RW TMS vector    2 RW TDI vector    3 R TDO vector
//   4 RW TCK half period in clock cycles (reset CLK_DIV, minimum 1)
// IPbus acks come one cycle after the strobe. A start while busy is ignored.
// The function (IPbus slave driving the JTAG pins, XVC buffering) is the
// document's; the register map and timing are this design's.
module ipb_jtag_tap
  import gcu_tt_pkg::*;
#(
  parameter int unsigned CLK_DIV = 4
) (
  input  logic      clk,
  input  logic      rst,
  input  ipb_wbus_t ipb_in,
  output ipb_rbus_t ipb_out,
  output logic      tck,
  output logic      tms,
  output logic      tdi,
  input  logic      tdo
);
  logic [31:0] tms_vec, tdi_vec, tdo_vec;
  logic [5:0]  nbits;
  logic [15:0] div;
  logic [15:0] cnt;
  logic [5:0]  bitn;
  logic        busy;
  logic        start;

  assign start = ipb_in.strobe && !ipb_out.ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      ipb_out <= '0;
      tms_vec <= '0;
      tdi_vec <= '0;
      tdo_vec <= '0;
      nbits   <= '0;
      div     <= 16'(CLK_DIV);
      cnt     <= '0;
      bitn    <= '0;
      busy    <= 1'b0;
      tck     <= 1'b0;
      tms     <= 1'b1;
      tdi     <= 1'b0;
    end else begin
      ipb_out.ack <= start && ipb_in.addr[31:3] == '0;
      ipb_out.err <= start && ipb_in.addr[31:3] != '0;
      if (start) begin
        ipb_out.rdata <= '0;
        if (ipb_in.write) begin
          unique case (ipb_in.addr[2:0])
            3'd0: if (!busy && ipb_in.wdata[8]) begin
              nbits <= ipb_in.wdata[5:0];
              busy  <= 1'b1;
              bitn  <= '0;
              cnt   <= '0;
              tck   <= 1'b0;
              tms   <= tms_vec[0];
              tdi   <= tdi_vec[0];
            end
            3'd1: tms_vec <= ipb_in.wdata;
            3'd2: tdi_vec <= ipb_in.wdata;
            3'd4: div     <= (ipb_in.wdata[15:0] == '0) ? 16'd1 : ipb_in.wdata[15:0];
            default: ;
          endcase
        end else begin
          unique case (ipb_in.addr[2:0])
            3'd0:    ipb_out.rdata <= {busy, 25'b0, nbits};
            3'd1:    ipb_out.rdata <= tms_vec;
            3'd2:    ipb_out.rdata <= tdi_vec;
            3'd3:    ipb_out.rdata <= tdo_vec;
            3'd4:    ipb_out.rdata <= 32'(div);
            default: ;
          endcase
        end
      end

      if (busy) begin
        if (cnt == div - 1'b1) begin
          cnt <= '0;
          if (!tck) begin
            tck               <= 1'b1;
            tdo_vec[bitn[4:0]] <= tdo;
          end else begin
            tck <= 1'b0;
            if (bitn[4:0] == 5'(nbits - 1'b1)) begin
              busy <= 1'b0;
            end else begin
              bitn <= bitn + 1'b1;
              tms  <= tms_vec[bitn[4:0] + 5'd1];
              tdi  <= tdi_vec[bitn[4:0] + 5'd1];
            end
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
