// event_builder: moves a validated readout window from the L1 to the L2 cache.
//
// A trigger is either a validation from the BEC carrying the time tag of the
// window start (normal mode), or, in autotrigger mode, a rising edge of the
// local trigger request, tagged with the local time minus AUTO_PRE slots. The
// window length in samples is win_normal (90, i.e. 90 ns at 1 GS/s) or
// win_auto (40). One trigger can wait while another event is being built;
// a further one is dropped and counted (busy_drops).
//
// The L1 word holding the local time tag t is wr_ptr - (now - t). A trigger
// whose window is not fully written yet waits; one whose data would be
// overwritten before the copy ends is dropped (late_drops); one that does not
// fit in the free L2 space is dropped (full_drops). An event is 4 header
// words followed by ceil(win/2) data words of two 16-bit samples, lower
// sample in bits 15:0:
//   word 0 : {8'hEB, 7'b0, auto, 8'b0, win}
//   word 1 : event number (cleared by the event counter reset command)
//   word 2 : {16'b0, tag[47:32]}      word 3 : tag[31:0]
// Each L1 word costs 10 cycles (read, latch, 8 writes): a 90-sample event takes
// about 64 cycles, about 1 us, far below the 1 ms between events at the 1 kHz
// normal trigger rate and the 20 us at the 50 kHz autotrigger rate.
// Header size, window lengths and modes follow the document; the header
// contents, data packing and drop policy are this design's.
module event_builder
  import gcu_tt_pkg::*;
#(
  parameter int unsigned WORD_W   = 256,
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned L1_DEPTH = 1250,
  parameter int unsigned LVL_W    = 11,
  parameter int unsigned L2_DEPTH = 1024,
  parameter int unsigned AUTO_PRE = 2
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [TIME_W-1:0]           local_time,
  input  logic                        run,
  input  logic                        auto_mode,
  input  logic [7:0]                  win_normal,
  input  logic [7:0]                  win_auto,
  input  logic                        val_valid,
  input  logic [TIME_W-1:0]           val_tag,
  input  logic                        trig_req,
  input  logic                        evt_cnt_rst,
  // L1
  input  logic [$clog2(L1_DEPTH)-1:0] l1_wr_ptr,
  output logic [$clog2(L1_DEPTH)-1:0] l1_rd_addr,
  input  logic [WORD_W-1:0]           l1_rd_data,
  // L2
  input  logic [LVL_W-1:0]            l2_level,
  output logic                        l2_wr_en,
  output logic [31:0]                 l2_wr_data,
  // status
  output logic                        event_done,
  output logic [31:0]                 event_cnt,
  output logic [15:0]                 late_drops,
  output logic [15:0]                 full_drops,
  output logic [15:0]                 busy_drops
);
  localparam int unsigned AW  = $clog2(L1_DEPTH);
  localparam int unsigned SPW = WORD_W / SAMPLE_W;  // samples per L1 word
  localparam int unsigned PPW = 32 / SAMPLE_W;      // samples per L2 word

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_READ, S_LATCH, S_EMIT} st_e;

  st_e               st;
  logic              p_valid, p_auto;
  logic [TIME_W-1:0] p_tag;
  logic [7:0]        p_win;
  logic              w_auto;     // event being built
  logic [TIME_W-1:0] w_tag;
  logic [7:0]        w_win, w_ndata;
  logic              consume;
  logic              trig_q;
  logic              new_trig;
  logic [TIME_W-1:0] new_tag;
  logic [TIME_W-1:0] age;
  logic [4:0]        nwords;
  logic [7:0]        ndata;
  logic [7:0]        sent;
  logic [1:0]        hcnt;
  logic [$clog2(SPW/PPW)-1:0] sub;
  logic [AW-1:0]     addr;
  logic [WORD_W-1:0] word_q;
  logic [AW-1:0]     base;
  logic              need_wait, too_late, no_room;

  assign new_trig = run && (auto_mode ? (trig_req && !trig_q) : val_valid);
  assign new_tag  = auto_mode ? local_time - TIME_W'(AUTO_PRE) : val_tag;

  assign age    = local_time - p_tag;
  assign nwords = 5'((p_win + 8'(SPW - 1)) / 8'(SPW));
  assign ndata  = (p_win + 8'(PPW - 1)) / 8'(PPW);

  assign need_wait = age[TIME_W-1] || age < TIME_W'(nwords);
  assign too_late  = age + TIME_W'(10 * nwords + 8) >= TIME_W'(L1_DEPTH);
  assign no_room   = 32'(l2_level) + 32'(ndata) + 32'd4 > 32'(L2_DEPTH);
  assign base      = (l1_wr_ptr >= AW'(age)) ? l1_wr_ptr - AW'(age)
                                             : l1_wr_ptr + AW'(L1_DEPTH) - AW'(age);
  assign l1_rd_addr = addr;
  assign consume    = st == S_IDLE && p_valid && !need_wait;

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      p_valid    <= 1'b0;
      p_auto     <= 1'b0;
      p_tag      <= '0;
      p_win      <= '0;
      w_auto     <= 1'b0;
      w_tag      <= '0;
      w_win      <= '0;
      w_ndata    <= '0;
      trig_q     <= 1'b0;
      sent       <= '0;
      hcnt       <= '0;
      sub        <= '0;
      addr       <= '0;
      word_q     <= '0;
      l2_wr_en   <= 1'b0;
      l2_wr_data <= '0;
      event_done <= 1'b0;
      event_cnt  <= '0;
      late_drops <= '0;
      full_drops <= '0;
      busy_drops <= '0;
    end else begin
      trig_q     <= trig_req;
      l2_wr_en   <= 1'b0;
      event_done <= 1'b0;
      if (evt_cnt_rst) event_cnt <= '0;

      unique case (st)
        S_IDLE: if (p_valid && !need_wait) begin
          if (too_late) begin
            late_drops <= late_drops + 1'b1;
            p_valid    <= 1'b0;
          end else if (no_room) begin
            full_drops <= full_drops + 1'b1;
            p_valid    <= 1'b0;
          end else begin
            p_valid <= 1'b0;
            w_auto  <= p_auto;
            w_tag   <= p_tag;
            w_win   <= p_win;
            w_ndata <= ndata;
            addr    <= base;
            hcnt    <= '0;
            st      <= S_HDR;
          end
        end
        S_HDR: begin
          l2_wr_en <= 1'b1;
          unique case (hcnt)
            2'd0:    l2_wr_data <= {8'hEB, 7'b0, w_auto, 8'b0, w_win};
            2'd1:    l2_wr_data <= event_cnt;
            2'd2:    l2_wr_data <= 32'(w_tag[TIME_W-1:32]);
            default: l2_wr_data <= w_tag[31:0];
          endcase
          hcnt <= hcnt + 1'b1;
          if (hcnt == 2'd3) begin
            sent <= '0;
            st   <= S_READ;
          end
        end
        S_READ:  st <= S_LATCH;
        S_LATCH: begin
          word_q <= l1_rd_data;
          sub    <= '0;
          st     <= S_EMIT;
        end
        default: begin // S_EMIT
          l2_wr_en   <= 1'b1;
          l2_wr_data <= word_q[32*sub +: 32];
          sent       <= sent + 1'b1;
          sub        <= sub + 1'b1;
          if (sent + 1'b1 == w_ndata) begin
            event_done <= 1'b1;
            event_cnt  <= event_cnt + 1'b1;
            st         <= S_IDLE;
          end else if (sub == '1) begin
            addr <= (addr == AW'(L1_DEPTH - 1)) ? '0 : addr + 1'b1;
            st   <= S_READ;
          end
        end
      endcase

      // a new trigger waits in the pending slot, freed when a build starts
      if (new_trig) begin
        if (!p_valid || consume) begin
          p_valid <= 1'b1;
          p_auto  <= auto_mode;
          p_tag   <= new_tag;
          p_win   <= auto_mode ? win_auto : win_normal;
        end else begin
          busy_drops <= busy_drops + 1'b1;
        end
      end
    end
  end
endmodule
