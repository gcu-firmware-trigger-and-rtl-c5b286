// gcu_tt_pkg: shared types and constants of the GCU trigger and timing links.
//
// The upstream link (GCU -> BEC) carries, in every 16 ns slot, one trigger
// request bit T and one command bit D. D bits form 11-bit frames: start bit
// (0), a 4-bit command code HHHH, 4 data bits DDDD, an even parity bit and a
// stop bit (1). The command codes below are the upstream command table.
//
// The downstream link (BEC -> GCU) follows the TTC scheme: an A channel bit
// and a B channel bit per slot. B frames are either short broadcast frames
// carrying an 8-bit command, or long addressed frames writing a data byte to a
// sub-address of one GCU (or of all GCUs with the broadcast address). The
// command and sub-address maps, the IPbus bus structs and the 48-bit width of
// the local time counter are this design's own choices.
package gcu_tt_pkg;

  // Local / global time counter: one tick per 16 ns slot.
  localparam int unsigned TIME_W      = 48;
  localparam int unsigned TIME_NIBBLES = TIME_W / 4;
  localparam int unsigned TIME_BYTES  = TIME_W / 8;

  // Upstream command codes (HHHH field).
  typedef enum logic [3:0] {
    UP_COMMA        = 4'h0,
    UP_BACK_PRS_ON  = 4'h1,
    UP_BACK_PRS_OFF = 4'h2,
    UP_DELAY_REQ    = 4'h3,
    UP_TIME         = 4'h4,
    UP_IDLE         = 4'h5,
    UP_TDB          = 4'h6
  } up_cmd_e;

  typedef struct packed {
    up_cmd_e    cmd;
    logic [3:0] data;
  } up_frame_t;

  // Downstream broadcast command bytes (short frames, or long frames to
  // sub-address DN_SUB_CMD for an individually addressed command).
  localparam logic [7:0] DN_TIME_REQ    = 8'h01;
  localparam logic [7:0] DN_EVT_CNT_RST = 8'h02;
  localparam logic [7:0] DN_DAQ_START   = 8'h03;
  localparam logic [7:0] DN_DAQ_STOP    = 8'h04;
  localparam logic [7:0] DN_TEST_PULSE  = 8'h05;
  localparam logic [7:0] DN_SYNC        = 8'h06;

  // Downstream long-frame sub-addresses.
  localparam logic [7:0] DN_SUB_TAG0     = 8'h00; // 0x00..0x05 validation time tag bytes
  localparam logic [7:0] DN_SUB_VALIDATE = 8'h06; // commit trigger validation
  localparam logic [7:0] DN_SUB_T1_0     = 8'h10; // 0x10..0x15 t1_g bytes
  localparam logic [7:0] DN_SUB_FOLLOW   = 8'h16; // commit follow-up (t1_g complete)
  localparam logic [7:0] DN_SUB_T4_0     = 8'h20; // 0x20..0x25 t4_g bytes
  localparam logic [7:0] DN_SUB_DLY_RESP = 8'h26; // commit delay response
  localparam logic [7:0] DN_SUB_CMD      = 8'h30; // addressed command, data = command byte

  localparam logic [13:0] DN_ADDR_ALL = 14'h3FFF;

  typedef struct packed {
    logic        is_long;  // 0: short broadcast, 1: long addressed
    logic [13:0] addr;
    logic [7:0]  sub;
    logic [7:0]  data;
  } dn_frame_t;

  // Frame lengths in slots, start and stop bits included.
  localparam int unsigned UP_FRAME_BITS = 11;
  localparam int unsigned DN_SHORT_BITS = 12; // 0 0 D8 P 1
  localparam int unsigned DN_LONG_BITS  = 36; // 0 1 A14 E 1 S8 D8 P 1

  // IPbus slave bus (as in the IPbus firmware: master to slave and back).
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

endpackage
